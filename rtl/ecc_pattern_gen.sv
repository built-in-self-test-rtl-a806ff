// ecc_pattern_gen: test words for the Hamming (ECC) circuitry of the RAM.
//
// Two pattern sets, selected by `kind` at `restart`:
//   * HAMMING (kind 0): the 64 data bits are all 0 and the 8 Hamming bits
//     take every value 0..255 - the words that exercise the single-error
//     correction and double-error detection logic at the RAM output when
//     they are written with Hamming generation bypassed.
//   * DATA (kind 1): the 8 Hamming bits are 0 and the 64 data bits hold
//     every single 1 and every pair of 1s in a field of 0s (64 + 2016 = 2080
//     words) - the words that exercise Hamming generation at the RAM input
//     and regeneration at the output.
// The words are enumerated with two bit indices i <= j: i == j gives the
// single 1 at bit i, i < j the pair (i, j); order is i = 0..63, j = i..63.
//
// Interface and timing: `word` shows the current pattern; `advance` steps to
// the next one on the rising edge, wrapping to the first after the last;
// `last` marks the last pattern of the set. `restart` (one cycle) selects the
// set and returns to the first pattern. The two pattern sets follow the
// described ECC test; the enumeration order is this design's choice.
module ecc_pattern_gen
  import bist_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          restart,
  input  logic          kind,      // 0: Hamming values, 1: data ones
  input  logic          advance,
  output logic [DW-1:0] word,      // {hamming[7:0], data[63:0]}
  output logic          last
);

  logic       kind_q;
  logic [5:0] i_q, j_q;            // DATA set bit indices
  logic [7:0] h_q;                 // HAMMING set value

  always_comb begin
    word = '0;
    if (kind_q) begin
      word[{1'b0, i_q}] = 1'b1;
      word[{1'b0, j_q}] = 1'b1;
      last = (i_q == 6'd63);
    end else begin
      word[71:64] = h_q;
      last = (h_q == 8'hFF);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kind_q <= 1'b0;
      i_q    <= '0;
      j_q    <= '0;
      h_q    <= '0;
    end else if (restart) begin
      kind_q <= kind;
      i_q    <= '0;
      j_q    <= '0;
      h_q    <= '0;
    end else if (advance) begin
      h_q <= h_q + 8'd1;
      if (j_q != 6'd63) begin
        j_q <= j_q + 6'd1;
      end else if (i_q != 6'd63) begin
        i_q <= i_q + 6'd1;
        j_q <= i_q + 6'd1;
      end else begin
        i_q <= '0;
        j_q <= '0;
      end
    end
  end

endmodule
