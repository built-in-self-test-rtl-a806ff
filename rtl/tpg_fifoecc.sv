// tpg_fifoecc: test pattern generator for the FIFO-with-ECC configurations
// (512 x 72).
//
// A FIFO March X modified to carry the ECC test words: each pass fills the
// FIFO with 512 words from ecc_pattern_gen plus one write while full, then
// drains it with 512 reads plus one read while empty, so the FULL/EMPTY,
// almost and error flags are exercised as in tpg_fifo while the data stream
// exercises the Hamming logic:
//   * ALG_ECC_READ  - words with all-0 data and every Hamming value (written
//     with Hamming generation off, read with correction on); one pass of
//     512 words covers the 256 values twice.
//   * ALG_ECC_WRITE - words with one or two 1s in the data (written through
//     the Hamming generator, read raw); five passes cover all 2080 words,
//     the last pass wrapping round to the first words.
//
// Interface and timing: FIFO stimulus convention of bist_pkg (we_a/din_a
// write, en_b read). One-cycle `start`; one operation per clock from the
// next edge, 1026 cycles per pass. `busy` high while running, `done` high
// after the last read until the next start. The pattern sets follow the
// described FIFOECC test; the pass structure is this design's choice.
module tpg_fifoecc
  import bist_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  alg_e      alg,
  output but_stim_t stim,
  output logic      busy,
  output logic      done
);

  localparam int unsigned DEPTH = 512;

  typedef enum logic [1:0] {S_IDLE, S_FILL, S_DRAIN} state_e;

  state_e     st_q;
  logic [9:0] c_q;            // operation within the phase, 0..DEPTH
  logic [2:0] pass_q;         // pass number
  logic [2:0] npass_q;        // passes to run

  logic [DW-1:0] word;

  ecc_pattern_gen u_pat (
    .clk    (clk),
    .rst_n  (rst_n),
    .restart(start),
    .kind   (alg == ALG_ECC_WRITE),
    .advance(st_q == S_FILL && c_q != 10'(DEPTH)),
    .word   (word),
    .last   ()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= S_IDLE;
      c_q     <= '0;
      pass_q  <= '0;
      npass_q <= '0;
      done    <= 1'b0;
      stim    <= '0;
    end else if (start) begin
      st_q    <= (alg == ALG_ECC_READ || alg == ALG_ECC_WRITE) ? S_FILL : S_IDLE;
      done    <= !(alg == ALG_ECC_READ || alg == ALG_ECC_WRITE);
      npass_q <= (alg == ALG_ECC_WRITE) ? 3'd5 : 3'd1;
      pass_q  <= '0;
      c_q     <= '0;
      stim    <= '0;
    end else begin
      stim <= '0;
      unique case (st_q)
        S_FILL: begin
          stim.en_a  <= 1'b1;
          stim.we_a  <= 1'b1;
          stim.din_a <= word;
          if (c_q == 10'(DEPTH)) begin c_q <= '0; st_q <= S_DRAIN; end
          else c_q <= c_q + 10'd1;
        end
        S_DRAIN: begin
          stim.en_b <= 1'b1;
          if (c_q == 10'(DEPTH)) begin
            c_q <= '0;
            if (pass_q == npass_q - 3'd1) begin
              st_q <= S_IDLE;
              done <= 1'b1;
            end else begin
              pass_q <= pass_q + 3'd1;
              st_q   <= S_FILL;
            end
          end else c_q <= c_q + 10'd1;
        end
        default: ;
      endcase
    end
  end

  assign busy = (st_q != S_IDLE);

endmodule
