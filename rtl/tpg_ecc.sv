// tpg_ecc: test pattern generator for the ECC RAM configurations (512 x 72).
//
// Three algorithms, chosen by `alg` at `start`:
//   * ALG_MARCH_LR_BDS - March LR with background data sequences over the
//     whole 512 x 72 core (Hamming logic bypassed), produced by an embedded
//     tpg_bram march engine. This is the one configuration that tests the
//     memory cells for coupling and pattern-sensitive faults.
//   * ALG_ECC_READ - the 256 words with all-0 data and every Hamming value are
//     written with Hamming generation disabled, then read back with the
//     correction logic enabled, so every syndrome reaches the single-error
//     correction / double-error detection logic.
//   * ALG_ECC_WRITE - the 2080 words with one or two 1s in 64 data bits are
//     written through the Hamming generator and read back raw, so the stored
//     Hamming bits appear on the outputs.
// The ECC patterns are written in batches of up to 512 words (one per
// address, port A) and each batch is read back at once (port A).
//
// Interface and timing: one-cycle `start`; one write or read per clock from
// the next edge; ECC_READ takes 256 + 256 cycles, ECC_WRITE 2 x 2080 cycles,
// March LR with BDS 44 x 512 cycles. `busy` high while running, `done` high
// after the last slot until the next start. The three tests and their pattern
// sets follow the described BIST; batching and port use are this design's
// choice.
module tpg_ecc
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

  typedef enum logic [1:0] {S_IDLE, S_WR, S_RD} state_e;

  state_e     st_q;
  logic       march_q;        // running the March LR engine
  logic [9:0] a_q;            // address within the batch
  logic [9:0] cnt_q;          // words written in this batch
  logic       more_q;         // patterns remain after this batch
  logic       pat_done_q;

  // March LR engine
  but_stim_t  m_stim;
  logic       m_busy, m_done;

  tpg_bram u_march (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start && alg == ALG_MARCH_LR_BDS),
    .alg      (ALG_MARCH_LR_BDS),
    .addr_bits(4'd9),
    .stim     (m_stim),
    .busy     (m_busy),
    .done     (m_done)
  );

  // ECC patterns
  logic [DW-1:0] word;
  logic          pat_last;
  logic          adv;

  ecc_pattern_gen u_pat (
    .clk    (clk),
    .rst_n  (rst_n),
    .restart(start),
    .kind   (alg == ALG_ECC_WRITE),
    .advance(adv),
    .word   (word),
    .last   (pat_last)
  );

  but_stim_t e_stim;

  assign adv = (st_q == S_WR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q       <= S_IDLE;
      march_q    <= 1'b0;
      a_q        <= '0;
      cnt_q      <= '0;
      more_q     <= 1'b0;
      pat_done_q <= 1'b0;
      e_stim     <= '0;
    end else if (start) begin
      march_q    <= (alg == ALG_MARCH_LR_BDS);
      st_q       <= (alg == ALG_ECC_READ || alg == ALG_ECC_WRITE) ? S_WR : S_IDLE;
      pat_done_q <= !(alg == ALG_ECC_READ || alg == ALG_ECC_WRITE || alg == ALG_MARCH_LR_BDS);
      a_q        <= '0;
      e_stim     <= '0;
    end else begin
      e_stim <= '0;
      unique case (st_q)
        S_WR: begin
          e_stim.en_a   <= 1'b1;
          e_stim.we_a   <= 1'b1;
          e_stim.addr_a <= AW'(a_q);
          e_stim.din_a  <= word;
          if (pat_last || a_q == 10'(DEPTH - 1)) begin
            cnt_q  <= a_q;
            more_q <= !pat_last;
            a_q    <= '0;
            st_q   <= S_RD;
          end else begin
            a_q <= a_q + 10'd1;
          end
        end
        S_RD: begin
          e_stim.en_a   <= 1'b1;
          e_stim.addr_a <= AW'(a_q);
          if (a_q == cnt_q) begin
            a_q  <= '0;
            st_q <= more_q ? S_WR : S_IDLE;
            pat_done_q <= !more_q;
          end else begin
            a_q <= a_q + 10'd1;
          end
        end
        default: ;
      endcase
    end
  end

  assign stim = march_q ? m_stim : e_stim;
  assign busy = march_q ? m_busy : (st_q != S_IDLE);
  assign done = march_q ? m_done : pat_done_q;

endmodule
