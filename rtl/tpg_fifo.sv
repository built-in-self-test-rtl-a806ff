// tpg_fifo: test pattern generator for the FIFO configurations.
//
// Applies FIFO March X to a FIFO of 2**addr_bits words:
//   1. fill   - write 0s until the FIFO is full, plus one write while full
//               (N + 1 writes);
//   2. r0,w1  - N times: read a word, then write a word of 1s (2N cycles;
//               FULL drops and rises every pair);
//   3. r1,w0  - N times: read a word, then write a word of 0s (2N cycles);
//   4. drain  - read until the FIFO is empty, plus one read while empty
//               (N + 1 reads).
// Filling and draining walk the FIFO through EMPTY, ALMOST EMPTY,
// ALMOST FULL and FULL, so every flag (and the error flags of the extra
// write and read) changes in every BUT and is compared by the ORAs. The
// programmable almost-flag offsets are part of the RAM configuration, not
// of the TPG.
//
// Interface and timing: FIFO stimulus convention of bist_pkg (we_a/din_a
// write, en_b read). One-cycle `start` latches `addr_bits`; one operation
// per clock from the next edge, 6N + 2 cycles in all. `busy` high while
// running, `done` high after the last operation until the next start. The
// fill-until-full / read-until-empty structure follows the described FIFO
// March X; the exact element sequence is this design's choice.
module tpg_fifo
  import bist_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [3:0] addr_bits,
  output but_stim_t  stim,
  output logic       busy,
  output logic       done
);

  typedef enum logic [2:0] {S_IDLE, S_FILL, S_RW1, S_RW0, S_DRAIN} state_e;

  state_e     st_q;
  logic [AW:0] n_q;           // FIFO depth N
  logic [AW:0] c_q;           // step counter within a phase

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE;
      n_q  <= '0;
      c_q  <= '0;
      done <= 1'b0;
      stim <= '0;
    end else if (start) begin
      st_q <= S_FILL;
      n_q  <= (AW+1)'(17'd1 << addr_bits);
      c_q  <= '0;
      done <= 1'b0;
      stim <= '0;
    end else begin
      stim <= '0;
      unique case (st_q)
        S_FILL: begin
          stim.en_a <= 1'b1;
          stim.we_a <= 1'b1;
          stim.din_a <= '0;
          if (c_q == n_q) begin c_q <= '0; st_q <= S_RW1; end
          else c_q <= c_q + 1'b1;
        end
        S_RW1, S_RW0: begin
          if (!c_q[0]) begin
            stim.en_b <= 1'b1;
          end else begin
            stim.en_a  <= 1'b1;
            stim.we_a  <= 1'b1;
            stim.din_a <= (st_q == S_RW1) ? '1 : '0;
          end
          if (c_q == {n_q[AW-1:0], 1'b0} - 1'b1) begin
            c_q  <= '0;
            st_q <= (st_q == S_RW1) ? S_RW0 : S_DRAIN;
          end else c_q <= c_q + 1'b1;
        end
        S_DRAIN: begin
          stim.en_b <= 1'b1;
          if (c_q == n_q) begin c_q <= '0; st_q <= S_IDLE; done <= 1'b1; end
          else c_q <= c_q + 1'b1;
        end
        default: ;
      endcase
    end
  end

  assign busy = (st_q != S_IDLE);

endmodule
