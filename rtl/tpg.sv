// tpg: one test pattern generator site of the BIST.
//
// Holds the five mode-specific generators (BRAM, ECC, FIFO, FIFOECC, CASC)
// and runs the one that belongs to the RAM mode of the current configuration
// `cfg`. In the FPGA only that generator is present in a given download; here
// all five are built and the mode selects one, which is equivalent for the
// RAMs under test. The BIST places two identical tpg sites that drive
// alternate RAMs, so a fault in one generator makes every ORA disagree.
//
// Besides the stimulus the site produces the run control the ORAs need:
// `cmp_en` is high from the first stimulus slot until DRAIN cycles after the
// last one, so that reads issued at the end (up to two cycles of RAM output
// latency with the output register) are still compared; `done` rises when
// that window closes and stays high until the next `start`.
//
// Interface and timing: one-cycle `start` with `cfg` stable for the run;
// stimulus from the following clock edge; `busy` follows the selected
// generator; `start` while a run is in progress violates an assertion. The
// per-mode generators follow the described BIST; the drain window and the
// compare enable are this design's choice.
module tpg
  import bist_pkg::*;
#(
  parameter int unsigned DRAIN = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  bist_cfg_t cfg,
  output but_stim_t stim,
  output logic      busy,
  output logic      cmp_en,
  output logic      done
);

  but_stim_t s_bram, s_ecc, s_fifo, s_fecc, s_casc;
  logic      b_bram, b_ecc, b_fifo, b_fecc, b_casc;
  logic      d_bram, d_ecc, d_fifo, d_fecc, d_casc;

  tpg_bram u_bram (
    .clk(clk), .rst_n(rst_n), .start(start && cfg.mode == MODE_BRAM),
    .alg(cfg.alg), .addr_bits(cfg.addr_bits), .stim(s_bram), .busy(b_bram), .done(d_bram));

  tpg_ecc u_ecc (
    .clk(clk), .rst_n(rst_n), .start(start && cfg.mode == MODE_ECC),
    .alg(cfg.alg), .stim(s_ecc), .busy(b_ecc), .done(d_ecc));

  tpg_fifo u_fifo (
    .clk(clk), .rst_n(rst_n), .start(start && cfg.mode == MODE_FIFO),
    .addr_bits(cfg.addr_bits), .stim(s_fifo), .busy(b_fifo), .done(d_fifo));

  tpg_fifoecc u_fifoecc (
    .clk(clk), .rst_n(rst_n), .start(start && cfg.mode == MODE_FIFOECC),
    .alg(cfg.alg), .stim(s_fecc), .busy(b_fecc), .done(d_fecc));

  tpg_casc u_casc (
    .clk(clk), .rst_n(rst_n), .start(start && cfg.mode == MODE_CASC),
    .stim(s_casc), .busy(b_casc), .done(d_casc));

  logic sel_done;

  always_comb begin
    unique case (cfg.mode)
      MODE_ECC:     begin stim = s_ecc;  busy = b_ecc;  sel_done = d_ecc;  end
      MODE_FIFO:    begin stim = s_fifo; busy = b_fifo; sel_done = d_fifo; end
      MODE_FIFOECC: begin stim = s_fecc; busy = b_fecc; sel_done = d_fecc; end
      MODE_CASC:    begin stim = s_casc; busy = b_casc; sel_done = d_casc; end
      default:      begin stim = s_bram; busy = b_bram; sel_done = d_bram; end
    endcase
  end

  // run control: RUN while the generator works, then DRAIN cycles of compare
  typedef enum logic [1:0] {R_IDLE, R_START, R_RUN, R_DRAIN} run_e;
  run_e       run_q;
  logic [3:0] dr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q <= R_IDLE;
      dr_q  <= '0;
      done  <= 1'b0;
    end else if (start) begin
      run_q <= R_START;
      done  <= 1'b0;
    end else begin
      unique case (run_q)
        R_START: run_q <= R_RUN;    // generator's done/busy valid from here
        R_RUN: if (sel_done) begin
          run_q <= R_DRAIN;
          dr_q  <= 4'(DRAIN);
        end
        R_DRAIN: if (dr_q == 4'd0) begin
          run_q <= R_IDLE;
          done  <= 1'b1;
        end else dr_q <= dr_q - 4'd1;
        default: ;
      endcase
    end
  end

  assign cmp_en = (run_q != R_IDLE);

  // only the generator of the configured mode may run, and a new run may
  // start only when the previous one is over
  a_one_generator: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({b_bram, b_ecc, b_fifo, b_fecc, b_casc}));
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> run_q == R_IDLE);

endmodule
