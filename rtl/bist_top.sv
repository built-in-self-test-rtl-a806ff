// bist_top: built-in self-test of a column of block RAMs.
//
// A column of N_BUT identically configured block RAMs (the blocks under
// test) is tested concurrently. Two identical test pattern generators
// (tpg_a, tpg_b) receive the same configuration and start together; tpg_a
// drives the even RAMs and tpg_b the odd RAMs. An ora_ring compares the
// responses of the RAMs in a circle - neighbour with neighbour, or every
// other RAM in the cascade configurations - and folds every ORA into one
// iterative-OR pass/fail bit. Because expected values are never computed,
// the test length depends only on the RAM configuration, not on N_BUT.
//
// A run applies one of the 19 BIST configurations (cfg_sel 1..19, see
// bist_pkg::cfg_lookup). The RAM-mode settings of that configuration are
// driven on `but_cfg` to every RAM (in the FPGA they are set by a full or
// partial reconfiguration); `casc_upper` gives each RAM its LOWER/UPPER role
// in the cascade configurations (the RAM below an UPPER RAM is its LOWER
// partner, and the last RAM wraps round to the first). The RAMs themselves
// are outside this module: their stimulus leaves on `but_stim` and their
// responses come back on `but_resp`.
//
// Interface and timing: pulse `start` for one cycle with `cfg_sel` valid;
// the configuration is latched, the ORAs are initialised to pass, and both
// TPGs start on the next cycle. `done` rises when the run and its drain
// window are over; `pass` is then the result of the whole column and
// `ora_pass` holds each ORA cell's flag (ORA i, cell c at bit
// i*RESP_W/2 + c; cell c compares response bits 2c and 2c+1) for diagnosis.
// The two-TPG circular comparison, the ORA routing and the configuration
// list follow the described BIST; the port-level packaging is this design's.
module bist_top
  import bist_pkg::*;
#(
  parameter int unsigned N_BUT = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [4:0]                cfg_sel,
  output bist_cfg_t                 but_cfg,
  output logic [N_BUT-1:0]          casc_upper,
  output but_stim_t                 but_stim [N_BUT],
  input  but_resp_t                 but_resp [N_BUT],
  output logic                      busy,
  output logic                      done,
  output logic                      pass,
  output logic [N_BUT*RESP_W/2-1:0] ora_pass
);

  bist_cfg_t cfg_q;
  logic      go_q;          // start of the TPGs, one cycle after `start`
  logic      init_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_q  <= CFG_IDLE;
      go_q   <= 1'b0;
      init_q <= 1'b0;
    end else begin
      go_q   <= start;
      init_q <= start;
      if (start) cfg_q <= cfg_lookup(cfg_sel);
    end
  end

  assign but_cfg = cfg_q;

  for (genvar i = 0; i < N_BUT; i++) begin : g_role
    assign casc_upper[i] = (cfg_q.mode == MODE_CASC) && ((i % 2 == 1) ^ cfg_q.casc_swap);
  end

  but_stim_t stim_a, stim_b;
  logic      busy_a, busy_b, cmp_a, cmp_b, done_a, done_b;

  tpg u_tpg_a (
    .clk(clk), .rst_n(rst_n), .start(go_q), .cfg(cfg_q),
    .stim(stim_a), .busy(busy_a), .cmp_en(cmp_a), .done(done_a));

  tpg u_tpg_b (
    .clk(clk), .rst_n(rst_n), .start(go_q), .cfg(cfg_q),
    .stim(stim_b), .busy(busy_b), .cmp_en(cmp_b), .done(done_b));

  for (genvar i = 0; i < N_BUT; i++) begin : g_stim
    assign but_stim[i] = (i % 2 == 0) ? stim_a : stim_b;
  end

  logic fail;

  ora_ring #(.N_BUT(N_BUT)) u_ring (
    .clk     (clk),
    .rst_n   (rst_n),
    .init    (init_q),
    .en      (cmp_a | cmp_b),
    .casc    (cfg_q.mode == MODE_CASC),
    .resp    (but_resp),
    .ora_pass(ora_pass),
    .fail    (fail)
  );

  assign busy = busy_a | busy_b;
  assign done = done_a & done_b;
  assign pass = ~fail;

endmodule
