// tb_bist_top: end-to-end test of the block RAM BIST at its default size.
//
// Eight behavioural block RAM models (bram_model) form the column under
// test around bist_top; cascade outputs run from each LOWER RAM to the RAM
// above it as selected by casc_upper. The test
//   1. runs all 19 BIST configurations on fault-free RAMs and checks that
//      each passes, that every ORA flag stays at pass, and that each
//      configuration's generator issues exactly its expected number of
//      operations (formulas below, worked out from the algorithms);
//   2. injects faults into RAM 3 and checks that the BIST fails and that
//      the diagnosis (the failing ORAs) points at RAM 3:
//        - a stuck data cell under MATS+ (config 3): ORAs 2 and 3 fail,
//        - a stuck FULL flag under FIFO March X (config 11): ORAs 2 and 3,
//        - a stuck cascade output of RAM 3 in cascade config 19, where
//          RAM 3 is the LOWER half under RAM 4: the wrong data appears at
//          RAM 4, so ORAs 2 and 4 of the every-other ring fail;
//   3. counts the mechanisms the BIST relies on and fails if one never
//      happened: neighbour and every-other routing, clock inversion, FULL,
//      EMPTY, ALMOST FULL, ALMOST EMPTY, write and read error flags, single
//      and double ECC errors, cascade reads through the LOWER RAM, a
//      detected fault.
module tb_bist_top;
  import bist_pkg::*;

  localparam int unsigned N_BUT = 8;
  localparam int unsigned CELLS = RESP_W / 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [4:0] cfg_sel = '0;
  logic reconf = 1'b0;
  logic [1:0] fault_kind [N_BUT];

  bist_cfg_t            but_cfg;
  logic [N_BUT-1:0]     casc_upper;
  but_stim_t            but_stim [N_BUT];
  but_resp_t            but_resp [N_BUT];
  logic                 busy, done, pass;
  logic [N_BUT*CELLS-1:0] ora_pass;
  logic [N_BUT-1:0]     casc_out;

  always #5 clk = ~clk;

  bist_top dut (
    .clk, .rst_n, .start, .cfg_sel, .but_cfg, .casc_upper, .but_stim, .but_resp,
    .busy, .done, .pass, .ora_pass);

  for (genvar i = 0; i < N_BUT; i++) begin : g_ram
    bram_model #(.FAULT_BIT(5), .FAULT_VAL(1'b1)) u_ram (
      .clk       (clk),
      .reconf    (reconf),
      .cfg       (but_cfg),
      .upper     (casc_upper[i]),
      .stim      (but_stim[i]),
      .casc_in   (casc_out[(i + N_BUT - 1) % N_BUT]),
      .fault_kind(fault_kind[i]),
      .resp      (but_resp[i]),
      .casc_out  (casc_out[i])
    );
  end

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ mechanism counters
  int n_full, n_empty, n_afull, n_aempty, n_wrerr, n_rderr, n_sbe, n_dbe;
  int n_casc_rd, n_neigh, n_every_other, n_clkinv, n_detect;

  always @(posedge clk) if (busy) begin
    if (but_resp[0].status[7]) n_full++;
    if (but_resp[0].status[6]) n_empty++;
    if (but_resp[0].status[5]) n_afull++;
    if (but_resp[0].status[4]) n_aempty++;
    if (but_resp[0].status[3]) n_wrerr++;
    if (but_resp[0].status[2]) n_rderr++;
    if (but_resp[0].status[1]) n_sbe++;
    if (but_resp[0].status[0]) n_dbe++;
    if (but_cfg.mode == MODE_CASC && casc_upper[1] && but_stim[1].en_a && !but_stim[1].addr_a[15]) n_casc_rd++;
  end

  // ------------------------------------------------------------ expected operation counts
  function automatic int expected_ops(input int n);
    bist_cfg_t c;
    int d;
    c = cfg_lookup(5'(n));
    d = 1 << c.addr_bits;
    case (c.alg)
      ALG_MATS_PLUS:    return 5 * d;
      ALG_MARCH_S2PF:   return 14 * d;
      ALG_MARCH_D2PF:   return 9 * d;
      ALG_MARCH_LR_BDS: return 16 * d + 4 * d * 7;
      ALG_ECC_READ:     return (c.mode == MODE_ECC) ? 2 * 256 : 2 * 513;
      ALG_ECC_WRITE:    return (c.mode == MODE_ECC) ? 2 * 2080 : 5 * 2 * 513;
      ALG_FIFO_MARCH_X: return 6 * d + 2;
      ALG_MARCH_Y:      return 32;
      default:          return 0;
    endcase
  endfunction

  int busy_cycles;
  always @(posedge clk) if (busy) busy_cycles <= busy_cycles + 1;

  // run one configuration; returns when done
  task automatic run_cfg(input int n, output bit passed);
    @(negedge clk);
    reconf = 1'b1;
    @(negedge clk);
    reconf = 1'b0;
    cfg_sel = 5'(n);
    start = 1'b1;
    busy_cycles = 0;
    @(negedge clk);
    start = 1'b0;
    @(negedge clk);
    wait (done);
    @(negedge clk);
    passed = pass;
  endtask

  function automatic bit ora_ok(input int i);
    return &ora_pass[i*CELLS +: CELLS];
  endfunction

  initial begin
    bit p;
    int t0;
    for (int i = 0; i < N_BUT; i++) fault_kind[i] = 2'd0;
    {n_full, n_empty, n_afull, n_aempty, n_wrerr, n_rderr, n_sbe, n_dbe} = '0;
    {n_casc_rd, n_neigh, n_every_other, n_clkinv, n_detect} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. fault-free: all 19 configurations
    for (int n = 1; n <= int'(N_CFG); n++) begin
      t0 = cyc;
      run_cfg(n, p);
      check(p, $sformatf("config %0d passes on fault-free RAMs", n));
      check(&ora_pass, $sformatf("config %0d: all ORA flags at pass", n));
      check(busy_cycles == expected_ops(n),
            $sformatf("config %0d: %0d operations, expected %0d", n, busy_cycles, expected_ops(n)));
      if (but_cfg.mode == MODE_CASC) n_every_other++; else n_neigh++;
      if (but_cfg.clk_inv) n_clkinv++;
      $display("config %2d: %s ops=%0d cycles=%0d (reference budget %0d)",
               n, p ? "pass" : "FAIL", busy_cycles, cyc - t0, REF_CYCLES[n]);
    end

    // 2a. stuck data cell in RAM 3, MATS+ 2K x 18
    fault_kind[3] = 2'd1;
    run_cfg(3, p);
    check(!p, "stuck cell detected in config 3");
    check(!ora_ok(2) && !ora_ok(3), "stuck cell: ORAs 2 and 3 fail");
    check(ora_ok(0) && ora_ok(1) && ora_ok(4) && ora_ok(5) && ora_ok(6) && ora_ok(7),
          "stuck cell: other ORAs pass");
    if (!p) n_detect++;

    // 2b. stuck FULL flag in RAM 3, FIFO March X 1K x 36
    fault_kind[3] = 2'd2;
    run_cfg(11, p);
    check(!p, "stuck FULL detected in config 11");
    check(!ora_ok(2) && !ora_ok(3) && ora_ok(0) && ora_ok(5), "stuck FULL: ORAs 2 and 3 fail only");
    if (!p) n_detect++;

    // 2c. stuck cascade output of RAM 3, config 19 (RAM 3 LOWER under RAM 4)
    fault_kind[3] = 2'd3;
    run_cfg(19, p);
    check(!p, "stuck cascade output detected in config 19");
    // RAM 4 (UPPER) is wrong: the every-other ring compares 2-4 (ORA 2) and 4-6 (ORA 4)
    check(!ora_ok(2) && !ora_ok(4) && ora_ok(3) && ora_ok(1), "stuck cascade: ORAs 2 and 4 fail");
    if (!p) n_detect++;
    // the same fault is invisible to a non-cascade configuration
    run_cfg(7, p);
    check(p, "cascade fault unseen by config 7");
    fault_kind[3] = 2'd0;

    // 3. mechanisms
    check(n_full > 0,   "FULL seen");
    check(n_empty > 0,  "EMPTY seen");
    check(n_afull > 0,  "ALMOST FULL seen");
    check(n_aempty > 0, "ALMOST EMPTY seen");
    check(n_wrerr > 0,  "write error seen");
    check(n_rderr > 0,  "read error seen");
    check(n_sbe > 0,    "single-bit ECC error seen");
    check(n_dbe > 0,    "double-bit ECC error seen");
    check(n_casc_rd > 0, "cascade read of the LOWER half seen");
    check(n_neigh > 0 && n_every_other > 0, "both ORA routings used");
    check(n_clkinv == 2, "two clock-inverted configurations");
    check(n_detect == 3, "all injected faults detected");
    $display("mechanisms: full=%0d empty=%0d afull=%0d aempty=%0d wrerr=%0d rderr=%0d sbe=%0d dbe=%0d casc_rd=%0d neigh=%0d every_other=%0d clkinv=%0d detect=%0d",
             n_full, n_empty, n_afull, n_aempty, n_wrerr, n_rderr, n_sbe, n_dbe,
             n_casc_rd, n_neigh, n_every_other, n_clkinv, n_detect);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #40_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
