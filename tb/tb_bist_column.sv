// tb_bist_column: the block RAM BIST on a taller column, with faults at the
// ends of the circle.
//
// Devices differ in how many block RAMs a column holds; the BIST only
// changes N_BUT. This test builds bist_top with N_BUT = 12 around twelve
// behavioural block RAMs (bram_model), cascade outputs running from each RAM
// to the next one up and from the last RAM round to the first, and checks:
//   1. that a set of configurations (one per RAM mode) passes on fault-free
//      RAMs and issues exactly as many operations as in an 8-RAM column:
//      the test length does not depend on the number of RAMs;
//   2. diagnosis round the circle: a stuck data cell in RAM j, under MATS+
//      (config 3), fails exactly ORAs j-1 and j (modulo 12), for j at the
//      bottom (0), in the middle (5) and at the top (11) of the column;
//   3. a stuck FULL flag in RAM 11 under FIFO March X (config 14) fails
//      exactly ORAs 10 and 11;
//   4. every-other routing round the circle: a stuck cascade output of
//      RAM 10 in config 18 (RAM 10 LOWER under RAM 11) makes RAM 11 wrong,
//      so ORAs 9 (9 against 11) and 11 (11 against 1) fail; a stuck cascade
//      output of RAM 11 in config 19 (RAM 11 LOWER under RAM 0, across the
//      wrap) makes RAM 0 wrong, so ORAs 10 and 0 fail.
module tb_bist_column;
  import bist_pkg::*;

  localparam int unsigned N_BUT = 12;
  localparam int unsigned CELLS = RESP_W / 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [4:0] cfg_sel = '0;
  logic reconf = 1'b0;
  logic [1:0] fault_kind [N_BUT];

  bist_cfg_t              but_cfg;
  logic [N_BUT-1:0]       casc_upper;
  but_stim_t              but_stim [N_BUT];
  but_resp_t              but_resp [N_BUT];
  logic                   busy, done, pass;
  logic [N_BUT*CELLS-1:0] ora_pass;
  logic [N_BUT-1:0]       casc_out;

  always #5 clk = ~clk;

  bist_top #(.N_BUT(N_BUT)) dut (
    .clk, .rst_n, .start, .cfg_sel, .but_cfg, .casc_upper, .but_stim, .but_resp,
    .busy, .done, .pass, .ora_pass);

  for (genvar i = 0; i < N_BUT; i++) begin : g_ram
    bram_model #(.FAULT_BIT(9), .FAULT_VAL(1'b1)) u_ram (
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

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // operations per configuration, from the algorithms (N = words)
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

  // exactly the ORAs in `bad` fail
  function automatic bit only_fail(input logic [N_BUT-1:0] bad);
    for (int i = 0; i < N_BUT; i++)
      if ((&ora_pass[i*CELLS +: CELLS]) == bad[i]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic [N_BUT-1:0] ora_bit(input int i);
    return N_BUT'(1) << ((i + N_BUT) % N_BUT);
  endfunction

  int fault_free_cfgs [6] = '{3, 9, 14, 16, 18, 19};
  int stuck_rams [3] = '{0, 5, 11};

  initial begin
    bit p;
    for (int i = 0; i < N_BUT; i++) fault_kind[i] = 2'd0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. fault-free, one configuration per RAM mode and both cascade roles
    foreach (fault_free_cfgs[k]) begin
      run_cfg(fault_free_cfgs[k], p);
      check(p && &ora_pass, $sformatf("config %0d passes on a fault-free 12-RAM column", fault_free_cfgs[k]));
      check(busy_cycles == expected_ops(fault_free_cfgs[k]),
            $sformatf("config %0d: %0d operations, expected %0d", fault_free_cfgs[k],
                      busy_cycles, expected_ops(fault_free_cfgs[k])));
    end

    // 2. stuck data cell at the bottom, middle and top of the column
    foreach (stuck_rams[k]) begin
      int j;
      j = stuck_rams[k];
      fault_kind[j] = 2'd1;
      run_cfg(3, p);
      check(!p, $sformatf("stuck cell in RAM %0d detected", j));
      check(only_fail(ora_bit(j - 1) | ora_bit(j)),
            $sformatf("stuck cell in RAM %0d: exactly ORAs %0d and %0d fail", j, (j + N_BUT - 1) % N_BUT, j));
      fault_kind[j] = 2'd0;
    end

    // 3. stuck FULL flag in the top RAM
    fault_kind[11] = 2'd2;
    run_cfg(14, p);
    check(!p, "stuck FULL in RAM 11 detected");
    check(only_fail(ora_bit(10) | ora_bit(11)), "stuck FULL in RAM 11: exactly ORAs 10 and 11 fail");
    fault_kind[11] = 2'd0;

    // 4. cascade faults, every-other routing across the wrap
    fault_kind[10] = 2'd3;
    run_cfg(18, p);
    check(!p, "stuck cascade output of RAM 10 detected in config 18");
    check(only_fail(ora_bit(9) | ora_bit(11)), "cascade fault, RAM 11 wrong: exactly ORAs 9 and 11 fail");
    fault_kind[10] = 2'd0;

    fault_kind[11] = 2'd3;
    run_cfg(19, p);
    check(!p, "stuck cascade output of RAM 11 detected in config 19");
    check(only_fail(ora_bit(10) | ora_bit(0)), "cascade fault, RAM 0 wrong: exactly ORAs 10 and 0 fail");
    fault_kind[11] = 2'd0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
