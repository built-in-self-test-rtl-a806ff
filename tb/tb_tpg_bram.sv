// tb_tpg_bram: self-checking test of the BRAM march test pattern generator.
// MATS+ and March LR with background data sequences are checked slot by
// slot against sequences the testbench builds with its own loops; March
// s2pf- and March d2pf are checked for their length, for port B reading the
// same cell (s2pf-) or a neighbouring cell (d2pf) and for never writing on
// port B. The operation count of each run is checked against k*N.
module tb_tpg_bram;
  import bist_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  alg_e alg = ALG_NONE;
  logic [3:0] addr_bits = 4'd9;
  but_stim_t stim;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tpg_bram dut (.clk, .rst_n, .start, .alg, .addr_bits, .stim, .busy, .done);

  typedef struct packed { logic we; logic [AW-1:0] addr; logic [DW-1:0] din; } slot_t;
  slot_t exp_q [$];
  but_stim_t got_q [$];

  function automatic logic [DW-1:0] bgp(input int k);
    logic [DW-1:0] b;
    for (int j = 0; j < DW; j++) b[j] = (k == 0) ? 1'b0 : ((j / (1 << (k - 1))) % 2 == 1);
    return b;
  endfunction

  // push one element: dir 0 up / 1 down, ops as string of r/w and 0/1 pairs
  task automatic push_elem(input int n, input bit down, input string ops, input int bg);
    for (int s = 0; s < n; s++) begin
      int a;
      a = down ? n - 1 - s : s;
      for (int o = 0; o < ops.len(); o += 2) begin
        slot_t sl;
        sl.we   = (ops[o] == "w");
        sl.addr = AW'(a);
        sl.din  = (ops[o+1] == "1") ? ~bgp(bg) : bgp(bg);
        exp_q.push_back(sl);
      end
    end
  endtask

  task automatic run(input alg_e a, input logic [3:0] ab);
    got_q.delete();
    @(negedge clk);
    alg = a; addr_bits = ab; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) begin
      @(negedge clk);
      if (stim.en_a || stim.en_b) got_q.push_back(stim);
    end
    repeat (2) @(negedge clk);
  endtask

  task automatic compare_single(input string name);
    checks++;
    if (got_q.size() != exp_q.size()) begin
      failures++;
      $display("FAIL %s: %0d slots, expected %0d", name, got_q.size(), exp_q.size());
    end
    for (int i = 0; i < got_q.size() && i < exp_q.size(); i++) begin
      checks++;
      if (!got_q[i].en_a || got_q[i].we_a != exp_q[i].we || got_q[i].addr_a != exp_q[i].addr ||
          got_q[i].din_a != exp_q[i].din || got_q[i].en_b || got_q[i].we_b) begin
        failures++;
        if (failures < 10) $display("FAIL %s slot %0d", name, i);
      end
    end
  endtask

  initial begin
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // MATS+ on 2K: {any(w0); up(r0,w1); down(r1,w0)}
    n = 2048;
    exp_q.delete();
    push_elem(n, 0, "w0", 0);
    push_elem(n, 0, "r0w1", 0);
    push_elem(n, 1, "r1w0", 0);
    run(ALG_MATS_PLUS, 4'd11);
    compare_single("MATS+");
    checks++;
    if (got_q.size() != 5 * n) begin failures++; $display("FAIL MATS+ length"); end

    // March LR with BDS on 512 x 72
    n = 512;
    exp_q.delete();
    push_elem(n, 0, "w0", 0);
    push_elem(n, 1, "r0w1", 0);
    push_elem(n, 0, "r1w0r0r0w1", 0);
    push_elem(n, 0, "r1w0", 0);
    push_elem(n, 0, "r0w1r1r1w0", 0);
    push_elem(n, 0, "r0", 0);
    for (int k = 1; k <= 7; k++) push_elem(n, 0, "w0r0w1r1", k);
    run(ALG_MARCH_LR_BDS, 4'd9);
    compare_single("March LR BDS");
    checks++;
    if (got_q.size() != 44 * n) begin failures++; $display("FAIL LR length"); end

    // March s2pf- on 1K: port B reads the same cell
    n = 1024;
    run(ALG_MARCH_S2PF, 4'd10);
    checks++;
    if (got_q.size() != 14 * n) begin failures++; $display("FAIL s2pf length %0d", got_q.size()); end
    foreach (got_q[i]) if (got_q[i].en_b) begin
      checks++;
      if (got_q[i].we_b || got_q[i].addr_b != got_q[i].addr_a) begin failures++; $display("FAIL s2pf slot %0d", i); end
    end

    // March d2pf on 1K: port B reads a neighbouring cell
    run(ALG_MARCH_D2PF, 4'd10);
    checks++;
    if (got_q.size() != 9 * n) begin failures++; $display("FAIL d2pf length %0d", got_q.size()); end
    foreach (got_q[i]) if (got_q[i].en_b) begin
      logic [AW-1:0] d;
      d = (got_q[i].addr_b - got_q[i].addr_a) & AW'(n - 1);
      checks++;
      if (got_q[i].we_b || !(d == 1 || d == AW'(n - 1))) begin failures++; $display("FAIL d2pf slot %0d", i); end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
