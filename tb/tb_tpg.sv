// tb_tpg: self-checking test of one TPG site.
// For one configuration of each RAM mode the testbench checks that the site
// runs the right generator (operation count and a mode-specific property of
// the stimulus), that `cmp_en` stays high from the start through the whole
// run and at least DRAIN cycles past the last operation, and that `done`
// rises only after that window.
module tb_tpg;
  import bist_pkg::*;
  localparam int unsigned DRAIN = 4;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  bist_cfg_t cfg;
  but_stim_t stim;
  logic busy, cmp_en, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tpg #(.DRAIN(DRAIN)) dut (.clk, .rst_n, .start, .cfg, .stim, .busy, .cmp_en, .done);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input int n, input int exp_ops);
    int t, last_op, n_ops, n_b, n_msb, cmp_low, done_t;
    cfg = cfg_lookup(5'(n));
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t = 0; last_op = -1; n_ops = 0; n_b = 0; n_msb = 0; cmp_low = -1; done_t = -1;
    while (t < 200000 && done_t < 0) begin
      if (stim.en_a || stim.en_b) begin
        n_ops++; last_op = t;
        if (stim.en_b) n_b++;
        if (stim.addr_a[15]) n_msb++;
      end
      if (!cmp_en && cmp_low < 0) cmp_low = t;
      if (done) done_t = t;
      @(negedge clk);
      t++;
    end
    chk(n_ops == exp_ops, $sformatf("config %0d: %0d operations, expected %0d", n, n_ops, exp_ops));
    chk(cmp_low < 0 || cmp_low > last_op + int'(DRAIN),
        $sformatf("config %0d: compare window closed at %0d, last op %0d", n, cmp_low, last_op));
    chk(done_t > last_op + int'(DRAIN), $sformatf("config %0d: done at %0d, last op %0d", n, done_t, last_op));
    chk(!cmp_en, $sformatf("config %0d: compare window closes with done", n));
    case (cfg.mode)
      MODE_FIFO, MODE_FIFOECC: chk(n_b == exp_ops / 2, $sformatf("config %0d: half the operations are reads", n));
      MODE_CASC: chk(n_msb == 16, $sformatf("config %0d: half the operations in the upper half", n));
      MODE_ECC:  chk(n_b == 0, $sformatf("config %0d: port B unused", n));
      default:   chk(n_b == 0, $sformatf("config %0d: single-port MATS+", n));
    endcase
  endtask

  initial begin
    cfg = CFG_IDLE;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(3, 5 * 2048);
    run(9, 512);
    run(11, 6 * 1024 + 2);
    run(16, 1026);
    run(18, 32);
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
