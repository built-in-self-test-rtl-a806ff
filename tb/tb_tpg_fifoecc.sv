// tb_tpg_fifoecc: self-checking test of the FIFOECC pattern generator.
// ECC_READ: one pass of 513 writes (words {h mod 256, 0}; the 513th, while
// full, repeats the next word) and 513 reads. ECC_WRITE: five such passes
// whose written words follow the one-/two-1s enumeration, built here.
module tb_tpg_fifoecc;
  import bist_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  alg_e alg = ALG_NONE;
  but_stim_t stim;
  logic busy, done;
  int checks = 0, failures = 0;
  but_stim_t got_q [$];

  always #5 clk = ~clk;

  tpg_fifoecc dut (.clk, .rst_n, .start, .alg, .stim, .busy, .done);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic run(input alg_e a);
    got_q.delete();
    @(negedge clk);
    alg = a; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) begin
      @(negedge clk);
      if (stim.en_a || stim.en_b) got_q.push_back(stim);
    end
  endtask

  task automatic check_passes(input int np, input logic [DW-1:0] words [$], input string name);
    int idx;
    chk(got_q.size() == np * 1026, $sformatf("%s: %0d operations", name, got_q.size()));
    idx = 0;
    for (int p = 0; p < np && got_q.size() == np * 1026; p++) begin
      for (int k = 0; k < 513; k++) begin
        but_stim_t w, r;
        w = got_q[p*1026 + k];
        r = got_q[p*1026 + 513 + k];
        chk(w.we_a && !w.en_b && w.din_a == words[idx % words.size()],
            $sformatf("%s: pass %0d write %0d", name, p, k));
        chk(r.en_b && !r.we_a, $sformatf("%s: pass %0d read %0d", name, p, k));
        if (k < 512) idx++;
      end
    end
  endtask

  initial begin
    logic [DW-1:0] hw [$], dw [$];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int h = 0; h < 256; h++) hw.push_back({8'(h), 64'd0});
    for (int i = 0; i < 64; i++)
      for (int j = i; j < 64; j++) begin
        logic [DW-1:0] w;
        w = '0; w[i] = 1'b1; w[j] = 1'b1;
        dw.push_back(w);
      end
    run(ALG_ECC_READ);
    check_passes(1, hw, "ECC read");
    run(ALG_ECC_WRITE);
    check_passes(5, dw, "ECC write");
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
