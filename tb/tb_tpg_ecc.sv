// tb_tpg_ecc: self-checking test of the ECC test pattern generator.
// ECC_READ: 256 writes of {h, 64'b0} to address h, then 256 reads of
// addresses 0..255. ECC_WRITE: batches of up to 512 writes of the one-/two-1s
// words (generated here independently) followed by reads of the same
// addresses, 2080 words in all. MARCH_LR_BDS: 44 x 512 operations.
module tb_tpg_ecc;
  import bist_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  alg_e alg = ALG_NONE;
  but_stim_t stim;
  logic busy, done;
  int checks = 0, failures = 0;
  but_stim_t got_q [$];

  always #5 clk = ~clk;

  tpg_ecc dut (.clk, .rst_n, .start, .alg, .stim, .busy, .done);

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

  initial begin
    logic [DW-1:0] words [$];
    int idx;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    run(ALG_ECC_READ);
    chk(got_q.size() == 512, "ECC read: 512 operations");
    for (int h = 0; h < 256 && got_q.size() == 512; h++) begin
      chk(got_q[h].we_a && got_q[h].addr_a == AW'(h) && got_q[h].din_a == {8'(h), 64'd0},
          $sformatf("ECC read: write %0d", h));
      chk(!got_q[256+h].we_a && got_q[256+h].addr_a == AW'(h), $sformatf("ECC read: read %0d", h));
    end

    for (int i = 0; i < 64; i++)
      for (int j = i; j < 64; j++) begin
        logic [DW-1:0] w;
        w = '0; w[i] = 1'b1; w[j] = 1'b1;
        words.push_back(w);
      end
    run(ALG_ECC_WRITE);
    chk(got_q.size() == 2 * 2080, "ECC write: 4160 operations");
    idx = 0;
    for (int b = 0; b < 5 && got_q.size() == 4160; b++) begin
      int cnt, base;
      cnt  = (b < 4) ? 512 : 32;
      base = b * 1024;
      for (int k = 0; k < cnt; k++) begin
        chk(got_q[base+k].we_a && got_q[base+k].addr_a == AW'(k) && got_q[base+k].din_a == words[idx],
            $sformatf("ECC write: batch %0d write %0d", b, k));
        chk(!got_q[base+cnt+k].we_a && got_q[base+cnt+k].addr_a == AW'(k),
            $sformatf("ECC write: batch %0d read %0d", b, k));
        idx++;
      end
    end

    run(ALG_MARCH_LR_BDS);
    chk(got_q.size() == 44 * 512, "March LR with BDS: 22528 operations");
    chk(got_q.size() > 0 && got_q[0].we_a && got_q[0].din_a == '0, "March LR: starts with w0");

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
