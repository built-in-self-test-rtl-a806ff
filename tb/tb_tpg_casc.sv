// tb_tpg_casc: self-checking test of the cascade March Y generator.
// The 32 operations are compared with the sequence built here:
// addresses 0000, 7FFF, 8000, FFFF; any(w0); up(r0,w1,r1); down(r1,w0,r0); any(r0).
module tb_tpg_casc;
  import bist_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  but_stim_t stim;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tpg_casc dut (.clk, .rst_n, .start, .stim, .busy, .done);

  typedef struct { bit we; logic [15:0] a; bit v; } op_t;
  op_t exp_q [$];
  but_stim_t got_q [$];

  initial begin
    logic [15:0] addrs [4] = '{16'h0000, 16'h7FFF, 16'h8000, 16'hFFFF};
    for (int i = 0; i < 4; i++) exp_q.push_back('{1, addrs[i], 0});
    for (int i = 0; i < 4; i++) begin
      exp_q.push_back('{0, addrs[i], 0}); exp_q.push_back('{1, addrs[i], 1}); exp_q.push_back('{0, addrs[i], 1});
    end
    for (int i = 3; i >= 0; i--) begin
      exp_q.push_back('{0, addrs[i], 1}); exp_q.push_back('{1, addrs[i], 0}); exp_q.push_back('{0, addrs[i], 0});
    end
    for (int i = 0; i < 4; i++) exp_q.push_back('{0, addrs[i], 0});

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 2; rep++) begin
      got_q.delete();
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (!done) begin
        @(negedge clk);
        if (stim.en_a) got_q.push_back(stim);
      end
      checks++;
      if (got_q.size() != 32) begin failures++; $display("FAIL: %0d operations", got_q.size()); end
      for (int i = 0; i < 32 && i < got_q.size(); i++) begin
        checks++;
        if (got_q[i].we_a != exp_q[i].we || got_q[i].addr_a != exp_q[i].a ||
            (exp_q[i].we && got_q[i].din_a[0] != exp_q[i].v) || got_q[i].en_b) begin
          failures++;
          $display("FAIL op %0d: we=%b a=%h d=%b", i, got_q[i].we_a, got_q[i].addr_a, got_q[i].din_a[0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
