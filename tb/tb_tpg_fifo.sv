// tb_tpg_fifo: self-checking test of the FIFO March X pattern generator.
// For 1K and 8K FIFOs the slot sequence is compared with the testbench's own
// expectation: N+1 writes of 0s, N x (read, write 1s), N x (read, write 0s),
// N+1 reads; 6N+2 cycles with an operation in every cycle.
module tb_tpg_fifo;
  import bist_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [3:0] addr_bits = 4'd10;
  but_stim_t stim;
  logic busy, done;
  int checks = 0, failures = 0;
  // 0 = write 0s, 1 = write 1s, 2 = read
  byte exp_q [$];
  but_stim_t got_q [$];

  always #5 clk = ~clk;

  tpg_fifo dut (.clk, .rst_n, .start, .addr_bits, .stim, .busy, .done);

  task automatic run(input int ab);
    int n, busy_cyc;
    n = 1 << ab;
    exp_q.delete(); got_q.delete();
    for (int i = 0; i <= n; i++) exp_q.push_back(0);
    for (int i = 0; i < n; i++) begin exp_q.push_back(2); exp_q.push_back(1); end
    for (int i = 0; i < n; i++) begin exp_q.push_back(2); exp_q.push_back(0); end
    for (int i = 0; i <= n; i++) exp_q.push_back(2);
    @(negedge clk);
    addr_bits = 4'(ab); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    busy_cyc = 0;
    while (!done) begin
      if (busy) busy_cyc++;
      @(negedge clk);
      if (stim.en_a || stim.en_b) got_q.push_back(stim);
    end
    checks++;
    if (got_q.size() != exp_q.size() || busy_cyc != 6 * n + 2) begin
      failures++;
      $display("FAIL %0d: %0d slots (%0d busy cycles), expected %0d", n, got_q.size(), busy_cyc, exp_q.size());
    end
    for (int i = 0; i < got_q.size() && i < exp_q.size(); i++) begin
      bit ok;
      case (exp_q[i])
        0: ok = got_q[i].we_a && !got_q[i].en_b && got_q[i].din_a == '0;
        1: ok = got_q[i].we_a && !got_q[i].en_b && got_q[i].din_a == '1;
        default: ok = !got_q[i].we_a && got_q[i].en_b;
      endcase
      checks++;
      if (!ok) begin failures++; if (failures < 10) $display("FAIL %0d slot %0d", n, i); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(10);
    run(13);
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
