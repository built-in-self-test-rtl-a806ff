// tb_ora_ring: self-checking test of the circular ORA array.
// Eight responses are driven equal, then one bit of one BUT is flipped for
// one cycle. The testbench computes which ORA cells must fail from the
// routing rule (neighbour, or every other BUT in cascade mode) and the
// pairing of response bits into cells, and compares every flag and the
// chained fail bit.
module tb_ora_ring;
  import bist_pkg::*;
  localparam int unsigned N = 8;
  localparam int unsigned CELLS = RESP_W / 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic init = 1'b0, en = 1'b0, casc = 1'b0;
  but_resp_t resp [N];
  logic [N*CELLS-1:0] ora_pass;
  logic fail;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ora_ring #(.N_BUT(N)) dut (.clk, .rst_n, .init, .en, .casc, .resp, .ora_pass, .fail);

  task automatic trial(input bit c, input int bad, input int bit_i, input bit enable);
    logic [N*CELLS-1:0] exp_pass;
    logic [RESP_W-1:0]  base;
    @(negedge clk);
    init = 1'b1; casc = c; en = 1'b0;
    @(negedge clk);
    init = 1'b0;
    base = {$urandom, $urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < N; i++) resp[i] = base;
    resp[bad] = base ^ (RESP_W'(1) << bit_i);
    en = enable;
    @(negedge clk);
    en = 1'b0;
    for (int i = 0; i < N; i++) resp[i] = base;
    exp_pass = '1;
    if (enable)
      for (int i = 0; i < N; i++) begin
        int k;
        k = c ? (i + 2) % N : (i + 1) % N;
        if (i == bad || k == bad) exp_pass[i*CELLS + bit_i/2] = 1'b0;
      end
    @(negedge clk);
    checks++;
    if (ora_pass !== exp_pass || fail !== ~&exp_pass) begin
      failures++;
      $display("FAIL casc=%0b bad=%0d bit=%0d en=%0b", c, bad, bit_i, enable);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) resp[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++)
      trial($urandom_range(0, 1), $urandom_range(0, N - 1), $urandom_range(0, RESP_W - 1),
            $urandom_range(0, 7) != 0);
    // two mismatches accumulate, init clears
    trial(1'b0, 0, 0, 1'b1);
    @(negedge clk); init = 1'b1; @(negedge clk); init = 1'b0; @(negedge clk);
    checks++;
    if (!(&ora_pass) || fail) begin failures++; $display("FAIL: init did not clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
