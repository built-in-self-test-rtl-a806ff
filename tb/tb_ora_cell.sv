// tb_ora_cell: self-checking test of one comparison ORA cell.
// Random bit pairs (mostly equal, sometimes different), random enables,
// inits and carry inputs; a reference model in the testbench tracks the
// sticky pass flag and the iterative-OR carry and is compared every cycle.
module tb_ora_cell;
  logic clk = 1'b0, rst_n = 1'b0;
  logic init, en, o0j, o0k, o1j, o1k, cin;
  logic pass, cout;
  int checks = 0, failures = 0;
  bit ref_pass;
  int n_fail_seen = 0, n_init = 0;

  always #5 clk = ~clk;

  ora_cell dut (.clk, .rst_n, .init, .en, .out0_j(o0j), .out0_k(o0k),
                .out1_j(o1j), .out1_k(o1k), .carry_in(cin), .pass, .carry_out(cout));

  initial begin
    {init, en, o0j, o0k, o1j, o1k, cin} = '0;
    ref_pass = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      // check the state left by the previous edge
      checks++;
      if (pass !== ref_pass || cout !== (cin | ~ref_pass)) begin
        failures++;
        $display("FAIL t=%0d pass=%b ref=%b cout=%b cin=%b", t, pass, ref_pass, cout, cin);
      end
      init = ($urandom_range(0, 49) == 0);
      en   = ($urandom_range(0, 9) != 0);
      o0j  = $urandom_range(0, 1); o1j = $urandom_range(0, 1);
      o0k  = ($urandom_range(0, 29) == 0) ? ~o0j : o0j;
      o1k  = ($urandom_range(0, 29) == 0) ? ~o1j : o1j;
      cin  = $urandom_range(0, 1);
      #1;
      checks++;
      if (cout !== (cin | ~ref_pass)) begin failures++; $display("FAIL carry t=%0d", t); end
      // reference update at the coming edge
      if (init) begin ref_pass = 1'b1; n_init++; end
      else if (en && (o0j != o0k || o1j != o1k)) ref_pass = 1'b0;
      if (!ref_pass) n_fail_seen++;
    end
    checks++;
    if (n_fail_seen == 0 || n_init == 0) begin failures++; $display("FAIL: no mismatch or init exercised"); end
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
