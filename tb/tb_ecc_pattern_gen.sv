// tb_ecc_pattern_gen: self-checking test of the ECC test-word generator.
// DATA set: 2080 distinct words, each with one or two 1s in the 64 data
// bits and 0 Hamming bits, `last` only on the 2080th, then a wrap to the
// first word. HAMMING set: all-0 data with Hamming values 0..255 in order.
module tb_ecc_pattern_gen;
  import bist_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, restart = 1'b0, kind = 1'b0, advance = 1'b0;
  logic [DW-1:0] word;
  logic last;
  int checks = 0, failures = 0;
  bit seen [logic [DW-1:0]];

  always #5 clk = ~clk;

  ecc_pattern_gen dut (.clk, .rst_n, .restart, .kind, .advance, .word, .last);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    logic [DW-1:0] first;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // DATA set
    kind = 1'b1; restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    first = word;
    for (int p = 0; p < 2080; p++) begin
      chk(word[71:64] == 8'h00, "data set: zero Hamming bits");
      chk($countones(word[63:0]) inside {1, 2}, "data set: one or two 1s");
      chk(!seen.exists(word), "data set: distinct");
      seen[word] = 1'b1;
      chk(last == (p == 2079), "data set: last flag");
      advance = 1'b1;
      @(negedge clk);
      advance = ($urandom_range(0, 3) == 0) ? 1'b0 : 1'b1;
      if (!advance) @(negedge clk);   // a held cycle keeps the word
      advance = 1'b0;
    end
    chk(seen.size() == 2080, "data set: 2080 words");
    chk(word == first, "data set: wraps to the first word");
    // HAMMING set
    kind = 1'b0; restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    for (int p = 0; p < 256; p++) begin
      chk(word == {8'(p), 64'd0}, "hamming set: value p with zero data");
      chk(last == (p == 255), "hamming set: last flag");
      advance = 1'b1;
      @(negedge clk);
      advance = 1'b0;
    end
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
