// ora_cell: one comparison-based output response analyzer.
//
// Compares the same two outputs (out_i and out_i+1) of two blocks under test
// j and k. Each output pair goes through an equivalence (XNOR) test; the two
// results and the cell's own pass flag form the next pass flag, so the flag
// is sticky: once a mismatch has been seen it stays at 0 until `init`.
// Comparing two outputs in one cell halves the number of ORAs at the cost of
// not knowing which of the two outputs differed.
//
// The cell is also one stage of an iterative-OR chain (built in the FPGA on
// the dedicated carry logic): carry_out = carry_in OR (this cell failed), so
// the end of the chain is a single pass/fail bit for the whole array and the
// individual pass flags are only needed for diagnosis.
//
// Timing: the flag updates on the rising clock edge while `en` is high; a
// synchronous `init` (and the asynchronous active-low reset) set it to pass.
// The two XNOR comparisons, the sticky flag and the OR chain follow the
// described ORA; the enable and the initialising inputs are this design's
// choice (in the FPGA the flag starts from its configured value).
module ora_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic init,       // set the flag to pass
  input  logic en,         // compare in this cycle
  input  logic out0_j,     // out_i of BUT j
  input  logic out0_k,     // out_i of BUT k
  input  logic out1_j,     // out_i+1 of BUT j
  input  logic out1_k,     // out_i+1 of BUT k
  input  logic carry_in,   // fail indication from the previous cell
  output logic pass,       // 1 = no mismatch seen
  output logic carry_out   // fail indication of this cell and all before it
);

  logic same0, same1;

  always_comb begin
    same0 = ~(out0_j ^ out0_k);
    same1 = ~(out1_j ^ out1_k);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    pass <= 1'b1;
    else if (init) pass <= 1'b1;
    else if (en)   pass <= pass & same0 & same1;
  end

  assign carry_out = carry_in | ~pass;

endmodule
