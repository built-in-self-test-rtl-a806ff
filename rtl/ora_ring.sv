// ora_ring: circular comparison of a column of blocks under test.
//
// N_BUT block RAMs stand in a ring. In the normal configurations ORA i
// compares BUT i with its neighbour BUT i+1 (mod N_BUT), so every BUT is
// watched by two ORAs and a faulty BUT shows up as the two failing ORAs on
// either side of it. In the cascade configurations (casc = 1) the RAMs
// alternate between LOWER and UPPER roles, so ORA i compares BUT i with
// BUT i+2 (every other RAM): UPPER against UPPER and LOWER against LOWER.
// N_BUT must be even for that routing to form two rings.
//
// Each ORA compares the full response of its two BUTs (both data output
// buses and the status flags, RESP_W bits) with RESP_W/2 ora_cell instances,
// two bits per cell. All cells of all ORAs form one iterative-OR chain whose
// end is `fail`; `ora_pass` exposes every cell's flag for diagnosis (the
// FPGA reads these back from configuration memory).
//
// Timing: one clock from a response to its effect on `ora_pass`; `fail` is
// combinational from the flags. The neighbour and every-other routing follow
// the described architecture; the ring closure for every-other routing and
// the bit pairing (bits 2c and 2c+1 in cell c) are this design's choice.
module ora_ring
  import bist_pkg::*;
#(
  parameter int unsigned N_BUT = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         init,
  input  logic                         en,
  input  logic                         casc,
  input  but_resp_t                    resp [N_BUT],
  output logic [N_BUT*RESP_W/2-1:0]    ora_pass,
  output logic                         fail
);

  localparam int unsigned CELLS = RESP_W / 2;

  // every-other routing needs two rings of equal length
  if (N_BUT < 4 || N_BUT % 2 != 0) begin : g_bad_size
    $error("ora_ring: N_BUT must be even and at least 4");
  end

  logic [N_BUT*CELLS:0] chain;
  assign chain[0] = 1'b0;

  for (genvar i = 0; i < N_BUT; i++) begin : g_ora
    logic [RESP_W-1:0] rj, rk;
    always_comb begin
      rj = resp[i];
      rk = casc ? resp[(i + 2) % N_BUT] : resp[(i + 1) % N_BUT];
    end
    for (genvar c = 0; c < CELLS; c++) begin : g_cell
      ora_cell u_cell (
        .clk      (clk),
        .rst_n    (rst_n),
        .init     (init),
        .en       (en),
        .out0_j   (rj[2*c]),
        .out0_k   (rk[2*c]),
        .out1_j   (rj[2*c+1]),
        .out1_k   (rk[2*c+1]),
        .carry_in (chain[i*CELLS+c]),
        .pass     (ora_pass[i*CELLS+c]),
        .carry_out(chain[i*CELLS+c+1])
      );
    end
  end

  assign fail = chain[N_BUT*CELLS];

endmodule
