// tpg_casc: test pattern generator for the cascade configurations.
//
// Two RAMs configured as 32K x 1 and joined by the dedicated cascade routing
// form one 64K x 1 RAM whose address MSB selects the LOWER or the UPPER RAM.
// The memory cells are already tested by then, so only a functional test of
// the cascade multiplexers is needed: March Y,
//   {any(w0); up(r0,w1,r1); down(r1,w0,r0); any(r0)}   8 operations/address,
// applied to the four addresses 0x0000, 0x7FFF (top of LOWER), 0x8000
// (bottom of UPPER) and 0xFFFF, so reads alternate between the two halves
// and each value passes the cascade path both ways.
//
// Interface and timing: port A of the stimulus bundle, data in bit 0.
// One-cycle `start`; one operation per clock from the next edge, 32 cycles.
// `busy` high while running, `done` high after the last operation until the
// next start. March Y and the functional-test approach follow the described
// BIST; the address set is this design's choice.
module tpg_casc
  import bist_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  output but_stim_t stim,
  output logic      busy,
  output logic      done
);

  logic [1:0] e_q;   // element
  logic [1:0] a_q;   // address step
  logic [1:0] k_q;   // operation within element

  logic [1:0]    n_ops;
  logic [1:0]    ai;         // address index after direction
  logic [AW-1:0] addr;
  logic          is_wr, val;

  always_comb begin
    n_ops = (e_q == 2'd1 || e_q == 2'd2) ? 2'd3 : 2'd1;
    ai    = (e_q == 2'd2) ? ~a_q : a_q;
    unique case (ai)
      2'd0: addr = 16'h0000;
      2'd1: addr = 16'h7FFF;
      2'd2: addr = 16'h8000;
      default: addr = 16'hFFFF;
    endcase
    // element 0: w0; 1: r0 w1 r1; 2: r1 w0 r0; 3: r0
    unique case (e_q)
      2'd0: begin is_wr = 1'b1; val = 1'b0; end
      2'd1: begin is_wr = (k_q == 2'd1); val = (k_q != 2'd0); end
      2'd2: begin is_wr = (k_q == 2'd1); val = (k_q == 2'd0); end
      default: begin is_wr = 1'b0; val = 1'b0; end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_q  <= '0;
      a_q  <= '0;
      k_q  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      stim <= '0;
    end else if (start) begin
      e_q  <= '0;
      a_q  <= '0;
      k_q  <= '0;
      busy <= 1'b1;
      done <= 1'b0;
      stim <= '0;
    end else if (busy) begin
      stim        <= '0;
      stim.en_a   <= 1'b1;
      stim.we_a   <= is_wr;
      stim.addr_a <= addr;
      stim.din_a  <= {DW{val}};
      if (k_q != n_ops - 2'd1) begin
        k_q <= k_q + 2'd1;
      end else begin
        k_q <= '0;
        a_q <= a_q + 2'd1;
        if (a_q == 2'd3) begin
          if (e_q == 2'd3) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            e_q <= e_q + 2'd1;
          end
        end
      end
    end else begin
      stim <= '0;
    end
  end

endmodule
