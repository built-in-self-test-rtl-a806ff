// bram_model: behavioural model of one 36 Kbit block RAM under test.
//
// Not synthesizable and not part of the design: the block RAM is a hard
// macro of the FPGA. This model gives the BIST testbenches something to
// test. It holds 32K data bits and 4K parity bits and implements, as
// selected by `cfg` (bist_pkg::bist_cfg_t):
//   * RAM modes (BRAM, ECC with ECC off): two ports, aspect ratios 32Kx1 ..
//     512x72, data in the low bits and parity in bits [71:64] of a bus,
//     WRITE_FIRST / READ_FIRST / NO_CHANGE, optional output register;
//   * ECC (RAM mode ECC, FIFOECC): a 72/64 SECDED code generated on write
//     when en_ecc_write, checked and corrected on read when en_ecc_read,
//     with single-bit and double-bit error flags;
//   * FIFO modes: port A writes, port B reads, FULL, EMPTY, ALMOST FULL,
//     ALMOST EMPTY (programmable offsets) and write/read error flags;
//   * CASC: as a LOWER or UPPER half of a 64K x 1 RAM; address bit 15 picks
//     the half, and a read of the LOWER half appears at the UPPER output
//     through casc_in/casc_out.
// clk_inv clocks the RAM on the falling edge. `reconf` (one cycle) models a
// new configuration: contents, pointers and outputs return to 0.
// fault_kind (input, 0 = fault-free) injects a fault: 1 = data bit
// FAULT_BIT stuck at FAULT_VAL, 2 = FULL flag stuck at 0, 3 = cascade
// output stuck at FAULT_VAL.
module bram_model
  import bist_pkg::*;
#(
  parameter int unsigned FAULT_BIT  = 0,
  parameter bit          FAULT_VAL  = 1'b0
) (
  input  logic      clk,
  input  logic      reconf,
  input  bist_cfg_t cfg,
  input  logic      upper,
  input  but_stim_t stim,
  input  logic      casc_in,
  input  logic [1:0] fault_kind,
  output but_resp_t resp,
  output logic      casc_out
);

  logic dmem [32768];
  logic pmem [4096];

  int unsigned dbits, pbits, depth;
  always_comb begin
    unique case (cfg.addr_bits)
      4'd9:  begin dbits = 64; pbits = 8; end
      4'd10: begin dbits = 32; pbits = 4; end
      4'd11: begin dbits = 16; pbits = 2; end
      4'd12: begin dbits = 8;  pbits = 1; end
      4'd13: begin dbits = 4;  pbits = 0; end
      4'd14: begin dbits = 2;  pbits = 0; end
      default: begin dbits = 1; pbits = 0; end
    endcase
    depth = 1 << cfg.addr_bits;
  end

  wire clk_ram = clk ^ cfg.clk_inv;

  // ---------------------------------------------------------------- SECDED
  // Hamming positions 1..71, check bits at powers of two, data elsewhere;
  // parity bit 7 covers the whole word.
  function automatic logic [7:0] hamming(input logic [63:0] d);
    logic [71:0] cw;
    logic [7:0]  p;
    int unsigned k;
    cw = '0; k = 0;
    for (int pos = 1; pos < 72; pos++)
      if ((pos & (pos - 1)) != 0) begin cw[pos] = d[k]; k++; end
    p = '0;
    for (int b = 0; b < 7; b++)
      for (int pos = 1; pos < 72; pos++)
        if (((pos >> b) & 1) == 1) p[b] ^= cw[pos];
    p[7] = ^d ^ ^p[6:0];
    return p;
  endfunction

  // decode: returns corrected data, sets flags
  function automatic logic [63:0] correct(input logic [63:0] d, input logic [7:0] p,
                                          output logic sbe, output logic dbe);
    logic [7:0]  syn;
    logic        ovr;
    logic [63:0] c;
    int unsigned k;
    syn = hamming(d) ^ p;
    ovr = syn[7] ^ ^syn[6:0];       // overall parity error of the stored word
    c = d; sbe = 1'b0; dbe = 1'b0;
    if (syn[6:0] != 0 && !ovr) dbe = 1'b1;
    else if (ovr) begin
      sbe = 1'b1;
      k = 0;
      for (int pos = 1; pos < 72; pos++)
        if ((pos & (pos - 1)) != 0) begin
          if (pos == int'(syn[6:0])) c[k] = ~c[k];
          k++;
        end
    end
    return c;
  endfunction

  // ---------------------------------------------------------------- word access
  function automatic logic [DW-1:0] rd_word(input int unsigned a);
    logic [DW-1:0] w;
    w = '0;
    for (int unsigned i = 0; i < dbits; i++) w[i] = dmem[(a * dbits + i) % 32768];
    for (int unsigned i = 0; i < pbits; i++) w[64 + i] = pmem[(a * pbits + i) % 4096];
    return w;
  endfunction

  task automatic wr_word(input int unsigned a, input logic [DW-1:0] w);
    for (int unsigned i = 0; i < dbits; i++) dmem[(a * dbits + i) % 32768] = w[i];
    for (int unsigned i = 0; i < pbits; i++) pmem[(a * pbits + i) % 4096] = w[64 + i];
    if (fault_kind == 1) dmem[FAULT_BIT] = FAULT_VAL;
  endtask

  function automatic logic [DW-1:0] ecc_in(input logic [DW-1:0] w);
    logic [DW-1:0] r;
    r = w;
    if (cfg.en_ecc_write) r[71:64] = hamming(w[63:0]);
    return r;
  endfunction

  // ---------------------------------------------------------------- state
  logic [DW-1:0] lat_a, lat_b, reg_a, reg_b;
  logic          sbe_q, dbe_q;
  int unsigned   wptr, rptr, count;
  logic          wrerr, rderr;
  logic          sel_upper_q;

  initial begin
    for (int i = 0; i < 32768; i++) dmem[i] = 1'b0;
    for (int i = 0; i < 4096; i++)  pmem[i] = 1'b0;
    lat_a = '0; lat_b = '0; reg_a = '0; reg_b = '0;
    sbe_q = 1'b0; dbe_q = 1'b0; wptr = 0; rptr = 0; count = 0;
    wrerr = 1'b0; rderr = 1'b0; sel_upper_q = 1'b0;
  end

  logic fifo_mode, ecc_mode;
  assign fifo_mode = (cfg.mode == MODE_FIFO || cfg.mode == MODE_FIFOECC);
  assign ecc_mode  = (cfg.mode == MODE_ECC  || cfg.mode == MODE_FIFOECC);

  always @(posedge clk_ram or posedge reconf) begin
    if (reconf) begin
      for (int i = 0; i < 32768; i++) dmem[i] = 1'b0;
      for (int i = 0; i < 4096; i++)  pmem[i] = 1'b0;
      lat_a = '0; lat_b = '0; reg_a = '0; reg_b = '0;
      sbe_q = 1'b0; dbe_q = 1'b0; wptr = 0; rptr = 0; count = 0;
      wrerr = 1'b0; rderr = 1'b0; sel_upper_q = 1'b0;
    end else begin
      logic [DW-1:0] old_a, old_b, w;
      logic          sbe, dbe;
      reg_a = lat_a;
      reg_b = lat_b;
      if (fifo_mode) begin
        logic do_wr, do_rd;
        do_wr = stim.we_a && count < depth;
        do_rd = stim.en_b && count > 0;
        wrerr = stim.we_a && !do_wr;
        rderr = stim.en_b && !do_rd;
        if (do_rd) begin
          w = rd_word(rptr);
          if (ecc_mode && cfg.en_ecc_read) begin
            w[63:0] = correct(w[63:0], w[71:64], sbe, dbe);
            sbe_q = sbe; dbe_q = dbe;
          end else begin
            sbe_q = 1'b0; dbe_q = 1'b0;
          end
          lat_a = w;
          rptr  = (rptr + 1) % depth;
        end
        if (do_wr) begin
          wr_word(wptr, ecc_mode ? ecc_in(stim.din_a) : stim.din_a);
          wptr = (wptr + 1) % depth;
        end
        count = count + (do_wr ? 1 : 0) - (do_rd ? 1 : 0);
      end else if (cfg.mode == MODE_CASC) begin
        // 32K x 1 half of a 64K x 1 RAM
        if (stim.en_a) begin
          sel_upper_q = stim.addr_a[15];
          if (stim.addr_a[15] == upper) begin
            old_a = rd_word(int'(stim.addr_a[14:0]));
            if (stim.we_a) wr_word(int'(stim.addr_a[14:0]), stim.din_a);
            lat_a = stim.we_a ? stim.din_a : old_a;
          end
        end
      end else begin
        old_a = rd_word(int'(stim.addr_a) % depth);
        old_b = rd_word(int'(stim.addr_b) % depth);
        if (stim.en_a && stim.we_a) wr_word(int'(stim.addr_a) % depth, ecc_mode ? ecc_in(stim.din_a) : stim.din_a);
        if (stim.en_b && stim.we_b) wr_word(int'(stim.addr_b) % depth, stim.din_b);
        if (stim.en_a) begin
          if (!stim.we_a) begin
            if (ecc_mode && cfg.en_ecc_read) begin
              old_a[63:0] = correct(old_a[63:0], old_a[71:64], sbe, dbe);
              sbe_q = sbe; dbe_q = dbe;
            end
            lat_a = old_a;
          end else if (cfg.write_mode == WRITE_FIRST) lat_a = rd_word(int'(stim.addr_a) % depth);
          else if (cfg.write_mode == READ_FIRST)     lat_a = old_a;
        end
        if (stim.en_b) begin
          if (!stim.we_b) lat_b = old_b;
          else if (cfg.write_mode == WRITE_FIRST) lat_b = rd_word(int'(stim.addr_b) % depth);
          else if (cfg.write_mode == READ_FIRST)  lat_b = old_b;
        end
      end
    end
  end

  logic full, empty, afull, aempty;
  always_comb begin
    full   = fifo_mode && count == depth;
    empty  = fifo_mode && count == 0;
    afull  = fifo_mode && count + int'(cfg.almost_full_offset) >= depth;
    aempty = fifo_mode && count <= int'(cfg.almost_empty_offset);
    if (fault_kind == 2) full = 1'b0;
  end

  logic lower_bit;
  always_comb begin
    resp        = '0;
    resp.dout_a = cfg.do_reg ? reg_a : lat_a;
    resp.dout_b = cfg.do_reg ? reg_b : lat_b;
    if (cfg.mode == MODE_CASC) begin
      lower_bit     = lat_a[0];
      resp.dout_a   = '0;
      resp.dout_a[0] = (upper && !sel_upper_q) ? casc_in : lower_bit;
    end else begin
      lower_bit = 1'b0;
    end
    resp.status = {full, empty, afull, aempty, wrerr, rderr, sbe_q, dbe_q};
    casc_out    = (fault_kind == 3) ? FAULT_VAL : lat_a[0];
  end

endmodule
