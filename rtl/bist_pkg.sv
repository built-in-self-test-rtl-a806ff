// bist_pkg: types and tables shared by the block RAM BIST.
//
// The BIST tests 36 Kbit block RAMs (the blocks under test, BUTs) by having
// two identical test pattern generators (TPGs) drive alternate RAMs of a
// column and comparing neighbouring RAMs with comparison ORAs. This package
// holds:
//   * but_stim_t  - the stimulus bundle a TPG drives into one BUT (two ports;
//                   in FIFO modes port A is the write side, port B the read side),
//   * but_resp_t  - everything a BUT drives out and that the ORAs compare,
//   * bist_cfg_t  - the RAM-mode settings of one BIST configuration,
//   * cfg_lookup  - the 19 BIST configurations (RAM mode, test algorithm,
//                   address space, data width),
//   * march_elem  - the march element tables of the RAM test algorithms.
// The configuration list, the aspect ratios (address bits 9..15 for data
// widths 72..1), the almost-flag values 0xAAAA/0x5555 (13 bits used) and the
// two clock-inverted configurations follow the description of the BIST.
// The element sequences of the march tests, the write mode and output
// register chosen per configuration and the bundle layouts are this
// design's own choices.
package bist_pkg;

  // Widest total data bus (512 x 72: 64 data + 8 parity bits).
  localparam int unsigned DW = 72;
  // Address bits including the cascade MSB (64K x 1).
  localparam int unsigned AW = 16;
  // Status flags a BUT drives out.
  localparam int unsigned SW = 8;
  // Number of BIST configurations.
  localparam int unsigned N_CFG = 19;

  typedef enum logic [2:0] {
    MODE_BRAM, MODE_ECC, MODE_FIFO, MODE_FIFOECC, MODE_CASC
  } ram_mode_e;

  typedef enum logic [3:0] {
    ALG_NONE, ALG_MARCH_S2PF, ALG_MARCH_D2PF, ALG_MATS_PLUS, ALG_MARCH_LR_BDS,
    ALG_ECC_READ, ALG_ECC_WRITE, ALG_FIFO_MARCH_X, ALG_MARCH_Y
  } alg_e;

  typedef enum logic [1:0] {WRITE_FIRST, READ_FIRST, NO_CHANGE} write_mode_e;

  // Stimulus into one BUT. RAM modes: two independent ports.
  // FIFO modes: we_a = write enable, din_a = write data, en_b = read enable.
  // Bits [63:0] of a data bus are data, [71:64] parity / Hamming bits.
  typedef struct packed {
    logic          en_a;
    logic          we_a;
    logic [AW-1:0] addr_a;
    logic [DW-1:0] din_a;
    logic          en_b;
    logic          we_b;
    logic [AW-1:0] addr_b;
    logic [DW-1:0] din_b;
  } but_stim_t;

  // Response of one BUT: both data output buses and the status flags.
  typedef struct packed {
    logic [DW-1:0] dout_a;
    logic [DW-1:0] dout_b;
    logic [SW-1:0] status;   // {full, empty, almost_full, almost_empty,
                             //  wrerr, rderr, sbiterr, dbiterr}
  } but_resp_t;

  localparam int unsigned RESP_W = $bits(but_resp_t);

  // RAM-mode settings of one BIST configuration (applied to every BUT).
  typedef struct packed {
    ram_mode_e   mode;
    alg_e        alg;
    logic [3:0]  addr_bits;        // 9 (512 deep) .. 15 (32K deep)
    logic [6:0]  data_width;       // total data bus width incl. parity
    write_mode_e write_mode;
    logic        do_reg;           // optional output data register
    logic        en_ecc_read;
    logic        en_ecc_write;
    logic        clk_inv;          // RAM clocked on the opposite edge
    logic [12:0] almost_full_offset;
    logic [12:0] almost_empty_offset;
    logic        casc_swap;        // CASC: 0 = even RAMs LOWER, 1 = even RAMs UPPER
    logic        compressed;       // (C) full/compressed download, else partial
  } bist_cfg_t;

  localparam bist_cfg_t CFG_IDLE = '{
    mode: MODE_BRAM, alg: ALG_NONE, addr_bits: 4'd10, data_width: 7'd36,
    write_mode: WRITE_FIRST, do_reg: 1'b0, en_ecc_read: 1'b0, en_ecc_write: 1'b0,
    clk_inv: 1'b0, almost_full_offset: 13'h0080, almost_empty_offset: 13'h0080,
    casc_swap: 1'b0, compressed: 1'b0};

  // Total data width for an address width (aspect ratios of the RAM).
  function automatic logic [6:0] width_for(input logic [3:0] addr_bits);
    case (addr_bits)
      4'd9:    return 7'd72;
      4'd10:   return 7'd36;
      4'd11:   return 7'd18;
      4'd12:   return 7'd9;
      4'd13:   return 7'd4;
      4'd14:   return 7'd2;
      default: return 7'd1;
    endcase
  endfunction

  // Number of background patterns beyond the solid one: ceil(log2(width)).
  function automatic logic [2:0] bds_count(input logic [3:0] addr_bits);
    case (addr_bits)
      4'd9:    return 3'd7;
      4'd10:   return 3'd6;
      4'd11:   return 3'd5;
      4'd12:   return 3'd4;
      4'd13:   return 3'd2;
      4'd14:   return 3'd1;
      default: return 3'd0;
    endcase
  endfunction

  // The 19 BIST configurations, numbered 1..19. Any other number gives CFG_IDLE.
  function automatic bist_cfg_t cfg_lookup(input logic [4:0] n);
    bist_cfg_t c;
    c = CFG_IDLE;
    case (n)
      5'd1:  begin c.alg = ALG_MARCH_S2PF; c.addr_bits = 4'd10; c.compressed = 1'b1; end
      5'd2:  begin c.alg = ALG_MARCH_D2PF; c.addr_bits = 4'd10; c.write_mode = READ_FIRST; end
      5'd3:  begin c.alg = ALG_MATS_PLUS;  c.addr_bits = 4'd11; c.write_mode = NO_CHANGE; end
      5'd4:  begin c.alg = ALG_MATS_PLUS;  c.addr_bits = 4'd12; c.do_reg = 1'b1; end
      5'd5:  begin c.alg = ALG_MATS_PLUS;  c.addr_bits = 4'd13; c.write_mode = READ_FIRST; c.do_reg = 1'b1; end
      5'd6:  begin c.alg = ALG_MATS_PLUS;  c.addr_bits = 4'd14; c.write_mode = NO_CHANGE;  c.do_reg = 1'b1; end
      5'd7:  begin c.alg = ALG_MATS_PLUS;  c.addr_bits = 4'd15; end
      5'd8:  begin c.mode = MODE_ECC; c.alg = ALG_MARCH_LR_BDS; c.addr_bits = 4'd9; c.compressed = 1'b1; end
      5'd9:  begin c.mode = MODE_ECC; c.alg = ALG_ECC_READ;  c.addr_bits = 4'd9; c.en_ecc_read = 1'b1; end
      5'd10: begin c.mode = MODE_ECC; c.alg = ALG_ECC_WRITE; c.addr_bits = 4'd9; c.en_ecc_write = 1'b1;
                   c.clk_inv = 1'b1; end
      5'd11: begin c.mode = MODE_FIFO; c.alg = ALG_FIFO_MARCH_X; c.addr_bits = 4'd10; c.clk_inv = 1'b1;
                   c.compressed = 1'b1; end
      5'd12: begin c.mode = MODE_FIFO; c.alg = ALG_FIFO_MARCH_X; c.addr_bits = 4'd11; end
      5'd13: begin c.mode = MODE_FIFO; c.alg = ALG_FIFO_MARCH_X; c.addr_bits = 4'd12; end
      5'd14: begin c.mode = MODE_FIFO; c.alg = ALG_FIFO_MARCH_X; c.addr_bits = 4'd13;
                   c.almost_full_offset = 13'h0AAA; c.almost_empty_offset = 13'h1555; end
      5'd15: begin c.mode = MODE_FIFO; c.alg = ALG_FIFO_MARCH_X; c.addr_bits = 4'd13;
                   c.almost_full_offset = 13'h1555; c.almost_empty_offset = 13'h0AAA; end
      5'd16: begin c.mode = MODE_FIFOECC; c.alg = ALG_ECC_READ;  c.addr_bits = 4'd9; c.en_ecc_read = 1'b1;
                   c.compressed = 1'b1; end
      5'd17: begin c.mode = MODE_FIFOECC; c.alg = ALG_ECC_WRITE; c.addr_bits = 4'd9; c.en_ecc_write = 1'b1; end
      5'd18: begin c.mode = MODE_CASC; c.alg = ALG_MARCH_Y; c.addr_bits = 4'd15; c.compressed = 1'b1; end
      5'd19: begin c.mode = MODE_CASC; c.alg = ALG_MARCH_Y; c.addr_bits = 4'd15; c.casc_swap = 1'b1; end
      default: c.alg = ALG_NONE;
    endcase
    c.data_width = width_for(c.addr_bits);
    return c;
  endfunction

  // ---------------------------------------------------------------- march tables
  typedef enum logic [1:0] {OP_NONE, OP_R, OP_W} op_kind_e;
  typedef enum logic [1:0] {DIR_UP, DIR_DOWN, DIR_ANY} dir_e;
  typedef enum logic [1:0] {OFF_SAME, OFF_NEXT, OFF_PREV} addr_off_e;

  // One operation slot: what port A and port B do in the same clock cycle.
  typedef struct packed {
    op_kind_e  a_kind;
    logic      a_val;    // 0: background, 1: inverted background
    op_kind_e  b_kind;
    logic      b_val;
    addr_off_e b_off;    // port B address relative to port A
  } march_op_t;

  localparam int unsigned MAX_OPS = 6;

  typedef struct packed {
    dir_e                      dir;
    logic [2:0]                n_ops;
    logic                      bds;   // repeated once per background pattern
    march_op_t [MAX_OPS-1:0]   ops;   // ops[0] first
  } march_elem_t;

  localparam march_op_t NOP = '{a_kind: OP_NONE, a_val: 1'b0, b_kind: OP_NONE, b_val: 1'b0, b_off: OFF_SAME};

  function automatic march_op_t opa(input op_kind_e k, input logic v);
    march_op_t o;
    o = NOP;
    o.a_kind = k;
    o.a_val  = v;
    return o;
  endfunction

  function automatic march_op_t op2(input op_kind_e ka, input logic va,
                                    input op_kind_e kb, input logic vb, input addr_off_e off);
    march_op_t o;
    o.a_kind = ka; o.a_val = va; o.b_kind = kb; o.b_val = vb; o.b_off = off;
    return o;
  endfunction

  function automatic march_elem_t elem(input dir_e d, input logic [2:0] n, input logic bds,
                                       input march_op_t o0, input march_op_t o1 = NOP,
                                       input march_op_t o2 = NOP, input march_op_t o3 = NOP,
                                       input march_op_t o4 = NOP, input march_op_t o5 = NOP);
    march_elem_t e;
    e.dir = d; e.n_ops = n; e.bds = bds;
    e.ops[0] = o0; e.ops[1] = o1; e.ops[2] = o2;
    e.ops[3] = o3; e.ops[4] = o4; e.ops[5] = o5;
    return e;
  endfunction

  // Number of march elements of an algorithm.
  function automatic logic [3:0] march_len(input alg_e a);
    case (a)
      ALG_MATS_PLUS:    return 4'd3;
      ALG_MARCH_LR_BDS: return 4'd7;
      ALG_MARCH_S2PF:   return 4'd6;
      ALG_MARCH_D2PF:   return 4'd3;
      default:          return 4'd0;
    endcase
  endfunction

  // Element i of an algorithm.
  //   MATS+      : {any(w0); up(r0,w1); down(r1,w0)}                     5N
  //   March LR   : {any(w0); down(r0,w1); up(r1,w0,r0,r0,w1); up(r1,w0);
  //                 up(r0,w1,r1,r1,w0); up(r0)}                           16N
  //     with BDS : then any(w0,r0,w1,r1) once per background              +4N each
  //   March s2pf-: two-port, port B reads the cell port A works on        14N
  //   March d2pf : two-port, port B reads a neighbouring cell             9N
  function automatic march_elem_t march_elem(input alg_e a, input logic [3:0] i);
    march_elem_t e;
    e = elem(DIR_ANY, 3'd0, 1'b0, NOP);
    case (a)
      ALG_MATS_PLUS: case (i)
        4'd0: e = elem(DIR_ANY,  3'd1, 1'b0, opa(OP_W, 0));
        4'd1: e = elem(DIR_UP,   3'd2, 1'b0, opa(OP_R, 0), opa(OP_W, 1));
        4'd2: e = elem(DIR_DOWN, 3'd2, 1'b0, opa(OP_R, 1), opa(OP_W, 0));
        default: ;
      endcase
      ALG_MARCH_LR_BDS: case (i)
        4'd0: e = elem(DIR_ANY,  3'd1, 1'b0, opa(OP_W, 0));
        4'd1: e = elem(DIR_DOWN, 3'd2, 1'b0, opa(OP_R, 0), opa(OP_W, 1));
        4'd2: e = elem(DIR_UP,   3'd5, 1'b0, opa(OP_R, 1), opa(OP_W, 0), opa(OP_R, 0),
                       opa(OP_R, 0), opa(OP_W, 1));
        4'd3: e = elem(DIR_UP,   3'd2, 1'b0, opa(OP_R, 1), opa(OP_W, 0));
        4'd4: e = elem(DIR_UP,   3'd5, 1'b0, opa(OP_R, 0), opa(OP_W, 1), opa(OP_R, 1),
                       opa(OP_R, 1), opa(OP_W, 0));
        4'd5: e = elem(DIR_UP,   3'd1, 1'b0, opa(OP_R, 0));
        4'd6: e = elem(DIR_ANY,  3'd4, 1'b1, opa(OP_W, 0), opa(OP_R, 0), opa(OP_W, 1),
                       opa(OP_R, 1));
        default: ;
      endcase
      ALG_MARCH_S2PF: case (i)
        4'd0: e = elem(DIR_ANY,  3'd1, 1'b0, opa(OP_W, 0));
        4'd1: e = elem(DIR_UP,   3'd3, 1'b0, op2(OP_R, 0, OP_R, 0, OFF_SAME),
                       op2(OP_W, 1, OP_R, 0, OFF_SAME), op2(OP_R, 1, OP_R, 1, OFF_SAME));
        4'd2: e = elem(DIR_UP,   3'd3, 1'b0, op2(OP_R, 1, OP_R, 1, OFF_SAME),
                       op2(OP_W, 0, OP_R, 1, OFF_SAME), op2(OP_R, 0, OP_R, 0, OFF_SAME));
        4'd3: e = elem(DIR_DOWN, 3'd3, 1'b0, op2(OP_R, 0, OP_R, 0, OFF_SAME),
                       op2(OP_W, 1, OP_R, 0, OFF_SAME), op2(OP_R, 1, OP_R, 1, OFF_SAME));
        4'd4: e = elem(DIR_DOWN, 3'd3, 1'b0, op2(OP_R, 1, OP_R, 1, OFF_SAME),
                       op2(OP_W, 0, OP_R, 1, OFF_SAME), op2(OP_R, 0, OP_R, 0, OFF_SAME));
        4'd5: e = elem(DIR_ANY,  3'd1, 1'b0, op2(OP_R, 0, OP_R, 0, OFF_SAME));
        default: ;
      endcase
      ALG_MARCH_D2PF: case (i)
        4'd0: e = elem(DIR_ANY,  3'd1, 1'b0, opa(OP_W, 0));
        4'd1: e = elem(DIR_UP,   3'd4, 1'b0, op2(OP_W, 1, OP_R, 0, OFF_NEXT),
                       op2(OP_R, 1, OP_R, 1, OFF_PREV), op2(OP_W, 0, OP_R, 0, OFF_NEXT),
                       op2(OP_R, 0, OP_R, 0, OFF_PREV));
        4'd2: e = elem(DIR_DOWN, 3'd4, 1'b0, op2(OP_W, 1, OP_R, 0, OFF_PREV),
                       op2(OP_R, 1, OP_R, 0, OFF_NEXT), op2(OP_W, 0, OP_R, 1, OFF_NEXT),
                       op2(OP_R, 0, OP_R, 0, OFF_PREV));
        default: ;
      endcase
      default: ;
    endcase
    return e;
  endfunction

  // Background pattern k of a word: 0 is solid 0s, k >= 1 sets bit j to bit (k-1) of j.
  function automatic logic [DW-1:0] background(input logic [2:0] k);
    logic [DW-1:0] b;
    for (int j = 0; j < DW; j++) begin
      b[j] = (k == 3'd0) ? 1'b0 : (((j >> (k - 1)) & 1) == 1);
    end
    return b;
  endfunction

  // Test clock cycles of each configuration as budgeted for the original
  // implementation (reference figures, 1..19; index 0 unused).
  localparam int unsigned REF_CYCLES [0:N_CFG] = '{0,
    20000, 15000, 25000, 45000, 85000, 165000, 330000,
    23000, 7000, 7000,
    8500, 34000, 66000, 131500, 131500,
    10000, 10000,
    36, 36};

endpackage
