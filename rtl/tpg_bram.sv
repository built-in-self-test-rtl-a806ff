// tpg_bram: test pattern generator for the block RAM (single- and dual-port)
// configurations.
//
// A finite state machine that steps through the march elements of the
// selected algorithm (MATS+, March LR with background data sequences,
// March s2pf- or March d2pf, tables in bist_pkg) and issues one operation
// slot per clock: port A and port B each read, write or idle. For every
// element it walks all 2**addr_bits addresses up or down and, at each
// address, every operation of the element. Write data is the background
// pattern (value 0) or its inverse (value 1), replicated over the 72-bit bus;
// the RAM under test keeps only as many low bits as its data width. An
// element marked `bds` is repeated once for each background pattern
// 1..bds_count(addr_bits) (alternating bits, pairs, nibbles ...), which turns
// the bit-oriented March LR into a word-oriented test.
//
// No expected data is generated: the ORAs compare identical RAMs with each
// other, so the TPG only has to apply the same stimulus to all of them.
//
// Interface and timing: a one-cycle `start` latches `alg` and `addr_bits`;
// the first slot appears on `stim` at the next rising edge and one slot
// follows per clock, so a run of an algorithm with k operations per address
// lasts k*N cycles (MATS+ 5N, March LR 16N + 4N per background, s2pf- 14N,
// d2pf 9N). `busy` is high while slots are issued; `done` rises with the
// clock after the last slot and stays high until the next start.
// The algorithms named and the use of BDS only with March LR follow the
// described BIST; the element sequences and the slot timing are this
// design's choice.
module tpg_bram
  import bist_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  alg_e       alg,
  input  logic [3:0] addr_bits,
  output but_stim_t  stim,
  output logic       busy,
  output logic       done
);

  alg_e          alg_q;
  logic [AW-1:0] last_q;      // highest address
  logic [2:0]    nbg_q;       // background patterns to repeat BDS elements over
  logic [3:0]    e_q;         // element index
  logic [2:0]    k_q;         // operation index within the element
  logic [AW-1:0] i_q;         // address step within the element
  logic [2:0]    bg_q;        // current background pattern

  march_elem_t   el;
  march_op_t     op;
  logic [AW-1:0] addr, addr_b;
  logic [DW-1:0] bg;
  logic          last_op, last_addr, last_bg, last_el;

  always_comb begin
    el        = march_elem(alg_q, e_q);
    op        = el.ops[k_q];
    addr      = (el.dir == DIR_DOWN) ? (last_q - i_q) : i_q;
    unique case (op.b_off)
      OFF_NEXT: addr_b = (addr + 1'b1) & last_q;
      OFF_PREV: addr_b = (addr - 1'b1) & last_q;
      default:  addr_b = addr;
    endcase
    bg        = background(bg_q);
    last_op   = (k_q == el.n_ops - 3'd1);
    last_addr = (i_q == last_q);
    last_bg   = !el.bds || (bg_q >= nbg_q);
    last_el   = (e_q == march_len(alg_q) - 4'd1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alg_q  <= ALG_NONE;
      last_q <= '0;
      nbg_q  <= '0;
      e_q    <= '0;
      k_q    <= '0;
      i_q    <= '0;
      bg_q   <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      stim   <= '0;
    end else if (start) begin
      alg_q  <= alg;
      last_q <= AW'((17'd1 << addr_bits) - 17'd1);
      nbg_q  <= bds_count(addr_bits);
      e_q    <= '0;
      k_q    <= '0;
      i_q    <= '0;
      bg_q   <= '0;
      busy   <= (march_len(alg) != 4'd0);
      done   <= (march_len(alg) == 4'd0);
      stim   <= '0;
    end else if (busy) begin
      // issue the current slot
      stim.en_a   <= (op.a_kind != OP_NONE);
      stim.we_a   <= (op.a_kind == OP_W);
      stim.addr_a <= addr;
      stim.din_a  <= {DW{op.a_val}} ^ bg;
      stim.en_b   <= (op.b_kind != OP_NONE);
      stim.we_b   <= (op.b_kind == OP_W);
      stim.addr_b <= addr_b;
      stim.din_b  <= {DW{op.b_val}} ^ bg;
      // advance: operation, then address, then background, then element
      if (!last_op) begin
        k_q <= k_q + 3'd1;
      end else begin
        k_q <= '0;
        if (!last_addr) begin
          i_q <= i_q + 1'b1;
        end else begin
          i_q <= '0;
          if (!last_bg) begin
            bg_q <= bg_q + 3'd1;
          end else if (!last_el) begin
            e_q  <= e_q + 4'd1;
            // the first pass of a BDS element uses background 1
            bg_q <= march_elem(alg_q, e_q + 4'd1).bds ? 3'd1 : 3'd0;
          end else begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end else begin
      stim <= '0;
    end
  end

endmodule
