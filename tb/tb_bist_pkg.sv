// tb_bist_pkg: self-checking test of the shared configuration tables.
// Checks the 19 configurations (RAM mode, algorithm, address bits, data
// width) against the configuration list written out independently here,
// the clock-inverted and almost-flag settings, the aspect ratios, the
// background patterns and the operations per address of each march test.
module tb_bist_pkg;
  import bist_pkg::*;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  typedef struct { ram_mode_e m; alg_e a; int ab; int w; } row_t;
  row_t tab [1:19] = '{
    '{MODE_BRAM, ALG_MARCH_S2PF, 10, 36}, '{MODE_BRAM, ALG_MARCH_D2PF, 10, 36},
    '{MODE_BRAM, ALG_MATS_PLUS, 11, 18},  '{MODE_BRAM, ALG_MATS_PLUS, 12, 9},
    '{MODE_BRAM, ALG_MATS_PLUS, 13, 4},   '{MODE_BRAM, ALG_MATS_PLUS, 14, 2},
    '{MODE_BRAM, ALG_MATS_PLUS, 15, 1},   '{MODE_ECC, ALG_MARCH_LR_BDS, 9, 72},
    '{MODE_ECC, ALG_ECC_READ, 9, 72},     '{MODE_ECC, ALG_ECC_WRITE, 9, 72},
    '{MODE_FIFO, ALG_FIFO_MARCH_X, 10, 36}, '{MODE_FIFO, ALG_FIFO_MARCH_X, 11, 18},
    '{MODE_FIFO, ALG_FIFO_MARCH_X, 12, 9},  '{MODE_FIFO, ALG_FIFO_MARCH_X, 13, 4},
    '{MODE_FIFO, ALG_FIFO_MARCH_X, 13, 4},  '{MODE_FIFOECC, ALG_ECC_READ, 9, 72},
    '{MODE_FIFOECC, ALG_ECC_WRITE, 9, 72},  '{MODE_CASC, ALG_MARCH_Y, 15, 1},
    '{MODE_CASC, ALG_MARCH_Y, 15, 1}};

  function automatic int ops_per_addr(input alg_e a, input int nbg);
    int s = 0;
    for (int e = 0; e < int'(march_len(a)); e++) begin
      march_elem_t el;
      el = march_elem(a, 4'(e));
      s += el.bds ? int'(el.n_ops) * nbg : int'(el.n_ops);
    end
    return s;
  endfunction

  initial begin
    for (int n = 1; n <= 19; n++) begin
      bist_cfg_t c;
      c = cfg_lookup(5'(n));
      chk(c.mode == tab[n].m && c.alg == tab[n].a && int'(c.addr_bits) == tab[n].ab &&
          int'(c.data_width) == tab[n].w, $sformatf("config %0d row", n));
      chk(c.clk_inv == (n == 10 || n == 11), $sformatf("config %0d clock inversion", n));
      chk(c.compressed == (n inside {1, 8, 11, 16, 18}), $sformatf("config %0d compressed", n));
    end
    chk(cfg_lookup(5'd14).almost_full_offset == 13'h0AAA && cfg_lookup(5'd15).almost_full_offset == 13'h1555,
        "almost full offsets alternate");
    chk(cfg_lookup(5'd14).almost_empty_offset == 13'h1555 && cfg_lookup(5'd15).almost_empty_offset == 13'h0AAA,
        "almost empty offsets alternate");
    chk(cfg_lookup(5'd19).casc_swap && !cfg_lookup(5'd18).casc_swap, "cascade roles swap");
    chk(cfg_lookup(5'd0).alg == ALG_NONE && cfg_lookup(5'd20).alg == ALG_NONE, "out-of-range configurations idle");
    // 36 Kbit: address bits + log2(data bits) = 15 for every aspect ratio
    for (int ab = 9; ab <= 15; ab++) begin
      int w, d;
      w = int'(width_for(4'(ab)));
      d = (w >= 9) ? w / 9 * 8 : w;
      chk(d * (1 << ab) == 32768, $sformatf("aspect ratio %0d", ab));
    end
    chk(background(3'd0) == '0, "solid background");
    chk(background(3'd1) == {36{2'b10}}, "checkerboard background");
    chk(background(3'd2) == {18{4'b1100}}, "pair background");
    chk(background(3'd7)[63:0] == 64'h0 && background(3'd7)[71:64] == 8'hFF, "background 7");
    chk(ops_per_addr(ALG_MATS_PLUS, 0) == 5, "MATS+ is 5N");
    chk(ops_per_addr(ALG_MARCH_LR_BDS, 0) == 16, "March LR is 16N without BDS");
    chk(ops_per_addr(ALG_MARCH_LR_BDS, 7) == 44, "March LR with 7 backgrounds is 44N");
    chk(ops_per_addr(ALG_MARCH_S2PF, 0) == 14, "March s2pf- is 14N");
    chk(ops_per_addr(ALG_MARCH_D2PF, 0) == 9, "March d2pf is 9N");
    chk(bds_count(4'd9) == 3'd7 && bds_count(4'd10) == 3'd6, "background counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
