// tb_fft_setup: checks the configuration produced for every supported length.
// For each index: N and its exponents, the slot radices multiply to N, the number of banks is
// the largest radix, every location maps to a distinct (bank, address) pair within the bank
// depth, and each Q' constant read back from its mixed-radix digits is the modular inverse the
// index mapper needs. Also checks setup_done and the time setup takes.
module tb_fft_setup;
  import fft_pkg::*;
  logic clk = 0, rst = 1, setup_enable = 0, is_fft = 1, setup_done;
  logic [IDX_W-1:0] fft_idx = 0;
  fft_cfg_t cfg;
  int checks = 0, failures = 0;
  always #1 clk = ~clk;

  fft_setup dut (.clk, .rst, .setup_enable, .fft_idx, .is_fft, .cfg, .setup_done);

  localparam int SIZES [N_SIZES] = '{
    64, 128, 256, 512, 1024, 2048, 1536,
    12, 24, 36, 48, 60, 72, 96, 108, 120, 144, 180, 192, 216, 240, 288, 300, 324, 360,
    384, 432, 480, 540, 576, 600, 648, 720, 768, 864, 900, 960, 972, 1080, 1152, 1200, 1296};

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // value of a mapper digit vector in the radix system of group g, map fwd
  function automatic int qval(mdig_t q, int g, bit fwd);
    int v, w;
    v = 0; w = 1;
    for (int x = 0; x < NDIG; x++) if (x < GRP_LEN[g]) begin
      v += int'(q[x]) * w;
      w *= int'(cfg.radix[map_slot(g, x, fwd)]);
    end
    return v;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int id = 0; id < N_SIZES; id++) begin
      int n, p, g2, g3, g5, rm, cyc;
      bit used [5][512];
      n = SIZES[id];
      fft_idx = IDX_W'(id);
      setup_enable = 1;
      @(negedge clk);
      setup_enable = 0;
      cyc = 0;
      while (!setup_done && cyc < 20000) begin
        @(negedge clk);
        cyc++;
      end
      chk(setup_done, $sformatf("setup_done N=%0d", n));
      chk(cyc < 10000, $sformatf("setup time N=%0d: %0d", n, cyc));
      chk(int'(cfg.n) == n, $sformatf("N idx %0d", id));
      g2 = 1 << cfg.e2;
      g3 = 1; for (int i = 0; i < int'(cfg.e3); i++) g3 *= 3;
      g5 = 1; for (int i = 0; i < int'(cfg.e5); i++) g5 *= 5;
      chk(g2 * g3 * g5 == n, $sformatf("exponents N=%0d", n));
      p = 1; rm = 0;
      for (int s = 0; s < NSLOT; s++) begin
        p *= int'(cfg.radix[s]);
        if (int'(cfg.radix[s]) > rm) rm = int'(cfg.radix[s]);
      end
      chk(p == n, $sformatf("radix product N=%0d", n));
      chk(int'(cfg.rmax) == rm, $sformatf("rmax N=%0d", n));
      chk(int'(cfg.gn[0]) == g2 && int'(cfg.gn[1]) == g3 && int'(cfg.gn[2]) == g5, "group sizes");
      // every location to a distinct bank/address
      for (int b = 0; b < 5; b++) for (int a = 0; a < 512; a++) used[b][a] = 0;
      begin
        loc_t d;
        int ok;
        ok = 1;
        d = '0;
        for (int i = 0; i < n; i++) begin
          int bk, ad, c;
          bk = int'(loc_bank(d, cfg.rmax));
          ad = int'(loc_addr(d, cfg.aw));
          if (bk >= int'(cfg.rmax) || ad >= (bk == 4 ? DEPTH_LAST : DEPTH_MAIN) || used[bk][ad]) ok = 0;
          else used[bk][ad] = 1;
          // next location (mixed-radix increment over slots)
          c = 1;
          for (int s = NSLOT - 1; s >= 0; s--) if (c) begin
            if (int'(d[s]) + 1 < int'(cfg.radix[s])) begin d[s] = d[s] + 1; c = 0; end
            else d[s] = 0;
          end
        end
        chk(ok == 1, $sformatf("bank/address map N=%0d", n));
      end
      // modular inverses
      if (g2 > 1) chk((qval(cfg.q_fwd[0], 0, 1) * g3 * g5) % g2 == 1, $sformatf("Q2 fwd N=%0d", n));
      if (g3 > 1) chk((qval(cfg.q_fwd[1], 1, 1) * g5) % g3 == 1, $sformatf("Q3 fwd N=%0d", n));
      if (g3 > 1) chk((qval(cfg.q_rev[1], 1, 0) * g2) % g3 == 1, $sformatf("Q3 rev N=%0d", n));
      if (g5 > 1) chk((qval(cfg.q_rev[2], 2, 0) * g2 * g3) % g5 == 1, $sformatf("Q5 rev N=%0d", n));
      chk(cfg.dual == ((cfg.e2 % 2) == 1), $sformatf("dual N=%0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
