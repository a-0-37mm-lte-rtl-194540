// tb_io_ctrl: streaming control over seven symbols of a 60-point and a 24-point setup.
// Checks: symbols alternate between memories A and B; each memory alternates forward and
// reverse symbols (A: F, R, F...; B: F, R...); every symbol writes N distinct bank/address
// pairs; a reverse symbol writes index i exactly where the forward-output map of index i lies
// (digits reversed); calc_start pulses once per symbol for the memory just filled; outputs are
// flagged from the third symbol on, with rd_k counting 0..N-1 and rd_last on N-1.
module tb_io_ctrl;
  import fft_pkg::*;
  logic clk = 0, rst = 1, setup_enable = 0, setup_done, fft_reset = 0, fft_enable = 0;
  logic [IDX_W-1:0] fft_idx = 0;
  fft_cfg_t cfg;
  logic io_mem_b, io_we, rd_valid, rd_last, calc_start, calc_mem_b, calc_fwd;
  logic [2:0] io_bank;
  logic [ADDR_W-1:0] io_addr;
  logic [K_W-1:0] rd_k;
  int checks = 0, failures = 0, starts = 0;
  always #1 clk = ~clk;

  fft_setup u_setup (.clk, .rst, .setup_enable, .fft_idx, .is_fft(1'b1), .cfg, .setup_done);
  io_ctrl dut (.clk, .rst, .cfg, .fft_reset, .fft_enable, .calc_busy(1'b0), .io_mem_b, .io_we,
    .io_bank, .io_addr, .rd_valid, .rd_k, .rd_last, .calc_start, .calc_mem_b, .calc_fwd);

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // location of index i in the forward-output map, computed independently
  function automatic void out_loc(int i, output int bk, output int ad);
    int g [3], c [3];
    loc_t d;
    for (int y = 0; y < 3; y++) g[y] = int'(cfg.gn[y]);
    c[0] = 1;
    c[1] = 0; for (int q = 0; q < g[1]; q++) if ((q * g[0]) % g[1] == 1 % g[1]) begin c[1] = q; break; end
    c[2] = 0; for (int q = 0; q < g[2]; q++) if ((q * g[0] * g[1]) % g[2] == 1 % g[2]) begin c[2] = q; break; end
    d = '0;
    for (int y = 0; y < 3; y++) begin
      int v;
      v = (c[y] * i) % g[y];
      for (int s = GRP_BASE[y]; s < GRP_BASE[y] + GRP_LEN[y]; s++) begin
        d[s] = 3'(v % int'(cfg.radix[s]));
        v = v / int'(cfg.radix[s]);
      end
    end
    bk = int'(loc_bank(d, cfg.rmax));
    ad = int'(loc_addr(d, cfg.aw));
  endfunction

  always @(posedge clk) if (calc_start) starts++;

  task automatic run(int id);
    int n, st0, rdk;
    bit fwd_exp [2];
    fft_idx = IDX_W'(id);
    setup_enable = 1;
    @(negedge clk);
    setup_enable = 0;
    wait (setup_done);
    @(negedge clk);
    fft_reset = 1;
    @(negedge clk);
    fft_reset = 0;
    n = int'(cfg.n);
    fwd_exp[0] = 1; fwd_exp[1] = 1;
    rdk = 0;
    for (int s = 0; s < 7; s++) begin
      bit used [5][512];
      for (int b = 0; b < 5; b++) for (int a = 0; a < 512; a++) used[b][a] = 0;
      st0 = starts;
      for (int i = 0; i < n; i++) begin
        fft_enable = 1;
        #0.5;
        chk(io_we && io_mem_b == s[0], "memory alternation");
        chk(!used[io_bank][io_addr], "distinct locations");
        used[io_bank][io_addr] = 1;
        if (!fwd_exp[s % 2]) begin
          int bk, ad;
          out_loc(i, bk, ad);
          chk(bk == int'(io_bank) && ad == int'(io_addr), $sformatf("reverse location N=%0d i=%0d", n, i));
        end
        @(negedge clk);
        fft_enable = 0;
        chk(rd_valid == (s >= 2), "output valid");
        if (rd_valid) begin
          chk(int'(rd_k) == i && rd_last == (i == n - 1), "k");
        end
        @(negedge clk);
      end
      chk(starts == st0 + 1, "one calc_start per symbol");
      chk(calc_mem_b == s[0] && calc_fwd == fwd_exp[s % 2], $sformatf("calc request symbol %0d", s));
      fwd_exp[s % 2] = !fwd_exp[s % 2];
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run(11);   // 60
    run(8);    // 24
    run(40);   // 1200
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
