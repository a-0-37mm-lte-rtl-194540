// tb_index_mapper: checks the IO index map for several lengths in both maps.
// Reference: sample i belongs at group values n_y = c_y * i mod N_y, with c_y the inverse of the
// product of the inner groups (forward map: order 2^n, 3^m, 5^k outer to inner; forward-output
// map: 5^k, 3^m, 2^n). The group values are read back from the location digits (natural digit
// order for the forward map, reversed for the other), together with the bank and address
// rules and the 'last' flag at i = N-1. The configuration comes from fft_setup.
module tb_index_mapper;
  import fft_pkg::*;
  logic clk = 0, rst = 1, setup_enable = 0, setup_done, clear = 0, step = 0, fwd = 1, last;
  logic [IDX_W-1:0] fft_idx = 0;
  fft_cfg_t cfg;
  loc_t loc;
  logic [2:0] bank;
  logic [ADDR_W-1:0] addr;
  int checks = 0, failures = 0;
  always #1 clk = ~clk;

  fft_setup u_setup (.clk, .rst, .setup_enable, .fft_idx, .is_fft(1'b1), .cfg, .setup_done);
  index_mapper dut (.clk, .rst, .clear, .step, .fwd, .cfg, .loc, .bank, .addr, .last);

  function automatic int inv(int a, int m);
    if (m == 1) return 0;
    for (int q = 0; q < m; q++) if ((q * a) % m == 1) return q;
    return -1;
  endfunction

  task automatic run(int id, bit f);
    int g[3], c[3], n;
    fft_idx = IDX_W'(id);
    setup_enable = 1;
    @(negedge clk);
    setup_enable = 0;
    wait (setup_done);
    @(negedge clk);
    fwd = f;
    clear = 1;
    @(negedge clk);
    clear = 0;
    for (int y = 0; y < 3; y++) g[y] = int'(cfg.gn[y]);
    n = g[0] * g[1] * g[2];
    if (f) begin c[0] = inv(g[1] * g[2], g[0]); c[1] = inv(g[2], g[1]); c[2] = 1; end
    else   begin c[2] = inv(g[0] * g[1], g[2]); c[1] = inv(g[0], g[1]); c[0] = 1; end
    for (int i = 0; i < n; i++) begin
      for (int y = 0; y < 3; y++) begin
        int v, w, expv;
        v = 0;
        w = 1;
        if (f) begin
          for (int s = GRP_BASE[y] + GRP_LEN[y] - 1; s >= GRP_BASE[y]; s--) begin
            v += int'(loc[s]) * w; w *= int'(cfg.radix[s]);
          end
        end else begin
          for (int s = GRP_BASE[y]; s < GRP_BASE[y] + GRP_LEN[y]; s++) begin
            v += int'(loc[s]) * w; w *= int'(cfg.radix[s]);
          end
        end
        expv = int'((longint'(c[y]) * i) % g[y]);
        checks++;
        if (v != expv) begin
          failures++;
          if (failures < 10) $display("FAIL N=%0d fwd=%0d i=%0d group %0d: %0d, expected %0d", n, f, i, y, v, expv);
        end
      end
      checks++;
      if (bank != loc_bank(loc, cfg.rmax) || addr != loc_addr(loc, cfg.aw) || last != (i == n - 1))
        failures++;
      step = 1;
      @(negedge clk);
      step = 0;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    foreach (run_ids[q]) begin
      run(run_ids[q], 1);
      run(run_ids[q], 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 12, 60, 120, 300, 1200, 2048
  int run_ids [6] = '{7, 11, 15, 22, 40, 5};

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
