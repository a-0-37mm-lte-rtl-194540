// tb_fft_all_sizes: runs every one of the 42 supported lengths (Wi-Fi 64..512, LTE 128..2048 and
// 1536, LTE SC-FDMA 12..1296) through the FFT engine, as forward and as inverse transforms.
// Five symbols of random data per length, one sample every two cycles; the outputs of the first
// three symbols are compared with a double-precision DFT, and each calculation must end within
// 2N cycles, the budget that lets the engine stream continuously at half the clock rate.
module tb_fft_all_sizes;
  import fft_pkg::*;

  logic clk = 0, rst = 1;
  always #1 clk = ~clk;

  logic setup_enable = 0, is_fft = 1, setup_done;
  logic [IDX_W-1:0] fft_idx = '0;
  logic fft_reset = 0, fft_enable = 0;
  cplx_t data_in, data_out;
  logic out_valid, k_last, calc_busy, calc_stall;
  logic [K_W-1:0] k;

  fft_engine dut (.clk, .rst, .setup_enable, .fft_idx, .is_fft, .setup_done, .fft_reset,
                  .fft_enable, .data_in, .out_valid, .data_out, .k, .k_last, .calc_busy,
                  .calc_stall);

  int checks = 0, failures = 0;
  localparam int SIZES [N_SIZES] = '{
    64, 128, 256, 512, 1024, 2048, 1536,
    12, 24, 36, 48, 60, 72, 96, 108, 120, 144, 180, 192, 216, 240, 288, 300, 324, 360,
    384, 432, 480, 540, 576, 600, 648, 720, 768, 864, 900, 960, 972, 1080, 1152, 1200, 1296};

  real in_re [5][2048];
  real in_im [5][2048];
  int  busy_cycles, max_busy, stall_seen, out_seen;
  real maxerr;
  int  cur_n;

  always @(posedge clk) begin
    if (calc_busy) busy_cycles++;
    if (calc_stall) stall_seen++;
  end

  // measure each calculation's length
  int run_len;
  always @(posedge clk) begin
    if (calc_busy) run_len++;
    else if (run_len != 0) begin
      if (run_len > max_busy) max_busy = run_len;
      run_len = 0;
    end
  end

  task automatic check_output(int sym, int kk, cplx_t got, int n, bit fwd_fft, int shift);
    real er, ei, ang, tol, d;
    er = 0.0; ei = 0.0;
    for (int i = 0; i < n; i++) begin
      ang = (fwd_fft ? -2.0 : 2.0) * 3.14159265358979323846 * real'((longint'(i) * kk) % n) / real'(n);
      er += in_re[sym][i] * $cos(ang) - in_im[sym][i] * $sin(ang);
      ei += in_re[sym][i] * $sin(ang) + in_im[sym][i] * $cos(ang);
    end
    er = er / real'(1 << shift);
    ei = ei / real'(1 << shift);
    tol = 4.0 + 4.0 * $sqrt(real'(n)) / real'(1 << shift);
    d = (real'(got.re) - er) * (real'(got.re) - er) + (real'(got.im) - ei) * (real'(got.im) - ei);
    d = $sqrt(d);
    if (d > maxerr) maxerr = d;
    checks++;
    if (d > tol) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH N=%0d sym=%0d k=%0d got=(%0d,%0d) exp=(%0.1f,%0.1f)", n, sym, kk,
                 got.re, got.im, er, ei);
    end
  endtask

  task automatic run_size(int idx, bit fwd_fft, int expect_cycles);
    int n, shift, osym, ok;
    n = SIZES[idx];
    cur_n = n;
    shift = 0;
    for (int b = 0; b < 12; b++) if (n >> b != 0) shift = b / 2;
    @(negedge clk);
    fft_idx = IDX_W'(idx);
    is_fft = fwd_fft;
    setup_enable = 1;
    @(negedge clk);
    setup_enable = 0;
    wait (setup_done);
    @(negedge clk);
    fft_reset = 1;
    @(negedge clk);
    fft_reset = 0;
    for (int s = 0; s < 5; s++)
      for (int i = 0; i < n; i++) begin
        in_re[s][i] = real'($signed($urandom_range(2047, 0)) - 1024);
        in_im[s][i] = real'($signed($urandom_range(2047, 0)) - 1024);
      end
    busy_cycles = 0; max_busy = 0; maxerr = 0.0; run_len = 0;
    osym = 0; ok = 0;
    fork
      begin
        for (int s = 0; s < 5; s++)
          for (int i = 0; i < n; i++) begin
            data_in.re = DATA_W'($rtoi(in_re[s][i]));
            data_in.im = DATA_W'($rtoi(in_im[s][i]));
            fft_enable = 1;
            @(negedge clk);
            fft_enable = 0;
            @(negedge clk);
          end
      end
      begin
        while (osym < 3) begin
          @(posedge clk);
          #0.1;
          if (out_valid) begin
            out_seen++;
            check_output(osym, int'(k), data_out, n, fwd_fft, shift);
            if (k_last) osym++;
          end
        end
      end
    join
    repeat (10) @(negedge clk);
    $display("N=%0d %s: max error %0.2f LSB, longest calculation %0d cycles (2N = %0d)", n,
             fwd_fft ? "FFT" : "IFFT", maxerr, max_busy, 2 * n);
    checks++;
    if (max_busy > 2 * n || max_busy == 0) begin
      failures++;
      $display("FAIL: calculation of N=%0d took %0d cycles", n, max_busy);
    end
    if (expect_cycles != 0) begin
      checks++;
      if (max_busy != expect_cycles) begin
        failures++;
        $display("FAIL: N=%0d calculation %0d cycles, expected %0d", n, max_busy, expect_cycles);
      end
    end
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst = 0;
    for (int q = 0; q < 42; q++) run_size(q, 1, 0);   // every length, forward
    for (int q = 0; q < 42; q++) run_size(q, 0, 0);   // and all as inverse transforms
    checks++;
    if (stall_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
