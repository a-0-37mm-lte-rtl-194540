// tb_fft_engine: end-to-end test of the FFT engine against a double-precision DFT.
//
// For a set of lengths (radix 4 only, 2x radix-2 with four and with five banks, radix 3 and 5
// mixes, the largest 2048 and 1296 points, and one inverse transform) it streams five symbols of
// random complex data, one sample every two cycles, and compares every output of the first three
// symbols (forward, forward, reverse decompositions) with the DFT of the stored input scaled by
// 2^-floor(log2(N)/2). It also counts calculation cycles and checks the 256-point and 972-point
// cycle counts (284 and 1,905) and that every symbol's calculation fits into 2N cycles.
module tb_fft_engine;
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
    run_size(7, 1, 0);      // 12   = 4*3
    run_size(8, 1, 0);      // 24   = 4*2*3, 2x radix-2 on 4 banks
    run_size(11, 1, 0);     // 60   = 4*3*5
    run_size(15, 1, 0);     // 120  = 4*2*3*5, 2x radix-2 on 5 banks
    run_size(2, 1, 284);    // 256
    run_size(22, 1, 0);     // 300  = 4*3*25
    run_size(10, 0, 0);     // 48 inverse
    run_size(37, 1, 1905);  // 972  = 4*243
    run_size(41, 1, 0);     // 1296
    run_size(5, 1, 0);      // 2048
    checks++;
    if (stall_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
