// tb_fft_rocket_if: the processor-side register interface driving a real FFT engine.
// Runs the test sequence a processor would: write IS_FFT and FFT_IDX, start setup and poll it,
// load the test SRAM, start the calculation and poll for a captured frame, read the snapshot
// SRAM and compare it with a DFT of the test data. Also checks register read-back, the k offset,
// that streaming pauses after the frame when TEST_MODE is 0 and keeps going when it is 1.
module tb_fft_rocket_if;
  import fft_pkg::*;
  logic clk = 0, rst = 1;
  logic [15:0] mmio_addr = 0;
  logic mmio_we = 0, mmio_re = 0, mmio_rvalid;
  logic [63:0] mmio_wdata = 0, mmio_rdata;
  logic setup_enable, is_fft, setup_done, fft_reset, fft_enable, out_valid, k_last;
  logic calc_busy, calc_stall;
  logic [IDX_W-1:0] fft_idx;
  logic [N_W-1:0] fft_n;
  logic [K_W-1:0] k;
  cplx_t data_in, data_out;
  int checks = 0, failures = 0;
  always #1 clk = ~clk;

  fft_rocket_if dut (.clk, .rst, .mmio_addr, .mmio_we, .mmio_re, .mmio_wdata, .mmio_rdata,
    .mmio_rvalid, .setup_enable, .fft_idx, .is_fft, .setup_done, .fft_n, .fft_reset,
    .fft_enable, .data_in, .out_valid, .data_out, .k, .k_last);
  fft_engine u_fft (.clk, .rst, .setup_enable, .fft_idx, .is_fft, .setup_done, .fft_n,
    .fft_reset, .fft_enable, .data_in, .out_valid, .data_out, .k, .k_last, .calc_busy,
    .calc_stall);

  task automatic wr(int a, longint d);
    @(negedge clk);
    mmio_addr = 16'(a); mmio_wdata = 64'(d); mmio_we = 1;
    @(negedge clk);
    mmio_we = 0;
  endtask

  task automatic rd(int a, output longint d);
    @(negedge clk);
    mmio_addr = 16'(a); mmio_re = 1;
    @(negedge clk);
    mmio_re = 0;
    d = longint'(mmio_rdata);
  endtask

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  int en_count;
  always @(posedge clk) if (fft_enable) en_count++;

  task automatic run(int idx, int n, bit tmode);
    longint d;
    int xr [2048], xi [2048], polls, c0, shift;
    wr('h00, 1);
    wr('h08, idx);
    wr('h10, tmode);
    rd('h08, d); chk(d == idx, "FFT_IDX read-back");
    rd('h10, d); chk(d == tmode, "TEST_MODE read-back");
    wr('h18, 1);
    polls = 0;
    do begin rd('h18, d); polls++; end while (d == 0 && polls < 10000);
    chk(d == 1, "setup done");
    for (int i = 0; i < n; i++) begin
      xr[i] = $urandom_range(2000, 0) - 1000;
      xi[i] = $urandom_range(2000, 0) - 1000;
      wr('h4000 + 8 * i, {16'd0, 24'(xr[i]), 24'(xi[i])});
    end
    rd('h4000 + 8 * (n - 1), d);
    chk(d[47:0] == {24'(xr[n-1]), 24'(xi[n-1])}, "test SRAM read-back");
    wr('h20, 1);
    polls = 0;
    do begin rd('h20, d); polls++; end while (d == 0 && polls < 100000);
    chk(d == 1, "frame captured");
    rd('h28, d);
    chk(d == 0, "k offset");
    c0 = en_count;
    repeat (4 * n) @(negedge clk);
    if (tmode) chk(en_count > c0 + n, "streaming continues in test mode");
    else       chk(en_count <= c0 + 1, "streaming paused after the frame");
    shift = 0;
    for (int b = 0; b < 12; b++) if (n >> b != 0) shift = b / 2;
    for (int kk = 0; kk < n; kk++) begin
      real er, ei, ang;
      cplx_t g;
      er = 0; ei = 0;
      for (int i = 0; i < n; i++) begin
        ang = -2.0 * 3.14159265358979323846 * real'((i * kk) % n) / real'(n);
        er += real'(xr[i]) * $cos(ang) - real'(xi[i]) * $sin(ang);
        ei += real'(xr[i]) * $sin(ang) + real'(xi[i]) * $cos(ang);
      end
      er /= real'(1 << shift); ei /= real'(1 << shift);
      rd('h8000 + 8 * kk, d);
      g = d[47:0];
      chk((real'(g.re) - er) * (real'(g.re) - er) + (real'(g.im) - ei) * (real'(g.im) - ei) < 25.0,
          $sformatf("snapshot N=%0d k=%0d", n, kk));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run(7, 12, 0);
    run(8, 24, 1);
    run(11, 60, 0);
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
