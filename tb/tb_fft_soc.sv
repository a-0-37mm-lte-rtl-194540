// tb_fft_soc: end-to-end test of the chip top through its memory-mapped bus, with the top's
// default parameters (full 2048-point memories, 2048-entry test and snapshot SRAMs).
//
// Plays the processor: selects the length and direction, starts setup and polls it, loads the
// test SRAM, starts the calculation, polls for the captured frame and reads the snapshot SRAM,
// comparing every bin with a DFT of the loaded data. Runs
//   1. a 2048-point FFT in continuous test mode on the external clock,
//   2. a 1536-point inverse FFT with streaming paused after the frame,
//   3. a 300-point FFT (three radices) and a 12-point FFT on the ring oscillator divided by 8.
// Hierarchical probes count the mechanisms the design relies on and each one that never
// occurs counts as a failure: pipeline stalls, dual radix-2 issue, radix-5 issue, symbols
// computed in the forward (DIF) and reverse (DIT) direction, both memories used for
// calculation, inverse transforms, frame captures and streaming pauses.
module tb_fft_soc;
  import fft_pkg::*;
  logic ext_clk = 0, rosc_en = 0, rst = 1;
  logic [2:0] clk_sel = 0;
  logic [15:0] mmio_addr = 0;
  logic mmio_we = 0, mmio_re = 0, mmio_rvalid, clk_core, calc_busy;
  logic [63:0] mmio_wdata = 0, mmio_rdata;
  int checks = 0, failures = 0;
  real maxerr = 0.0;

  always #1 ext_clk = ~ext_clk;

  fft_soc dut (.ext_clk, .rosc_en, .clk_sel, .rst, .mmio_addr, .mmio_we, .mmio_re, .mmio_wdata,
               .mmio_rdata, .mmio_rvalid, .clk_core, .calc_busy);

  // mechanism counters
  int n_stall, n_dual, n_r5, n_fwd, n_rev, n_mem_a, n_mem_b, n_ifft, n_frame, n_pause, n_en;
  always @(posedge clk_core) begin
    if (dut.u_fft.u_calc.stall) n_stall++;
    if (dut.u_fft.u_calc.busy && !dut.u_fft.u_calc.stall && dut.u_fft.u_calc.op == OP_R2X2) n_dual++;
    if (dut.u_fft.u_calc.busy && !dut.u_fft.u_calc.stall && dut.u_fft.u_calc.op == OP_R5) n_r5++;
    if (dut.u_fft.u_io.calc_start) begin
      if (dut.u_fft.u_io.calc_fwd) n_fwd++; else n_rev++;
      if (dut.u_fft.u_io.calc_mem_b) n_mem_b++; else n_mem_a++;
      if (!dut.u_fft.cfg.is_fft) n_ifft++;
    end
    if (dut.fft_enable) n_en++;
  end

  task automatic wr(int a, longint d);
    @(negedge clk_core);
    mmio_addr = 16'(a); mmio_wdata = 64'(d); mmio_we = 1;
    @(negedge clk_core);
    mmio_we = 0;
  endtask

  task automatic rd(int a, output longint d);
    @(negedge clk_core);
    mmio_addr = 16'(a); mmio_re = 1;
    @(negedge clk_core);
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

  task automatic run(int idx, int n, bit fwd_fft, bit tmode);
    longint d;
    int xr [2048], xi [2048], polls, c0, shift;
    real tol;
    wr('h00, fwd_fft);
    wr('h08, idx);
    wr('h10, tmode);
    wr('h18, 1);
    polls = 0;
    do begin rd('h18, d); polls++; end while (d == 0 && polls < 10000);
    chk(d == 1, "setup done");
    chk(dut.u_fft.fft_n == N_W'(n), $sformatf("length %0d selected", n));
    for (int i = 0; i < n; i++) begin
      xr[i] = $urandom_range(2000, 0) - 1000;
      xi[i] = $urandom_range(2000, 0) - 1000;
      wr('h4000 + 8 * i, {16'd0, 24'(xr[i]), 24'(xi[i])});
    end
    wr('h20, 1);
    polls = 0;
    do begin rd('h20, d); polls++; end while (d == 0 && polls < 100000);
    chk(d == 1, $sformatf("frame captured N=%0d", n));
    if (d == 1) n_frame++;
    c0 = n_en;
    repeat (4 * n) @(negedge clk_core);
    if (tmode) chk(n_en > c0 + n, "streaming continues in test mode");
    else begin
      chk(n_en <= c0 + 1, "streaming paused after the frame");
      if (n_en <= c0 + 1) n_pause++;
    end
    shift = 0;
    for (int b = 0; b < 12; b++) if (n >> b != 0) shift = b / 2;
    tol = 4.0 + 4.0 * $sqrt(real'(n)) / real'(1 << shift);
    for (int kk = 0; kk < n; kk++) begin
      real er, ei, ang, e;
      cplx_t g;
      er = 0; ei = 0;
      for (int i = 0; i < n; i++) begin
        ang = (fwd_fft ? -2.0 : 2.0) * 3.14159265358979323846 * real'((i * kk) % n) / real'(n);
        er += real'(xr[i]) * $cos(ang) - real'(xi[i]) * $sin(ang);
        ei += real'(xr[i]) * $sin(ang) + real'(xi[i]) * $cos(ang);
      end
      er /= real'(1 << shift); ei /= real'(1 << shift);
      rd('h8000 + 8 * kk, d);
      g = d[47:0];
      e = $sqrt((real'(g.re) - er) * (real'(g.re) - er) + (real'(g.im) - ei) * (real'(g.im) - ei));
      if (e > maxerr) maxerr = e;
      chk(e <= tol, $sformatf("snapshot N=%0d k=%0d got (%0d,%0d) expected (%0.1f,%0.1f)",
                              n, kk, g.re, g.im, er, ei));
    end
    $display("N=%0d %s done, max error so far %0.2f LSB", n, fwd_fft ? "FFT" : "IFFT", maxerr);
  endtask

  task automatic mech(int cnt, string what);
    checks++;
    if (cnt == 0) begin
      failures++;
      $display("FAIL mechanism never seen: %s", what);
    end else $display("mechanism %-28s %0d", what, cnt);
  endtask

  initial begin
    int t0, t1, ext_edges;
    repeat (4) @(negedge ext_clk);
    rst = 0;
    run(5, 2048, 1, 1);
    run(6, 1536, 0, 0);

    // move the core onto the ring oscillator divided by 8
    rst = 1;
    rosc_en = 1;
    clk_sel = 3'd4;
    repeat (40) @(posedge ext_clk);
    rst = 0;            // the divider chain is held while rst is high
    @(posedge clk_core);
    ext_edges = 0;
    fork
      begin repeat (10) @(posedge clk_core); end
      forever begin @(posedge ext_clk); ext_edges++; end
    join_any
    disable fork;
    // ring period 2*3, divided by 8 -> 48 time units, 24 external clock periods
    chk(ext_edges >= 230 && ext_edges <= 250, $sformatf("core clock on ring/8: %0d ext edges", ext_edges));
    run(22, 300, 1, 0);
    run(7, 12, 1, 0);

    mech(n_stall, "pipeline stall cycles");
    mech(n_dual, "dual radix-2 issues");
    mech(n_r5, "radix-5 issues");
    mech(n_fwd, "forward (DIF) symbols");
    mech(n_rev, "reverse (DIT) symbols");
    mech(n_mem_a, "calculations in memory A");
    mech(n_mem_b, "calculations in memory B");
    mech(n_ifft, "inverse symbols");
    mech(n_frame, "frames captured");
    mech(n_pause, "pauses after capture");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
