// tb_pe: the processing element against a real-valued model.
// Random operands and unit-magnitude twiddles for every butterfly type in both orders:
// forward = r-point DFT then twiddle multiply, reverse = twiddle multiply then DFT (2x radix-2:
// two 2-point DFTs, no twiddles). Results must match within a few LSB, one cycle later.
module tb_pe;
  import fft_pkg::*;
  logic clk = 0, fwd, x_valid, y_valid;
  op_e op;
  cplx_t [4:0] x, y;
  tw_t [3:0] w;
  int checks = 0, failures = 0;

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction
  real wr [5], wi [5];
  always #1 clk = ~clk;

  pe dut (.clk, .fwd, .op, .x_valid, .x, .w, .y_valid, .y);

  initial begin
    for (int t = 0; t < 4000; t++) begin
      real xr [5], xi [5], ar [5], ai [5], er [5], ei [5];
      int r;
      @(negedge clk);
      op = op_e'(t % 5);
      fwd = (t / 5) % 2 == 0;
      r = (op == OP_R2) ? 2 : (op == OP_R3) ? 3 : (op == OP_R5) ? 5 : 4;
      x_valid = 1;
      wr[0] = 1.0; wi[0] = 0.0;
      for (int l = 0; l < 5; l++) begin
        x[l].re = DATA_W'($signed($urandom_range(200000, 0)) - 100000);
        x[l].im = DATA_W'($signed($urandom_range(200000, 0)) - 100000);
        xr[l] = real'(x[l].re); xi[l] = real'(x[l].im);
      end
      for (int l = 1; l < 5; l++) begin
        real a;
        a = 2.0 * 3.14159265358979 * real'($urandom_range(999, 0)) / 1000.0;
        w[l-1].re = TW_W'($rtoi($floor($cos(a) * real'(1 << TW_FRAC) + 0.5)));
        w[l-1].im = TW_W'($rtoi($floor($sin(a) * real'(1 << TW_FRAC) + 0.5)));
        wr[l] = real'(w[l-1].re) / real'(1 << TW_FRAC);
        wi[l] = real'(w[l-1].im) / real'(1 << TW_FRAC);
      end
      // model
      for (int l = 0; l < 5; l++) begin ar[l] = xr[l]; ai[l] = xi[l]; end
      if (!fwd && op != OP_R2X2)
        for (int l = 0; l < r; l++) begin
          ar[l] = xr[l] * wr[l] - xi[l] * wi[l];
          ai[l] = xr[l] * wi[l] + xi[l] * wr[l];
        end
      for (int l = 0; l < 5; l++) begin er[l] = 0.0; ei[l] = 0.0; end
      if (op == OP_R2X2) begin
        er[0] = ar[0] + ar[1]; ei[0] = ai[0] + ai[1];
        er[1] = ar[0] - ar[1]; ei[1] = ai[0] - ai[1];
        er[2] = ar[2] + ar[3]; ei[2] = ai[2] + ai[3];
        er[3] = ar[2] - ar[3]; ei[3] = ai[2] - ai[3];
      end else
        for (int kk = 0; kk < r; kk++)
          for (int nn = 0; nn < r; nn++) begin
            real a;
            a = -2.0 * 3.14159265358979323846 * real'(nn * kk) / real'(r);
            er[kk] += ar[nn] * $cos(a) - ai[nn] * $sin(a);
            ei[kk] += ar[nn] * $sin(a) + ai[nn] * $cos(a);
          end
      if (fwd && op != OP_R2X2)
        for (int l = 0; l < r; l++) begin
          real tr, ti;
          tr = er[l] * wr[l] - ei[l] * wi[l];
          ti = er[l] * wi[l] + ei[l] * wr[l];
          er[l] = tr; ei[l] = ti;
        end
      @(negedge clk);
      x_valid = 0;
      checks++;
      if (!y_valid) failures++;
      for (int l = 0; l < ((op == OP_R2X2) ? 4 : r); l++) begin
        checks++;
        if (fabs(real'(y[l].re) - er[l]) > 4.0 || fabs(real'(y[l].im) - ei[l]) > 4.0) begin
          failures++;
          if (failures < 10) $display("FAIL op=%0d fwd=%0d lane %0d got (%0d,%0d) exp (%0.1f,%0.1f)",
                                      op, fwd, l, y[l].re, y[l].im, er[l], ei[l]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
