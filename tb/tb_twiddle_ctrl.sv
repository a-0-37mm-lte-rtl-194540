// tb_twiddle_ctrl: twiddles from the three ROMs against cos/sin computed in the testbench.
// Random exponent bases within each ROM's range; w[l-1] must equal exp(-2*pi*j*l*base/NG) to
// within one LSB, one cycle after the request.
module tb_twiddle_ctrl;
  import fft_pkg::*;
  logic clk = 0;
  logic [W_W-1:0] tw_base;
  logic [1:0] tw_grp;
  tw_t [3:0] w;
  int checks = 0, failures = 0;

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction
  always #1 clk = ~clk;

  twiddle_ctrl dut (.clk, .tw_base, .tw_grp, .w);

  initial begin
    int nl [3] = '{3, 2, 4};
    for (int t = 0; t < 3000; t++) begin
      int g, b;
      g = t % 3;
      b = $urandom_range(ROM_DEPTH[g] / nl[g] - 1, 0);
      @(negedge clk);
      tw_base = W_W'(b);
      tw_grp = 2'(g);
      @(negedge clk);
      for (int l = 1; l <= nl[g]; l++) begin
        real ang, er, ei;
        ang = 2.0 * 3.14159265358979323846 * real'(l * b) / real'(GRP_NMAX[g]);
        er = $cos(ang) * real'(1 << TW_FRAC);
        ei = -$sin(ang) * real'(1 << TW_FRAC);
        checks++;
        if (fabs(real'(w[l-1].re) - er) > 1.0 || fabs(real'(w[l-1].im) - ei) > 1.0) begin
          failures++;
          if (failures < 10) $display("FAIL grp %0d e=%0d", g, l * b);
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
