// tb_normalize: rounding right shift of both parts, registered, with valid passed along.
module tb_normalize;
  import fft_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  cplx_t din, dout;
  logic [3:0] shift;
  int checks = 0, failures = 0;
  always #1 clk = ~clk;

  normalize dut (.clk, .rst, .in_valid, .din, .shift, .out_valid, .dout);

  function automatic int rnd(int v, int sh);
    if (sh == 0) return v;
    return int'($floor(real'(v) / real'(1 << sh) + 0.5));
  endfunction

  initial begin
    @(negedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      int a, b, sh;
      a = $signed($urandom_range(4000000, 0)) - 2000000;
      b = $signed($urandom_range(4000000, 0)) - 2000000;
      sh = $urandom_range(6, 0);
      din.re = DATA_W'(a);
      din.im = DATA_W'(b);
      shift = 4'(sh);
      in_valid = t[0];
      @(negedge clk);
      checks += 3;
      if (int'(dout.re) != rnd(a, sh)) failures++;
      if (int'(dout.im) != rnd(b, sh)) failures++;
      if (out_valid != t[0]) failures++;
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
