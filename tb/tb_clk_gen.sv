// tb_clk_gen: counts core clock edges for every clk_sel setting against the source clocks.
module tb_clk_gen;
  logic rosc_clk = 0, ext_clk = 0, rst_div = 1, clk_out;
  logic [2:0] clk_sel = 0;
  int checks = 0, failures = 0, edges = 0;

  always #1 rosc_clk = ~rosc_clk;       // 128 rising edges per 256 time units
  always #4 ext_clk = ~ext_clk;         // 32 rising edges per 256 time units
  always @(posedge clk_out) edges++;

  clk_gen dut (.rosc_clk, .ext_clk, .rst_div, .clk_sel, .clk_out);

  initial begin
    int expect_e [8] = '{32, 128, 64, 32, 16, 8, 32, 32};
    #10 rst_div = 0;
    for (int s = 0; s < 8; s++) begin
      clk_sel = 3'(s);
      #64;
      edges = 0;
      #256;
      checks++;
      if (edges < expect_e[s] - 1 || edges > expect_e[s] + 1) begin
        failures++;
        $display("FAIL sel %0d: %0d edges, expected %0d", s, edges, expect_e[s]);
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
