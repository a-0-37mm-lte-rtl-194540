// tb_ring_osc: the oscillator model toggles every HALF_PERIOD while enabled and rests at 0.
module tb_ring_osc;
  logic en = 0, clk;
  int checks = 0, failures = 0, edges = 0;
  always @(posedge clk) edges++;

  ring_osc #(.HALF_PERIOD(3)) dut (.en, .clk);

  initial begin
    #100;
    checks++;
    if (edges != 0 || clk != 0) failures++;
    en = 1;
    #12;
    edges = 0;
    #600;          // 100 periods of 6
    checks++;
    if (edges < 99 || edges > 101) failures++;
    en = 0;
    #10;
    edges = 0;
    #100;
    checks += 2;
    if (edges != 0) failures++;
    if (clk != 0) failures++;
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
