// clk_gen: core clock generation after the on-chip ring oscillator.
//
// Four divide-by-two flip-flops follow the oscillator, and a clock multiplexer picks the core
// clock: clk_sel = 0 external clock, 1 oscillator, 2..5 oscillator divided by 2, 4, 8 and 16;
// 6 and 7 also select the external clock. The divider chain is held at 0 while rst_div is high.
// The document shows the four dividers and a "Clk Mux & Buffers" with a 3-bit select; the
// encoding of the select is this design's choice. The mux is a plain combinational selector,
// so the selection must change only while the core is in reset.
module clk_gen (
  input  logic       rosc_clk,
  input  logic       ext_clk,
  input  logic       rst_div,
  input  logic [2:0] clk_sel,
  output logic       clk_out
);
  logic [3:0] div;

  always_ff @(posedge rosc_clk or posedge rst_div)
    if (rst_div) div[0] <= 1'b0;
    else         div[0] <= ~div[0];

  for (genvar i = 1; i < 4; i++) begin : g_div
    always_ff @(posedge div[i-1] or posedge rst_div)
      if (rst_div) div[i] <= 1'b0;
      else         div[i] <= ~div[i];
  end

  always_comb begin
    case (clk_sel)
      3'd1:    clk_out = rosc_clk;
      3'd2:    clk_out = div[0];
      3'd3:    clk_out = div[1];
      3'd4:    clk_out = div[2];
      3'd5:    clk_out = div[3];
      default: clk_out = ext_clk;
    endcase
  end
endmodule
