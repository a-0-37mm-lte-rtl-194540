// twiddle_ctrl: twiddle address generation and the three twiddle ROMs ("Twiddle Ctrl").
//
// The coprime groups have separate ROMs for W_2048, W_243 and W_25; smaller groups reach them
// through the renormalisation factor already folded into tw_base by calc_ctrl. For lane l of a
// radix-r butterfly the exponent is l * tw_base, l = 1..r-1, so the 2^N ROM needs 3 ports, the
// 3^M ROM 2 and the 5^K ROM 4. w[l-1] is the twiddle for lane l, one cycle after the request,
// aligned with the data read from the memory banks. Lanes that the selected ROM does not serve
// get 1.0.
module twiddle_ctrl
  import fft_pkg::*;
(
  input  logic            clk,
  input  logic [W_W-1:0]  tw_base,
  input  logic [1:0]      tw_grp,
  output tw_t  [3:0]      w
);
  logic [2:0][W_W-1:0] a2;
  logic [1:0][W_W-1:0] a3;
  logic [3:0][W_W-1:0] a5;
  tw_t  [2:0] d2;
  tw_t  [1:0] d3;
  tw_t  [3:0] d5;
  logic [1:0] grp_q;
  tw_t one;

  always_comb begin
    for (int l = 1; l <= 4; l++) begin
      logic [W_W-1:0] e;
      e = W_W'(l) * tw_base;
      if (l <= 3) a2[l-1] = (tw_grp == 2'd0) ? e : '0;
      if (l <= 2) a3[l-1] = (tw_grp == 2'd1) ? e : '0;
      a5[l-1] = (tw_grp == 2'd2) ? e : '0;
    end
  end

  twiddle_rom #(.NG(GRP_NMAX[0]), .DEPTH(ROM_DEPTH[0]), .NPORTS(3)) u_rom2 (.clk, .addr(a2), .data(d2));
  twiddle_rom #(.NG(GRP_NMAX[1]), .DEPTH(ROM_DEPTH[1]), .NPORTS(2)) u_rom3 (.clk, .addr(a3), .data(d3));
  twiddle_rom #(.NG(GRP_NMAX[2]), .DEPTH(ROM_DEPTH[2]), .NPORTS(4)) u_rom5 (.clk, .addr(a5), .data(d5));

  always_ff @(posedge clk) grp_q <= tw_grp;

  always_comb begin
    one.re = TW_W'(1 << TW_FRAC);
    one.im = '0;
    for (int l = 0; l < 4; l++) begin
      case (grp_q)
        2'd0:    w[l] = (l < 3) ? d2[l] : one;
        2'd1:    w[l] = (l < 2) ? d3[l] : one;
        default: w[l] = d5[l];
      endcase
    end
  end
endmodule
