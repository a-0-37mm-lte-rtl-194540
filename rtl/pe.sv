// pe: processing element with the reconfigurable Winograd butterfly and 4 twiddle multipliers.
//
// Forward (DIF) symbols: the butterfly runs first and lanes 1..4 of its result are multiplied by
// the twiddles W1..W4. Reverse (DIT) symbols: lanes 1..4 are multiplied first and the butterfly
// follows. One butterfly and one set of four complex multipliers serve both orders, as the
// document's PE "can be configured for forward or reverse decomposition". Twiddle products are
// rounded to DATA_W bits. The 2x radix-2 configuration bypasses the multipliers (a radix-2
// stage is always the last of its group and has no twiddles). The result is registered: y is valid one cycle after x and w, with
// y_valid following x_valid. The shared units are reordered by two muxes on fwd, so the netlist
// has a path butterfly -> multipliers -> butterfly that no setting of fwd activates: a false
// combinational loop a lint tool may report. It is kept because sharing the units is the
// point of the design (16 real multipliers in the twiddle unit and 10 in the radix-5 butterfly,
// the 26 the document counts; the radix-3 constant adds 2 unless synthesis merges them).
module pe
  import fft_pkg::*;
(
  input  logic             clk,
  input  logic             fwd,
  input  op_e              op,
  input  logic             x_valid,
  input  cplx_t [4:0]      x,
  input  tw_t   [3:0]      w,
  output logic             y_valid,
  output cplx_t [4:0]      y
);
  cplx_t [4:0] bin, bout, tin, tout;

  function automatic cplx_t cmul(cplx_t a, tw_t b);
    logic signed [DATA_W+TW_W:0] pr, pi;
    cplx_t r;
    pr = (DATA_W+TW_W+1)'(a.re) * (DATA_W+TW_W+1)'(b.re) - (DATA_W+TW_W+1)'(a.im) * (DATA_W+TW_W+1)'(b.im)
       + (DATA_W+TW_W+1)'(1 << (TW_FRAC - 1));
    pi = (DATA_W+TW_W+1)'(a.re) * (DATA_W+TW_W+1)'(b.im) + (DATA_W+TW_W+1)'(a.im) * (DATA_W+TW_W+1)'(b.re)
       + (DATA_W+TW_W+1)'(1 << (TW_FRAC - 1));
    r.re = DATA_W'(pr >>> TW_FRAC);
    r.im = DATA_W'(pi >>> TW_FRAC);
    return r;
  endfunction

  // twiddle multipliers, fed before or after the butterfly
  always_comb begin
    tin = fwd ? bout : x;
    tout[0] = tin[0];
    for (int l = 1; l < 5; l++) tout[l] = (op == OP_R2X2) ? tin[l] : cmul(tin[l], w[l-1]);
    bin = fwd ? x : tout;
  end

  wfta_butterfly u_bf (.op(op), .x(bin), .y(bout));

  always_ff @(posedge clk) begin
    y_valid <= x_valid;
    y       <= fwd ? tout : bout;
  end
endmodule
