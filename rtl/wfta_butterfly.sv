// wfta_butterfly: reconfigurable radix-2 / 2x2 / 3 / 4 / 5 butterfly (combinational).
//
// Computes the r-point DFT y_k = sum_n x_n exp(-2*pi*j*n*k/r) of lanes 0..r-1 using Winograd
// small-DFT algorithms: radix 2 and 4 need only additions and -j swaps, radix 3 one real-constant
// multiplier, radix 5 five. In OP_R2X2 two independent radix-2 butterflies run on lanes (0,1) and
// (2,3). Lanes a configuration does not use output 0. Constants are fixed point with TW_FRAC
// fraction bits, products are rounded; sums wrap at DATA_W bits, so inputs must leave headroom
// for the growth of the transform (no scaling between stages). The document names the Winograd
// butterfly but does not give its equations; these are the standard ones.
module wfta_butterfly
  import fft_pkg::*;
(
  input  op_e              op,
  input  cplx_t [4:0]      x,
  output cplx_t [4:0]      y
);
  localparam logic signed [TW_W-1:0] C3S  = 24'sd3632374;   // sin(2pi/3)
  localparam logic signed [TW_W-1:0] C5A  = -24'sd5242880;  // (cos u + cos 2u)/2 - 1
  localparam logic signed [TW_W-1:0] C5B  = 24'sd2344687;   // (cos u - cos 2u)/2
  localparam logic signed [TW_W-1:0] C5S1 = 24'sd3989020;   // sin u
  localparam logic signed [TW_W-1:0] C5D  = 24'sd1523670;   // sin u - sin 2u
  localparam logic signed [TW_W-1:0] C5P  = 24'sd6454370;   // sin u + sin 2u

  function automatic cplx_t add(cplx_t a, cplx_t b);
    cplx_t r;
    r.re = a.re + b.re;
    r.im = a.im + b.im;
    return r;
  endfunction

  function automatic cplx_t sub(cplx_t a, cplx_t b);
    cplx_t r;
    r.re = a.re - b.re;
    r.im = a.im - b.im;
    return r;
  endfunction

  function automatic cplx_t mulj(cplx_t a);    // -j * a
    cplx_t r;
    r.re = a.im;
    r.im = -a.re;
    return r;
  endfunction

  function automatic logic signed [DATA_W-1:0] rmul(logic signed [DATA_W-1:0] a,
                                                    logic signed [TW_W-1:0] c);
    logic signed [DATA_W+TW_W-1:0] p;
    p = (DATA_W+TW_W)'(a) * (DATA_W+TW_W)'(c) + (DATA_W+TW_W)'(1 << (TW_FRAC - 1));
    return DATA_W'(p >>> TW_FRAC);
  endfunction

  function automatic cplx_t cmulc(cplx_t a, logic signed [TW_W-1:0] c);
    cplx_t r;
    r.re = rmul(a.re, c);
    r.im = rmul(a.im, c);
    return r;
  endfunction

  always_comb begin
    cplx_t t1, t2, t3, t4, t5, s, d, u, m2, a5, b5, p, q, rr, b1, b2;
    y = '0;
    {t1, t2, t3, t4, t5, s, d, u, m2, a5, b5, p, q, rr, b1, b2} = '0;
    case (op)
      OP_R2: begin
        y[0] = add(x[0], x[1]);
        y[1] = sub(x[0], x[1]);
      end
      OP_R2X2: begin
        y[0] = add(x[0], x[1]);
        y[1] = sub(x[0], x[1]);
        y[2] = add(x[2], x[3]);
        y[3] = sub(x[2], x[3]);
      end
      OP_R3: begin
        s  = add(x[1], x[2]);
        d  = sub(x[1], x[2]);
        y[0] = add(x[0], s);
        u.re = x[0].re - ((s.re + DATA_W'(1)) >>> 1);   // s/2, rounded
        u.im = x[0].im - ((s.im + DATA_W'(1)) >>> 1);
        m2 = mulj(cmulc(d, C3S));
        y[1] = add(u, m2);
        y[2] = sub(u, m2);
      end
      OP_R4: begin
        t1 = add(x[0], x[2]);
        t2 = sub(x[0], x[2]);
        t3 = add(x[1], x[3]);
        t4 = mulj(sub(x[1], x[3]));
        y[0] = add(t1, t3);
        y[2] = sub(t1, t3);
        y[1] = add(t2, t4);
        y[3] = sub(t2, t4);
      end
      default: begin  // OP_R5
        t1 = add(x[1], x[4]);
        t2 = add(x[2], x[3]);
        t3 = sub(x[1], x[4]);
        t4 = sub(x[2], x[3]);
        t5 = add(t1, t2);
        y[0] = add(x[0], t5);
        u  = add(y[0], cmulc(t5, C5A));
        m2 = cmulc(sub(t1, t2), C5B);
        a5 = add(u, m2);
        b5 = sub(u, m2);
        p  = cmulc(add(t3, t4), C5S1);
        q  = cmulc(t4, C5D);
        rr = cmulc(t3, C5P);
        b1 = mulj(sub(p, q));
        b2 = mulj(sub(rr, p));
        y[1] = add(a5, b1);
        y[4] = sub(a5, b1);
        y[2] = add(b5, b2);
        y[3] = sub(b5, b2);
      end
    endcase
  end
endmodule
