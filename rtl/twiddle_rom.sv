// twiddle_rom: one twiddle look-up table with several synchronous read ports.
//
// Entry e holds W_NG^e = cos(2*pi*e/NG) - j*sin(2*pi*e/NG) with TW_FRAC fraction bits, rounded.
// Only DEPTH entries are stored: a radix-r stage never needs an exponent of (r-1)/r * NG or more,
// which gives 1536 entries for NG = 2048, 162 for 243 and 20 for 25 (1,718 in all, the total the
// document gives). The table is a constant computed at elaboration with integer arithmetic only,
// so synthesis turns it into a ROM: the angle is reduced to a quadrant, theta = (4e mod NG) /
// NG * pi/2, whose cosine and sine come from Taylor series in 2.30 fixed point (16 terms, error
// far below one output LSB), and the quadrant then rotates the result by a multiple of -90
// degrees. Each port returns the entry addressed in the previous cycle; out-of-range addresses
// read entry 0. The table-plus-renormalisation scheme follows the document; the way the values
// are generated is this design's own.
module twiddle_rom
  import fft_pkg::*;
#(
  parameter int NG     = 2048,
  parameter int DEPTH  = 1536,
  parameter int NPORTS = 3
) (
  input  logic                            clk,
  input  logic [NPORTS-1:0][W_W-1:0]      addr,
  output tw_t  [NPORTS-1:0]               data
);
  typedef logic [2*TW_W-1:0] table_t [DEPTH];   // {re, im}

  localparam longint ONE     = 64'sd1 << 30;
  localparam longint HALF_PI = 64'sd1686629713;      // pi/2 * 2^30

  // round a 2.30 value to TW_FRAC fraction bits
  function automatic logic signed [TW_W-1:0] to_tw(longint v);
    return TW_W'((v + (64'sd1 <<< (29 - TW_FRAC))) >>> (30 - TW_FRAC));
  endfunction

  function automatic table_t make_table();
    table_t t;
    for (int e = 0; e < DEPTH; e++) begin
      longint th, term, c, s;
      logic signed [TW_W-1:0] wr, wi;
      int q;
      q    = (4 * e) / NG;
      th   = (64'((4 * e) % NG) * HALF_PI) / 64'(NG);
      // cos: sum (-1)^i th^2i/(2i)!, sin: sum (-1)^i th^(2i+1)/(2i+1)!
      c    = 0;
      s    = 0;
      term = ONE;
      for (int n = 0; n < 16; n++) begin
        if (n % 4 == 0) c = c + term;
        if (n % 4 == 1) s = s + term;
        if (n % 4 == 2) c = c - term;
        if (n % 4 == 3) s = s - term;
        term = ((term * th) >>> 30) / 64'(n + 1);
      end
      // W = cos(q*pi/2 + th) - j sin(q*pi/2 + th)
      case (q % 4)
        0:       begin wr = to_tw(c);  wi = to_tw(-s); end
        1:       begin wr = to_tw(-s); wi = to_tw(-c); end
        2:       begin wr = to_tw(-c); wi = to_tw(s);  end
        default: begin wr = to_tw(s);  wi = to_tw(c);  end
      endcase
      t[e] = {wr, wi};
    end
    return t;
  endfunction

  localparam table_t ROM = make_table();
  localparam int     AW  = $clog2(DEPTH);

  always_ff @(posedge clk)
    for (int p = 0; p < NPORTS; p++)
      data[p] <= tw_t'((int'(addr[p]) < DEPTH) ? ROM[AW'(addr[p])] : ROM[0]);
endmodule
