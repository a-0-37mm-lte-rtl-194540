// fft_pkg: types, constants and helper functions shared by the 2^n 3^m 5^k FFT accelerator.
//
// A data point lives at a "location" described by a vector of NSLOT mixed-radix digits. The
// slots are grouped by coprime factor: slots 0..5 hold the 2^n digits (radix 4 digits first,
// then a single radix 2 digit when n is odd), slots 6..10 the 3^m digits and slots 11..12 the
// 5^k digits. Unused slots have radix 1 and always hold 0. Slot 0 is the most significant.
// The bank of a location is the digit sum modulo the largest radix (conflict-free banking, the
// document's equation (1)); its address is the mixed-radix number formed by all digits except
// one digit of the largest radix (the "dropped" slot), so every bank holds N/radix_max words.
// Widths and depths follow the document (2x24-bit words, banks of 4x512 and 240 words);
// the slot layout and struct encodings are this design's own choice.
package fft_pkg;

  localparam int DATA_W   = 24;            // bits per real / imaginary part
  localparam int TW_W     = 24;            // twiddle and constant width
  localparam int TW_FRAC  = 22;            // fraction bits of twiddles and constants
  localparam int NSLOT    = 13;
  localparam int NDIG     = 6;             // digits per group mapper
  localparam int NBANK    = 5;
  localparam int ADDR_W   = 9;
  localparam int DEPTH_MAIN = 512;         // banks 0..3
  localparam int DEPTH_LAST = 240;         // bank 4
  localparam int NMAX     = 2048;
  localparam int N_W      = 12;            // width of an FFT length / index (up to 2048)
  localparam int K_W      = 11;            // width of an IO index
  localparam int W_W      = 11;            // width of weights and exponents
  localparam int N_SIZES  = 42;
  localparam int IDX_W    = 6;
  localparam int GRP_BASE [3] = '{0, 6, 11};
  localparam int GRP_LEN  [3] = '{6, 5, 2};
  localparam int GRP_NMAX [3] = '{2048, 243, 25};
  localparam int ROM_DEPTH[3] = '{1536, 162, 20};   // 1,718 twiddles in all
  localparam int PE_LAT   = 2;             // read issue to write-back, in cycles

  typedef logic [2:0] digit_t;
  typedef digit_t [NSLOT-1:0] loc_t;       // location digits, index = slot
  typedef digit_t [NDIG-1:0]  mdig_t;      // mapper digits, index 0 = least significant

  typedef struct packed {
    logic signed [DATA_W-1:0] re;
    logic signed [DATA_W-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic signed [TW_W-1:0] re;
    logic signed [TW_W-1:0] im;
  } tw_t;

  // Butterfly configurations of the processing element.
  typedef enum logic [2:0] {OP_R2 = 3'd0, OP_R2X2 = 3'd1, OP_R3 = 3'd2, OP_R4 = 3'd3, OP_R5 = 3'd4}
    op_e;

  // Run-time configuration produced by fft_setup.
  typedef struct packed {
    logic [N_W-1:0]            n;          // FFT length
    logic [3:0]                e2;         // n of 2^n
    logic [2:0]                e3;         // m of 3^m
    logic [1:0]                e5;         // k of 5^k
    logic [2:0]                rmax;       // number of banks in use
    logic [3:0]                drop;       // slot left out of the address
    logic                      dual;       // pair radix-2 butterflies
    logic [3:0]                norm_shift; // output normalisation shift
    logic                      is_fft;     // 0: inverse transform
    digit_t [NSLOT-1:0]        radix;      // radix per slot
    logic [NSLOT-1:0][W_W-1:0] aw;         // address weight per slot (0 for the dropped slot)
    logic [NSLOT-1:0][W_W-1:0] gw;         // weight of the slot within its group
    logic [NSLOT-1:0][W_W-1:0] tscale;     // twiddle renormalisation NGMAX/M of the slot's stage
    logic [2:0][N_W-1:0]       gn;         // group sizes 2^n, 3^m, 5^k
    mdig_t [2:0]               q_fwd;      // per group: Q' digits of the forward-input map
    mdig_t [2:0]               q_rev;      // per group: Q' digits of the forward-output map
  } fft_cfg_t;

  function automatic int grp_of_slot(int s);
    return (s < 6) ? 0 : (s < 11) ? 1 : 2;
  endfunction

  // Bank of a location: digit sum modulo radix_max (equation (1)).
  function automatic logic [2:0] loc_bank(loc_t d, logic [2:0] rmax);
    logic [5:0] sum;
    sum = '0;
    for (int s = 0; s < NSLOT; s++) begin
      sum = sum + 6'(d[s]);
      if (sum >= 6'(rmax)) sum = sum - 6'(rmax);
    end
    return sum[2:0];
  endfunction

  // Address of a location: weighted digit sum, the dropped slot having weight 0.
  function automatic logic [ADDR_W-1:0] loc_addr(loc_t d, logic [NSLOT-1:0][W_W-1:0] aw);
    logic [W_W+3:0] a;
    a = '0;
    for (int s = 0; s < NSLOT; s++) a = a + (W_W+4)'(d[s]) * (W_W+4)'(aw[s]);
    return a[ADDR_W-1:0];
  endfunction

  // Mapper digit x of group g sits in slot base+len-1-x in the forward-input map (natural
  // order) and in slot base+x in the forward-output map (digit reversed).
  function automatic int map_slot(int g, int x, logic fwd);
    return fwd ? (GRP_BASE[g] + GRP_LEN[g] - 1 - x) : (GRP_BASE[g] + x);
  endfunction

  function automatic cplx_t conj(cplx_t a);
    cplx_t r;
    r.re = a.re;
    r.im = -a.im;
    return r;
  endfunction

endpackage
