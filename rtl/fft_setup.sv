// fft_setup: run-time configuration of the FFT engine from an FFT index ("FFT(idx) Setup").
//
// A pulse on setup_enable latches fft_idx and is_fft. The index selects one of 42 supported
// lengths: the Wi-Fi and LTE powers of two 64..2048, the LTE length 1536, and the 35 LTE
// SC-FDMA precoding lengths 12..1296 (all of the form 2^n 3^m 5^k). In the first cycle the length
// is factored and everything that follows from the exponents is computed: radices per slot
// (radix-4 digits, one radix-2 digit for odd n, radix-3 and radix-5 digits), the number of banks
// (largest radix), the address and group weights, the twiddle renormalisation factors and the
// normalisation shift. Then four short sequential searches find the modular inverses that the
// index mapper adds every step (Q' constants), directly in the mixed-radix digit form the mapper
// uses. setup_done rises when cfg is complete (at most a few thousand cycles, 2048-pt included)
// and stays high until the next setup_enable. The list of lengths follows the document's
// tables; the exponent encoding, the search and the normalisation rule are this design's own.
module fft_setup
  import fft_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             setup_enable,
  input  logic [IDX_W-1:0] fft_idx,
  input  logic             is_fft,
  output fft_cfg_t         cfg,
  output logic             setup_done
);
  localparam int SIZES [N_SIZES] = '{
    64, 128, 256, 512, 1024, 2048, 1536,
    12, 24, 36, 48, 60, 72, 96, 108, 120, 144, 180, 192, 216, 240, 288, 300, 324, 360,
    384, 432, 480, 540, 576, 600, 648, 720, 768, 864, 900, 960, 972, 1080, 1152, 1200, 1296};

  typedef enum logic [2:0] {S_IDLE, S_BASE, S_LOAD, S_RED, S_SRCH, S_DONE} state_e;
  state_e state;

  logic [IDX_W-1:0] idx_q;
  logic             is_fft_q;
  fft_cfg_t         base;      // combinational part of the configuration
  logic [1:0]       job;

  // ---------------------------------------------------------------- exponents and constants
  always_comb begin
    int nn, w, p;
    base = '0;
    nn = (int'(idx_q) < N_SIZES) ? SIZES[idx_q] : SIZES[0];
    base.n = N_W'(nn);
    for (int i = 1; i <= 11; i++) if (nn % (1 << i) == 0) base.e2 = 4'(i);
    p = 1;
    for (int i = 1; i <= 5; i++) begin p = p * 3; if (nn % p == 0) base.e3 = 3'(i); end
    p = 1;
    for (int i = 1; i <= 2; i++) begin p = p * 5; if (nn % p == 0) base.e5 = 2'(i); end
    base.is_fft = is_fft_q;
    for (int s = 0; s < NSLOT; s++) base.radix[s] = 3'd1;
    for (int s = 0; s < 6; s++)
      if (s < int'(base.e2) / 2) base.radix[s] = 3'd4;
      else if (s == int'(base.e2) / 2 && base.e2[0]) base.radix[s] = 3'd2;
    for (int s = 0; s < 5; s++) if (s < int'(base.e3)) base.radix[6+s] = 3'd3;
    for (int s = 0; s < 2; s++) if (s < int'(base.e5)) base.radix[11+s] = 3'd5;
    base.rmax = (base.e5 != 0) ? 3'd5 : (base.e2 >= 2) ? 3'd4 : (base.e3 != 0) ? 3'd3 : 3'd2;
    base.drop = 4'd0;
    for (int s = NSLOT - 1; s >= 0; s--) if (base.radix[s] == base.rmax) base.drop = 4'(s);
    base.dual = base.e2[0] && (base.rmax >= 3'd4);
    // address weights: mixed-radix place values of all slots but the dropped one
    w = 1;
    for (int s = NSLOT - 1; s >= 0; s--) begin
      if (s == int'(base.drop)) base.aw[s] = '0;
      else begin base.aw[s] = W_W'(w); w = w * int'(base.radix[s]); end
    end
    // group weights and group sizes
    for (int g = 0; g < 3; g++) begin
      w = 1;
      for (int s = GRP_BASE[g] + GRP_LEN[g] - 1; s >= GRP_BASE[g]; s--) begin
        base.gw[s] = W_W'(w);
        w = w * int'(base.radix[s]);
      end
      base.gn[g] = N_W'(w);
    end
    // twiddle renormalisation: NGMAX / (product of the group radices from this slot on)
    for (int g = 0; g < 3; g++) begin
      w = GRP_NMAX[g] / int'(base.gn[g]);  // power of the radix, division by a small table
      for (int s = GRP_BASE[g]; s < GRP_BASE[g] + GRP_LEN[g]; s++) begin
        base.tscale[s] = W_W'(w);
        w = w * int'(base.radix[s]);
      end
    end
    for (int i = 0; i < N_W; i++) if (base.n[i]) base.norm_shift = 4'(i / 2);
  end

  // ---------------------------------------------------------------- modular inverse search
  // job 0: group 2^n, forward map, Q = inv(3^m 5^k) mod 2^n
  // job 1: group 3^m, forward map, Q = inv(5^k) mod 3^m
  // job 2: group 3^m, reverse map, Q = inv(2^n) mod 3^m
  // job 3: group 5^k, reverse map, Q = inv(2^n 3^m) mod 5^k
  logic [1:0]     jg;
  logic           jfwd;
  logic [N_W-1:0] ny, amul, amod, acc, acc_n;
  mdig_t          qd, qd_n, jrad, zero_d;
  logic           qc;

  always_comb begin
    case (job)
      2'd0:    begin jg = 2'd0; jfwd = 1'b1; amul = N_W'(cfg.gn[1] * cfg.gn[2]); end
      2'd1:    begin jg = 2'd1; jfwd = 1'b1; amul = cfg.gn[2]; end
      2'd2:    begin jg = 2'd1; jfwd = 1'b0; amul = cfg.gn[0]; end
      default: begin jg = 2'd2; jfwd = 1'b0; amul = N_W'(cfg.gn[0] * cfg.gn[1]); end
    endcase
    ny = cfg.gn[jg];
    zero_d = '0;
    for (int x = 0; x < NDIG; x++)
      jrad[x] = (x < GRP_LEN[jg]) ? cfg.radix[map_slot(int'(jg), x, jfwd)] : 3'd1;
    acc_n = acc + amod;
    if (acc_n >= ny) acc_n = acc_n - ny;
  end

  mr_adder #(.NDIG(NDIG)) u_qinc (.a(qd), .b(zero_d), .radix(jrad), .cin(1'b1), .s(qd_n), .cout(qc));

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      setup_done <= 1'b0;
      cfg        <= '0;
      idx_q      <= '0;
      is_fft_q   <= 1'b1;
      job        <= '0;
      amod       <= '0;
      acc        <= '0;
      qd         <= '0;
    end else begin
      case (state)
        S_IDLE, S_DONE:
          if (setup_enable) begin
            idx_q      <= fft_idx;
            is_fft_q   <= is_fft;
            setup_done <= 1'b0;
            state      <= S_BASE;
          end
        S_BASE: begin
          cfg   <= base;
          job   <= 2'd0;
          state <= S_LOAD;
        end
        S_LOAD: begin
          amod  <= amul;
          state <= S_RED;
        end
        S_RED: begin           // amod = amul mod ny by repeated subtraction
          if (ny != N_W'(1) && amod >= ny) amod <= amod - ny;
          else begin
            acc   <= '0;
            qd    <= '0;
            state <= S_SRCH;
          end
        end
        S_SRCH: begin
          if (ny == N_W'(1) || acc == N_W'(1)) begin
            if (jfwd) cfg.q_fwd[jg] <= (ny == N_W'(1)) ? '0 : qd;
            else      cfg.q_rev[jg] <= (ny == N_W'(1)) ? '0 : qd;
            amod <= '0;
            acc  <= '0;
            qd   <= '0;
            if (job == 2'd3) begin
              state      <= S_DONE;
              setup_done <= 1'b1;
            end else begin
              job   <= job + 2'd1;
              state <= S_LOAD;
            end
          end else begin
            acc <= acc_n;
            qd  <= qd_n;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  logic unused;
  assign unused = qc;
endmodule
