// calc_ctrl: calculation controller of the memory-based FFT (the document's "Calc Ctrl").
//
// After 'start' it walks through the stages of the in-place FFT held in one memory. A stage is
// one location slot of radix r > 1; forward (DIF) symbols take the slots from most to least
// significant, reverse (DIT) symbols the other way round. Within a stage a mixed-radix counter
// runs over every other slot; each count is one butterfly, whose r operands are the locations
// with the stage slot set to 0..r-1. Their banks (digit sum mod radix_max) are distinct, so one
// butterfly is issued per cycle without conflicts. In radix-2 stages two butterflies are issued
// together (2x radix-2): the partner differs by 2 in the dropped slot of the largest radix, so its
// four operands again fall in four different banks (with five banks, every fifth pair of values
// has no partner and runs alone). After each stage the controller stalls STALL_CYCLES cycles so
// the pipeline drains before the next stage reads; 'stall' is high then. The twiddle exponent
// base for the stage is n_low * tscale, n_low being the value of the less significant digits of
// the same coprime group (the PE multiplies lane l by W^(l*base)).
// Cycle count: sum over stages of the butterfly issues, plus STALL_CYCLES per stage; 'busy' is
// high for exactly those cycles and 'done' pulses on the next one. With STALL_CYCLES = 7 this
// gives the 284 cycles (256-pt) and 1,905 cycles (972-pt) quoted in the document; the value 7 is
// inferred from those numbers. Issue outputs are combinational from registered state.
module calc_ctrl
  import fft_pkg::*;
#(
  parameter int STALL_CYCLES = 7
) (
  input  logic                          clk,
  input  logic                          rst,
  input  fft_cfg_t                      cfg,
  input  logic                          start,
  input  logic                          fwd,
  output logic                          busy,
  output logic                          done,
  output logic                          stall,
  output logic                          fwd_q,
  output logic [NBANK-1:0]              lane_valid,
  output logic [NBANK-1:0][2:0]         lane_bank,
  output logic [NBANK-1:0][ADDR_W-1:0]  lane_addr,
  output op_e                           op,
  output logic [W_W-1:0]                tw_base,
  output logic [1:0]                    tw_grp
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_STALL} state_e;
  state_e state;

  logic [3:0] stage, nstages;
  logic [NSLOT-1:0][3:0] order;
  logic [3:0] j;
  loc_t cnt, cnt_n, zero_l, er;
  logic last;
  logic [7:0] scnt;
  logic [2:0] r;
  logic pairs;

  // active slots in processing order
  always_comb begin
    int k;
    k = 0;
    order = '0;
    for (int i = 0; i < NSLOT; i++) begin
      int s;
      s = fwd_q ? i : NSLOT - 1 - i;
      if (cfg.radix[s] != 3'd1) begin
        order[k] = 4'(s);
        k++;
      end
    end
    nstages = 4'(k);
  end

  assign j     = order[stage];
  assign r     = cfg.radix[j];
  assign pairs = (r == 3'd2) && cfg.dual;

  always_comb begin
    zero_l = '0;
    er = cfg.radix;
    er[j] = 3'd1;
    if (pairs) er[cfg.drop] = (cfg.rmax == 3'd4) ? 3'd2 : 3'd3;
  end

  mr_adder #(.NDIG(NSLOT)) u_cnt (.a(cnt), .b(zero_l), .radix(er), .cin(1'b1), .s(cnt_n), .cout(last));

  always_comb begin
    case (r)
      3'd2:    op = pairs ? OP_R2X2 : OP_R2;
      3'd3:    op = OP_R3;
      3'd4:    op = OP_R4;
      default: op = OP_R5;
    endcase
  end

  // operand locations of the current butterfly (or butterfly pair)
  always_comb begin
    logic [2:0] v;
    logic       single;
    v = cnt[cfg.drop];
    single = 1'b0;
    if (pairs && cfg.rmax == 3'd5 && v == 3'd2) begin
      v = 3'd4;
      single = 1'b1;
    end
    for (int l = 0; l < NBANK; l++) begin
      loc_t d;
      d = cnt;
      if (pairs) begin
        d[j] = 3'(l % 2);
        d[cfg.drop] = v + 3'(2 * (l / 2));
        lane_valid[l] = (state == S_RUN) && (l < 2 || (l < 4 && !single));
      end else begin
        d[j] = 3'(l);
        lane_valid[l] = (state == S_RUN) && (3'(l) < r);
      end
      lane_bank[l] = loc_bank(d, cfg.rmax);
      lane_addr[l] = loc_addr(d, cfg.aw);
    end
  end

  // twiddle exponent base: value of the lower digits of the same group, renormalised
  always_comb begin
    logic [2*W_W-1:0] nlow;
    int g;
    g = grp_of_slot(int'(j));
    nlow = '0;
    for (int s = 0; s < NSLOT; s++)
      if (grp_of_slot(s) == g && s > int'(j)) nlow = nlow + (2*W_W)'(cnt[s]) * (2*W_W)'(cfg.gw[s]);
    tw_base = W_W'(nlow * (2*W_W)'(cfg.tscale[j]));
    tw_grp  = 2'(g);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      stage <= '0;
      cnt   <= '0;
      scnt  <= '0;
      fwd_q <= 1'b1;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE:
          if (start) begin
            fwd_q <= fwd;
            stage <= '0;
            cnt   <= '0;
            state <= S_RUN;
          end
        S_RUN: begin
          cnt <= cnt_n;
          if (last) begin
            cnt   <= '0;
            scnt  <= 8'(STALL_CYCLES - 1);
            state <= S_STALL;
          end
        end
        default: begin       // S_STALL
          if (scnt == '0) begin
            if (stage + 4'd1 >= nstages) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              stage <= stage + 4'd1;
              state <= S_RUN;
            end
          end else scnt <= scnt - 8'd1;
        end
      endcase
    end
  end

  assign busy  = (state != S_IDLE);
  assign stall = (state == S_STALL);

  initial assert (STALL_CYCLES >= PE_LAT) else $error("STALL_CYCLES must cover the PE latency");
endmodule
