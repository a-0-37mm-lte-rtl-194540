// index_mapper: IO index to memory bank / address generator (the document's Fig. 3).
//
// Maps the running IO index i = 0..N-1 to the location of sample i without look-up tables.
// Three group mappers, one per coprime factor 2^n, 3^m, 5^k, each hold a mixed-radix counter
// n_y' and an accumulator R_y. The innermost mapper counts every step, the next one counts when
// the inner one wraps, the outermost when both wrap. R_y adds the constant Q_y' every step and
// returns to 0 whenever n_y' counts; the group value is n_y = n_y' + R_y (mixed-radix adds, so
// the modulo N_y is free). With Q' = inv(product of inner group sizes) mod N_y this realises the
// prime-factor index map n_y = c_y * i mod N_y.
//   fwd = 1: forward-input map. Mapper order (outer..inner) 2^n, 3^m, 5^k; digits in natural
//            radix order.
//   fwd = 0: forward-output map, used for reverse (DIT) symbols. Order 5^k, 3^m, 2^n; each group
//            counts in the reversed radix order and its digits are placed digit-reversed.
// Both maps share the counters, as in the document; only the radices, Q' constants and the digit
// placement change. The location, bank (digit sum mod radix_max) and address are combinational
// from the registered state; 'step' advances to the next index on the clock edge. 'clear'
// returns to index 0 and wins over 'step'. fwd may only change while the index is 0.
module index_mapper
  import fft_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               clear,
  input  logic               step,
  input  logic               fwd,
  input  fft_cfg_t           cfg,
  output loc_t               loc,
  output logic [2:0]         bank,
  output logic [ADDR_W-1:0]  addr,
  output logic               last    // the current index is N-1
);
  mdig_t [2:0] cnt, racc, zero;
  mdig_t [2:0] cnt_n, racc_n, val, rad, q;
  logic  [2:0] c_inc, c_acc, c_val, inc;
  int gi, go;

  always_comb begin
    for (int g = 0; g < 3; g++) begin
      zero[g] = '0;
      q[g]    = fwd ? cfg.q_fwd[g] : cfg.q_rev[g];
      for (int x = 0; x < NDIG; x++)
        rad[g][x] = (x < GRP_LEN[g]) ? cfg.radix[map_slot(g, x, fwd)] : 3'd1;
    end
  end

  for (genvar g = 0; g < 3; g++) begin : g_map
    mr_adder #(.NDIG(NDIG)) u_inc (.a(cnt[g]), .b(zero[g]), .radix(rad[g]), .cin(1'b1),
                                   .s(cnt_n[g]), .cout(c_inc[g]));
    mr_adder #(.NDIG(NDIG)) u_acc (.a(racc[g]), .b(q[g]), .radix(rad[g]), .cin(1'b0),
                                   .s(racc_n[g]), .cout(c_acc[g]));
    mr_adder #(.NDIG(NDIG)) u_val (.a(cnt[g]), .b(racc[g]), .radix(rad[g]), .cin(1'b0),
                                   .s(val[g]), .cout(c_val[g]));
  end

  // Counting order: inner group counts every step, outer ones on the wraps of inner ones.
  always_comb begin
    gi = fwd ? 2 : 0;
    go = fwd ? 0 : 2;
    inc     = '0;
    inc[gi] = step;
    inc[1]  = step & c_inc[gi];
    inc[go] = inc[1] & c_inc[1];
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      cnt  <= '0;
      racc <= '0;
    end else if (step) begin
      for (int g = 0; g < 3; g++) begin
        if (inc[g]) cnt[g] <= cnt_n[g];
        racc[g] <= (inc[g] || g == gi) ? '0 : racc_n[g];
      end
    end
  end

  // Combine the group values into one location vector (with digit reversal when fwd = 0).
  always_comb begin
    loc = '0;
    for (int g = 0; g < 3; g++)
      for (int x = 0; x < NDIG; x++)
        if (x < GRP_LEN[g]) loc[map_slot(g, x, fwd)] = val[g][x];
  end

  assign bank = loc_bank(loc, cfg.rmax);
  assign addr = loc_addr(loc, cfg.aw);
  assign last = c_inc[0] & c_inc[1] & c_inc[2];

  // Unused outputs of the adders (carries of the value sums) are not needed.
  logic unused;
  assign unused = ^{c_acc, c_val};
endmodule
