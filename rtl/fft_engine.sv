// fft_engine: runtime-reconfigurable, memory-based 2^n 3^m 5^k FFT accelerator.
//
// Streaming FFT for the 42 Wi-Fi / LTE lengths (12..2048). A setup pulse selects the length;
// after fft_reset, one complex sample is taken in each cycle with fft_enable high, and the
// transformed symbols come out in natural order, two symbols later, one per accepted input
// sample, with k counting 0..N-1. Structure (the document's Fig. 4):
//   fft_setup    length -> radices, bank/address weights, twiddle factors, mapper constants
//   io_ctrl      in-place streaming IO on one memory, alternating forward / reverse symbols
//   calc_ctrl    stage and butterfly sequencing of the other memory, conflict-free banks
//   twiddle_ctrl three twiddle ROMs (2^N, 3^M, 5^K; 1,718 words)
//   pe           radix 2x2/3/4/5 Winograd butterfly + 4 twiddle multipliers
//   mem_arbiter  routes IO and calculation to memory A / B
//   data_memory  two memories of five banks (4x512 + 240 words each)
//   normalize    output scaling by 2^-floor(log2(N)/2)
// The calculation needs at most about 1.6N to 2N cycles, so the input rate may be at most one
// sample every two cycles (the calculation clock runs at twice the IO rate, as in the
// document). With is_fft = 0 the inverse DFT (without 1/N) is computed by conjugating the
// input and the output. Data: 24-bit two's complement real and imaginary parts; the transform
// is unscaled inside, so inputs need log2(N) bits of headroom.
// Latency: the output for input position i of symbol s appears 2 cycles after the input
// position i of symbol s+2 is accepted.
module fft_engine
  import fft_pkg::*;
#(
  parameter int STALL_CYCLES = 7
) (
  input  logic              clk,
  input  logic              rst,
  // setup
  input  logic              setup_enable,
  input  logic [IDX_W-1:0]  fft_idx,
  input  logic              is_fft,
  output logic              setup_done,
  output logic [N_W-1:0]    fft_n,        // configured length
  // streaming
  input  logic              fft_reset,
  input  logic              fft_enable,
  input  cplx_t             data_in,
  output logic              out_valid,
  output cplx_t             data_out,
  output logic [K_W-1:0]    k,
  output logic              k_last,
  // status
  output logic              calc_busy,
  output logic              calc_stall
);
  fft_cfg_t cfg;

  logic              io_mem_b, io_we;
  logic [2:0]        io_bank;
  logic [ADDR_W-1:0] io_addr;
  logic              rd_valid, rd_last;
  logic [K_W-1:0]    rd_k;
  logic              calc_start, calc_mem_b, calc_fwd, calc_done, fwd_q;
  logic [NBANK-1:0]             lane_valid;
  logic [NBANK-1:0][2:0]        lane_bank;
  logic [NBANK-1:0][ADDR_W-1:0] lane_addr;
  op_e               op, op_d;
  logic              fwd_d, issue_d, y_valid;
  logic [W_W-1:0]    tw_base;
  logic [1:0]        tw_grp;
  tw_t  [3:0]        w;
  cplx_t [NBANK-1:0] x, y;
  cplx_t             io_wdata, io_rdata, nout;
  logic  [1:0][NBANK-1:0][ADDR_W-1:0] m_raddr, m_waddr;
  logic  [1:0][NBANK-1:0]             m_we;
  cplx_t [1:0][NBANK-1:0]             m_wdata, m_rdata;

  fft_setup u_setup (.clk, .rst, .setup_enable, .fft_idx, .is_fft, .cfg, .setup_done);

  io_ctrl u_io (
    .clk, .rst, .cfg, .fft_reset, .fft_enable, .calc_busy,
    .io_mem_b, .io_we, .io_bank, .io_addr, .rd_valid, .rd_k, .rd_last,
    .calc_start, .calc_mem_b, .calc_fwd);

  calc_ctrl #(.STALL_CYCLES(STALL_CYCLES)) u_calc (
    .clk, .rst(rst || fft_reset), .cfg, .start(calc_start), .fwd(calc_fwd),
    .busy(calc_busy), .done(calc_done), .stall(calc_stall), .fwd_q,
    .lane_valid, .lane_bank, .lane_addr, .op, .tw_base, .tw_grp);

  twiddle_ctrl u_tw (.clk, .tw_base, .tw_grp, .w);

  always_ff @(posedge clk) begin
    op_d    <= op;
    fwd_d   <= fwd_q;
    issue_d <= |lane_valid;
  end

  pe u_pe (.clk, .fwd(fwd_d), .op(op_d), .x_valid(issue_d), .x, .w, .y_valid, .y);

  assign io_wdata = cfg.is_fft ? data_in : conj(data_in);

  mem_arbiter u_arb (
    .clk, .rst(rst || fft_reset), .io_mem_b, .io_we, .io_bank, .io_addr, .io_wdata, .io_rdata,
    .calc_mem_b, .lane_valid, .lane_bank, .lane_addr, .x, .y,
    .m_raddr, .m_we, .m_waddr, .m_wdata, .m_rdata);

  for (genvar m = 0; m < 2; m++) begin : g_mem
    data_memory u_mem (.clk, .raddr(m_raddr[m]), .we(m_we[m]), .waddr(m_waddr[m]),
                       .wdata(m_wdata[m]), .rdata(m_rdata[m]));
  end

  assign fft_n = cfg.n;
  assign nout = cfg.is_fft ? io_rdata : conj(io_rdata);

  normalize u_norm (.clk, .rst(rst || fft_reset), .in_valid(rd_valid), .din(nout),
                    .shift(cfg.norm_shift), .out_valid, .dout(data_out));

  always_ff @(posedge clk) begin
    k      <= rd_k;
    k_last <= rd_last && rd_valid;
  end

  logic unused;
  assign unused = ^{calc_done, y_valid};
endmodule
