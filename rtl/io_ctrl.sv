// io_ctrl: streaming input/output control of the FFT ("I/O Ctrl").
//
// Samples arrive one per cycle in which fft_enable is high. They go to one memory while the
// other memory is calculated; after N samples the roles swap and calc_start asks for the
// memory just filled to be transformed. Each memory alternates between forward (DIF) and
// reverse (DIT) symbols: a reverse symbol is written exactly where the previous forward result
// lies (forward-output map) and vice versa, so every input write reads, in the same cycle and at
// the same address, the finished output of the symbol before; only 2N words are needed. Output
// therefore starts with the third symbol's input. The location of index i comes from
// index_mapper. rd_valid / rd_k / rd_last qualify io_rdata one cycle after the access
// (memory latency). fft_reset restarts at index 0 of memory A, forward, with no output pending.
// The calculation of a symbol must end within the next N samples (two clock cycles per sample
// leave 2N cycles); an assertion checks it.
module io_ctrl
  import fft_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  fft_cfg_t           cfg,
  input  logic               fft_reset,
  input  logic               fft_enable,
  input  logic               calc_busy,
  // memory access
  output logic               io_mem_b,
  output logic               io_we,
  output logic [2:0]         io_bank,
  output logic [ADDR_W-1:0]  io_addr,
  // output qualification, aligned with the memory read data
  output logic               rd_valid,
  output logic [K_W-1:0]     rd_k,
  output logic               rd_last,
  // calculation request
  output logic               calc_start,
  output logic               calc_mem_b,
  output logic               calc_fwd
);
  logic       cur;
  logic [1:0] fill_fwd, has_out;
  logic [K_W-1:0] i;
  logic last;
  loc_t loc;

  index_mapper u_map (
    .clk, .rst, .clear(fft_reset), .step(fft_enable && !fft_reset), .fwd(fill_fwd[cur]), .cfg,
    .loc, .bank(io_bank), .addr(io_addr), .last);

  assign io_mem_b = cur;
  assign io_we    = fft_enable && !fft_reset;

  always_ff @(posedge clk) begin
    if (rst || fft_reset) begin
      cur        <= 1'b0;
      fill_fwd   <= 2'b11;
      has_out    <= 2'b00;
      i          <= '0;
      calc_start <= 1'b0;
      calc_mem_b <= 1'b0;
      calc_fwd   <= 1'b1;
      rd_valid   <= 1'b0;
      rd_k       <= '0;
      rd_last    <= 1'b0;
    end else begin
      calc_start <= 1'b0;
      rd_valid   <= io_we && has_out[cur];
      rd_k       <= i;
      rd_last    <= last;
      if (io_we) begin
        i <= i + 1'b1;
        if (last) begin
          i             <= '0;
          calc_start    <= 1'b1;
          calc_mem_b    <= cur;
          calc_fwd      <= fill_fwd[cur];
          has_out[cur]  <= 1'b1;
          fill_fwd[cur] <= ~fill_fwd[cur];
          cur           <= ~cur;
        end
      end
    end
  end

  // the memory taken over for IO must not still be under calculation
  always_ff @(posedge clk)
    if (!rst && !fft_reset) assert (!(io_we && calc_busy && calc_mem_b == cur && !calc_start))
      else $error("calculation overrun: symbol not finished when its memory is needed");

  logic unused;
  assign unused = ^loc;
endmodule
