// data_memory: one calculation memory (Memory A or Memory B) of the FFT.
//
// Five banks, each with a read and a write port per cycle: banks 0..3 have BANK_DEPTH words and
// bank 4 LAST_DEPTH words, 2,288 words of 2x24 bits in all (the document's 4x512 and 240). A
// size whose largest radix is 4 uses banks 0..3 with up to 512 words each (N up to 2048); one with
// a radix-5 factor uses all five banks with up to 240 words (N up to 1200). Read data appears one
// cycle after the address; reads see the old word when the same address is written.
module data_memory
  import fft_pkg::*;
#(
  parameter int BANK_DEPTH = fft_pkg::DEPTH_MAIN,
  parameter int LAST_DEPTH = fft_pkg::DEPTH_LAST
) (
  input  logic                          clk,
  input  logic [NBANK-1:0][ADDR_W-1:0]  raddr,
  input  logic [NBANK-1:0]              we,
  input  logic [NBANK-1:0][ADDR_W-1:0]  waddr,
  input  cplx_t [NBANK-1:0]             wdata,
  output cplx_t [NBANK-1:0]             rdata
);
  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    sram_bank #(.DEPTH(b < NBANK - 1 ? BANK_DEPTH : LAST_DEPTH)) u_bank (
      .clk, .raddr(raddr[b]), .we(we[b]), .waddr(waddr[b]), .wdata(wdata[b]), .rdata(rdata[b]));
  end
endmodule
