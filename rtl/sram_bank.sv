// sram_bank: one SRAM bank with a synchronous read port and a write port.
//
// Stands in for a two-port SRAM macro. rdata returns the word addressed in the previous cycle;
// a read and a write of the same address in one cycle return the old word (read before
// write), which the in-place input/output of the FFT relies on.
module sram_bank
  import fft_pkg::*;
#(
  parameter int DEPTH = 512
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] raddr,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  cplx_t             wdata,
  output cplx_t             rdata
);
  localparam int AW = $clog2(DEPTH);
  cplx_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && int'(waddr) < DEPTH) mem[AW'(waddr)] <= wdata;
    rdata <= (int'(raddr) < DEPTH) ? mem[AW'(raddr)] : '0;
  end
endmodule
