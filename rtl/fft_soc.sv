// fft_soc: chip-level top of the FFT accelerator system.
//
// Puts together the clocking path (ring oscillator model, dividers and clock mux), the
// processor-side register interface with its test and snapshot SRAMs, and the FFT engine.
// The RISC-V core, its caches, the on-chip network and the host link are not part of this RTL:
// the memory-mapped bus they would drive is brought out as the mmio_* ports, so a testbench or
// another processor can play their part. Everything after the clock mux runs on one clock,
// clk_core; rst is synchronous to it and also clears the divider chain asynchronously (the
// dividers must restart while the clock they produce is stopped, so a lint tool that sees rst
// used both ways is expected to say so). Test software follows
// the sequence: write IS_FFT and FFT_IDX, write SETUP and poll it, load the test SRAM, write
// CALC and poll it, read the snapshot SRAM (see fft_rocket_if for the address map).
module fft_soc
  import fft_pkg::*;
(
  input  logic        ext_clk,
  input  logic        rosc_en,
  input  logic [2:0]  clk_sel,
  input  logic        rst,
  input  logic [15:0] mmio_addr,
  input  logic        mmio_we,
  input  logic        mmio_re,
  input  logic [63:0] mmio_wdata,
  output logic [63:0] mmio_rdata,
  output logic        mmio_rvalid,
  output logic        clk_core,
  output logic        calc_busy
);
  logic rosc_clk;
  logic setup_enable, is_fft, setup_done, fft_reset, fft_enable, out_valid, k_last, calc_stall;
  logic [IDX_W-1:0] fft_idx;
  logic [N_W-1:0]   fft_n;
  logic [K_W-1:0]   k;
  cplx_t            data_in, data_out;

  ring_osc u_rosc (.en(rosc_en), .clk(rosc_clk));

  clk_gen u_clk (.rosc_clk, .ext_clk, .rst_div(rst), .clk_sel, .clk_out(clk_core));

  fft_rocket_if u_if (
    .clk(clk_core), .rst, .mmio_addr, .mmio_we, .mmio_re, .mmio_wdata, .mmio_rdata, .mmio_rvalid,
    .setup_enable, .fft_idx, .is_fft, .setup_done, .fft_n, .fft_reset, .fft_enable, .data_in,
    .out_valid, .data_out, .k, .k_last);

  fft_engine u_fft (
    .clk(clk_core), .rst, .setup_enable, .fft_idx, .is_fft, .setup_done, .fft_n, .fft_reset,
    .fft_enable, .data_in, .out_valid, .data_out, .k, .k_last, .calc_busy, .calc_stall);

  logic unused;
  assign unused = calc_stall;
endmodule
