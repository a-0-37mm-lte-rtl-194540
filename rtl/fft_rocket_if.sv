// fft_rocket_if: register interface between the processor and the FFT accelerator.
//
// The processor reaches the FFT through a memory-mapped bus (one access per cycle, read data one
// cycle later; 64-bit words, byte addresses):
//   0x0000 IS_FFT     rw  bit 0: 1 = FFT, 0 = inverse FFT
//   0x0008 FFT_IDX    rw  [5:0]: length index
//   0x0010 TEST_MODE  rw  bit 0: 1 = keep streaming after a frame is captured
//   0x0018 SETUP      w: start setup        r: bit 0 = setup done
//   0x0020 CALC       w: start streaming    r: bit 0 = valid output frame captured
//   0x0028 K_OFFSET   r   k of the first captured output
//   0x4000 + 8*i      rw  test SRAM word i (input data, {re[23:0], im[23:0]} in bits 47:0)
//   0x8000 + 8*i      r   snapshot SRAM word i (output data, same format)
// A setup write pulses setup_enable; the setup state machine then waits for setup_done. A CALC
// write pulses fft_reset and starts streaming the first N words of the test SRAM into the FFT
// over and over, one sample every IO_DIV cycles. The outputs are captured into the snapshot SRAM
// at address k, starting with the first valid output; the frame is complete on the output with
// k == N-1 (out_valid AND k_last). Then the frame flag is set and, unless TEST_MODE is 1,
// streaming pauses so new test vectors can be loaded. The document shows these registers,
// memories (2048 x 48 each) and two state machines; the addresses, bus protocol and the exact
// state-machine behaviour are this design's own. A processor read of the test SRAM while
// streaming returns the word being streamed.
module fft_rocket_if
  import fft_pkg::*;
#(
  parameter int TEST_DEPTH = 2048,
  parameter int IO_DIV     = 2
) (
  input  logic              clk,
  input  logic              rst,
  // processor bus
  input  logic [15:0]       mmio_addr,
  input  logic              mmio_we,
  input  logic              mmio_re,
  input  logic [63:0]       mmio_wdata,
  output logic [63:0]       mmio_rdata,
  output logic              mmio_rvalid,
  // FFT engine
  output logic              setup_enable,
  output logic [IDX_W-1:0]  fft_idx,
  output logic              is_fft,
  input  logic              setup_done,
  input  logic [N_W-1:0]    fft_n,
  output logic              fft_reset,
  output logic              fft_enable,
  output cplx_t             data_in,
  input  logic              out_valid,
  input  cplx_t             data_out,
  input  logic [K_W-1:0]    k,
  input  logic              k_last
);
  localparam int AW = $clog2(TEST_DEPTH);

  typedef enum logic [1:0] {SU_IDLE, SU_WAIT, SU_DONE} setup_e;
  typedef enum logic [1:0] {CA_IDLE, CA_RESET, CA_STREAM} calc_e;
  setup_e su_state;
  calc_e  ca_state;

  cplx_t test_mem [TEST_DEPTH];
  cplx_t snap_mem [TEST_DEPTH];

  logic          test_mode, frame_valid, capturing;
  logic [K_W-1:0] k_offset;
  logic [AW-1:0] sidx;
  logic [7:0]    div;
  logic          rd_test, rd_snap, stream_rd;
  logic [63:0]   reg_q;
  cplx_t         test_q, snap_q;
  logic [AW-1:0] test_raddr;

  wire sel_reg  = (mmio_addr[15:14] == 2'b00);
  wire sel_test = (mmio_addr[15:14] == 2'b01);
  wire sel_snap = (mmio_addr[15:14] == 2'b10);
  wire [AW-1:0] widx = mmio_addr[AW+2:3];

  // ------------------------------------------------------------ memories
  assign stream_rd  = (ca_state == CA_STREAM) && (div == '0);
  assign test_raddr = stream_rd ? sidx : widx;

  always_ff @(posedge clk) begin
    if (mmio_we && sel_test) test_mem[widx] <= mmio_wdata[2*DATA_W-1:0];
    test_q <= test_mem[test_raddr];
  end

  always_ff @(posedge clk) begin
    if (out_valid && !frame_valid && (ca_state == CA_STREAM || capturing) && int'(k) < TEST_DEPTH) snap_mem[AW'(k)] <= data_out;
    snap_q <= snap_mem[widx];
  end

  // ------------------------------------------------------------ registers and state machines
  always_ff @(posedge clk) begin
    if (rst) begin
      is_fft       <= 1'b1;
      fft_idx      <= '0;
      test_mode    <= 1'b0;
      su_state     <= SU_IDLE;
      ca_state     <= CA_IDLE;
      setup_enable <= 1'b0;
      fft_reset    <= 1'b0;
      fft_enable   <= 1'b0;
      frame_valid  <= 1'b0;
      capturing    <= 1'b0;
      k_offset     <= '0;
      sidx         <= '0;
      div          <= '0;
    end else begin
      setup_enable <= 1'b0;
      fft_reset    <= 1'b0;
      // register writes
      if (mmio_we && sel_reg) begin
        case (mmio_addr[7:3])
          5'd0: is_fft    <= mmio_wdata[0];
          5'd1: fft_idx   <= mmio_wdata[IDX_W-1:0];
          5'd2: test_mode <= mmio_wdata[0];
          5'd3: if (su_state != SU_WAIT) begin
                  setup_enable <= 1'b1;
                  su_state     <= SU_WAIT;
                end
          5'd4: begin
                  fft_reset   <= 1'b1;
                  frame_valid <= 1'b0;
                  capturing   <= 1'b0;
                  ca_state    <= CA_RESET;
                end
          default: ;
        endcase
      end
      // setup state machine: wait for the engine after the pulse
      if (su_state == SU_WAIT && !setup_enable && setup_done) su_state <= SU_DONE;
      // calculate state machine: stream test data, capture one frame
      case (ca_state)
        CA_RESET: begin
          sidx     <= '0;
          div      <= '0;
          ca_state <= CA_STREAM;
        end
        CA_STREAM: begin
          div <= (int'(div) == IO_DIV - 1) ? '0 : div + 8'd1;
          if (stream_rd) sidx <= (int'(sidx) + 1 >= int'(fft_n)) ? '0 : sidx + 1'b1;
          if (frame_valid && !test_mode && stream_rd) ca_state <= CA_IDLE;
        end
        default: ;
      endcase
      fft_enable  <= stream_rd && !(mmio_we && sel_reg && mmio_addr[7:3] == 5'd4);
      // capture
      if (out_valid && !frame_valid && (ca_state == CA_STREAM || capturing)) begin
        if (!capturing) begin
          capturing <= 1'b1;
          k_offset  <= k;
        end
        if (k_last) begin
          capturing   <= 1'b0;
          frame_valid <= 1'b1;
        end
      end
    end
  end

  assign data_in = test_q;

  // ------------------------------------------------------------ read data
  always_ff @(posedge clk) begin
    rd_test     <= mmio_re && sel_test;
    rd_snap     <= mmio_re && sel_snap;
    mmio_rvalid <= mmio_re;
    case (mmio_addr[7:3])
      5'd0:    reg_q <= 64'(is_fft);
      5'd1:    reg_q <= 64'(fft_idx);
      5'd2:    reg_q <= 64'(test_mode);
      5'd3:    reg_q <= 64'(su_state == SU_DONE);
      5'd4:    reg_q <= 64'(frame_valid);
      5'd5:    reg_q <= 64'(k_offset);
      default: reg_q <= '0;
    endcase
  end

  always_comb begin
    if (rd_test)      mmio_rdata = 64'(test_q);
    else if (rd_snap) mmio_rdata = 64'(snap_q);
    else              mmio_rdata = reg_q;
  end
endmodule
