// normalize: optional output normalisation of the FFT results.
//
// Divides each output by 2^shift with rounding to nearest (arithmetic shift of real and
// imaginary parts after adding half an LSB) and registers the result together with its valid
// flag. The setup chooses shift = floor(log2(N) / 2), an approximation of a 1/sqrt(N) scaling;
// the document names the block but not its rule, so the rule is this design's choice.
module normalize
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  cplx_t      din,
  input  logic [3:0] shift,
  output logic       out_valid,
  output cplx_t      dout
);
  function automatic logic signed [DATA_W-1:0] rshift(logic signed [DATA_W-1:0] v, logic [3:0] sh);
    logic signed [DATA_W:0] t;
    t = (DATA_W+1)'(v);
    if (sh != 0) t = t + ((DATA_W+1)'(1) <<< (sh - 4'd1));
    return DATA_W'(t >>> sh);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
    dout.re <= rshift(din.re, shift);
    dout.im <= rshift(din.im, shift);
  end
endmodule
