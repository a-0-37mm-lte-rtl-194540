// ring_osc: behavioural model of the voltage-tunable on-chip ring oscillator (not synthesizable).
//
// The real part is an odd chain of inverters on its own tunable supply followed by a level
// shifter into the core supply; its frequency depends on that supply. This model only toggles
// its output every HALF_PERIOD time units while en is high and holds it at 0 otherwise, so the
// clocking path can be simulated. Ports follow the document's figure (enable in, clock out).
module ring_osc #(
  parameter int HALF_PERIOD = 3
) (
  input  logic en,
  output logic clk
);
  initial clk = 1'b0;

  always begin
    #(HALF_PERIOD);
    clk = en ? ~clk : 1'b0;
  end
endmodule
