// mr_adder: mixed-radix adder built from a chain of base-r adder units.
//
// Each digit position x has its own radix r_x (1..5). An adder unit forms o = a_x + b_x + cin_x;
// since o < 2*r_x, the sum digit is o or o - r_x, and the carry out is set when o >= r_x, so a
// subtraction and a mux replace a modulo operation (as in the document's Fig. 3). Radix-1
// digits are always 0 and simply pass the carry on, which lets shorter numbers share the same
// hardware. Purely combinational. Digit 0 is the least significant.
module mr_adder #(
  parameter int NDIG = 6
) (
  input  logic [NDIG-1:0][2:0] a,
  input  logic [NDIG-1:0][2:0] b,
  input  logic [NDIG-1:0][2:0] radix,
  input  logic                 cin,
  output logic [NDIG-1:0][2:0] s,
  output logic                 cout
);
  logic [NDIG:0] c;
  assign c[0] = cin;

  for (genvar x = 0; x < NDIG; x++) begin : g_unit
    logic [3:0] o, d;
    assign o      = 4'(a[x]) + 4'(b[x]) + 4'(c[x]);
    assign d      = o - 4'(radix[x]);
    assign c[x+1] = ~d[3];                 // o >= r when the difference is not negative
    assign s[x]   = d[3] ? o[2:0] : d[2:0];
  end

  assign cout = c[NDIG];
endmodule
