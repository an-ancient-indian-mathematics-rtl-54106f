// sadhna_add3: three-input signed integer adder, a SADHNA component.
//
// y = x0 + x1 + x2, kept to the low W bits (wraps on overflow). Combinational,
// no clock. It sums the three crosswise products of the x^4 and x^2 columns.
// Function and 32-bit integer range follow the design; the three-operand '+'
// and the wrap-around are this implementation's choices.
module sadhna_add3 #(
  parameter int unsigned W = sadhna_pkg::SADHNA_W
) (
  input  logic signed [W-1:0] x0,
  input  logic signed [W-1:0] x1,
  input  logic signed [W-1:0] x2,
  output logic signed [W-1:0] y
);
  always_comb y = x0 + x1 + x2;
endmodule
