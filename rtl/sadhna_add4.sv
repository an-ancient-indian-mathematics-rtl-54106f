// sadhna_add4: four-input signed integer adder, a SADHNA component.
//
// y = x0 + x1 + x2 + x3, kept to the low W bits (wraps on overflow).
// Combinational, no clock. It sums the four crosswise products of the middle
// (x^3) column. Function and 32-bit integer range follow the design; the
// inside, a balanced tree of two two-operand sums added together, and the
// wrap-around are this implementation's choices.
module sadhna_add4 #(
  parameter int unsigned W = sadhna_pkg::SADHNA_W
) (
  input  logic signed [W-1:0] x0,
  input  logic signed [W-1:0] x1,
  input  logic signed [W-1:0] x2,
  input  logic signed [W-1:0] x3,
  output logic signed [W-1:0] y
);
  logic signed [W-1:0] s01, s23;

  always_comb begin
    s01 = x0 + x1;
    s23 = x2 + x3;
    y   = s01 + s23;
  end
endmodule
