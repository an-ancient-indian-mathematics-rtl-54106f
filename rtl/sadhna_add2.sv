// sadhna_add2: two-input signed integer adder, a SADHNA component.
//
// y = x0 + x1, kept to the low W bits (wraps on overflow). Combinational, no
// clock. Function and 32-bit integer range follow the design; the single '+'
// and the wrap-around are this implementation's choices.
module sadhna_add2 #(
  parameter int unsigned W = sadhna_pkg::SADHNA_W
) (
  input  logic signed [W-1:0] x0,
  input  logic signed [W-1:0] x1,
  output logic signed [W-1:0] y
);
  always_comb y = x0 + x1;
endmodule
