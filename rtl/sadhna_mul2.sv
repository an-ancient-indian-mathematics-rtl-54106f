// sadhna_mul2: two-input signed integer multiplier, one of the four component
// kinds the SADHNA multiplier is assembled from.
//
// y = x0 * x1, kept to the low W bits. Purely combinational: y follows the
// inputs with no clock and no latency. The component's function and its 32-bit
// integer range come from the design; its inside (a single '*' operator, left
// to synthesis to map) and the wrap-around on overflow are this
// implementation's choices.
module sadhna_mul2 #(
  parameter int unsigned W = sadhna_pkg::SADHNA_W
) (
  input  logic signed [W-1:0] x0,
  input  logic signed [W-1:0] x1,
  output logic signed [W-1:0] y
);
  always_comb y = x0 * x1;
endmodule
