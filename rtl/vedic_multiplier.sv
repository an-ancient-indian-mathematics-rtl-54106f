// vedic_multiplier: SADHNA, a 4-digit by 4-digit multiplier built on the
// Urdhva-Tiryagbhyam ("vertically and crosswise") rule.
//
// The multiplicand is the digit string a b c d and the multiplier e f g h,
// leftmost digit first, each digit a signed W-bit integer read in base RADIX.
// Treating both as polynomials in x = RADIX, the product's coefficient of x^k
// is the sum of all digit products whose weights add up to k:
//
//   x^6 : a*e                      (vertical)
//   x^5 : a*f + b*e                (crosswise, two products)
//   x^4 : a*g + b*f + c*e          (three products)
//   x^3 : a*h + b*g + c*f + d*e    (four products, the widest column)
//   x^2 : b*h + c*g + d*f
//   x^1 : c*h + d*g
//   x^0 : d*h                      (vertical)
//
// All sixteen digit products are formed at once by sixteen two-input
// multipliers and every column is summed in parallel by a two-, three- or
// four-input adder, so no column waits for another. The columns are then
// weighted by RADIX^k (constant multipliers) and added, which resolves every
// carry between columns in one step, giving the integer product on i.
//
// Interface: inputs a..h, output i, all signed W bits. Timing: purely
// combinational, no clock or reset; i is valid one propagation delay after the
// inputs settle. i is exact whenever the product fits in W bits and wraps
// modulo 2^W otherwise. Digits outside 0..RADIX-1, including negative ones,
// are accepted and weighted just the same.
//
// The port names, widths, the column rule and the four component kinds follow
// the published design. Which port holds which digit, the weighting of the
// columns into one integer output and the wrap-around on overflow are this
// implementation's choices.
module vedic_multiplier #(
  parameter int unsigned W     = sadhna_pkg::SADHNA_W,
  parameter int          RADIX = sadhna_pkg::SADHNA_RADIX
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic signed [W-1:0] c,
  input  logic signed [W-1:0] d,
  input  logic signed [W-1:0] e,
  input  logic signed [W-1:0] f,
  input  logic signed [W-1:0] g,
  input  logic signed [W-1:0] h,
  output logic signed [W-1:0] i
);
  localparam int unsigned N = sadhna_pkg::SADHNA_DIGITS;  // digits per operand
  localparam int unsigned K = 2 * N - 1;                  // product columns

  // RADIX^k truncated to W bits, the weight of column k.
  function automatic logic signed [W-1:0] weight(input int unsigned k);
    logic signed [W-1:0] r;
    r = W'(1);
    for (int unsigned n = 0; n < k; n++) r = r * W'(RADIX);
    return r;
  endfunction

  // Digits indexed by weight: md[3] = a is the leftmost multiplicand digit.
  logic signed [W-1:0] md [N];
  logic signed [W-1:0] mr [N];
  always_comb begin
    md = '{d, c, b, a};
    mr = '{h, g, f, e};
  end

  // Vertical and crosswise products: pp[j][k] = md[j] * mr[k], weight j+k.
  logic signed [W-1:0] pp [N][N];
  for (genvar j = 0; j < N; j++) begin : g_row
    for (genvar k = 0; k < N; k++) begin : g_col
      sadhna_mul2 #(.W(W)) u_mul (.x0(md[j]), .x1(mr[k]), .y(pp[j][k]));
    end
  end

  // Column sums: col[k] is the coefficient of x^k.
  logic signed [W-1:0] col [K];
  assign col[6] = pp[3][3];                                        // a*e
  sadhna_add2 #(.W(W)) u_col5 (.x0(pp[3][2]), .x1(pp[2][3]), .y(col[5]));
  sadhna_add3 #(.W(W)) u_col4 (.x0(pp[3][1]), .x1(pp[2][2]), .x2(pp[1][3]),
                               .y(col[4]));
  sadhna_add4 #(.W(W)) u_col3 (.x0(pp[3][0]), .x1(pp[2][1]), .x2(pp[1][2]),
                               .x3(pp[0][3]), .y(col[3]));
  sadhna_add3 #(.W(W)) u_col2 (.x0(pp[2][0]), .x1(pp[1][1]), .x2(pp[0][2]),
                               .y(col[2]));
  sadhna_add2 #(.W(W)) u_col1 (.x0(pp[1][0]), .x1(pp[0][1]), .y(col[1]));
  assign col[0] = pp[0][0];                                        // d*h

  // Place each column at its weight RADIX^k; column 0 has weight one.
  logic signed [W-1:0] term [K];
  assign term[0] = col[0];
  for (genvar k = 1; k < K; k++) begin : g_weight
    sadhna_mul2 #(.W(W)) u_wmul (.x0(col[k]), .x1(weight(k)), .y(term[k]));
  end

  // Sum of the weighted columns: upper four, lower three, then together.
  logic signed [W-1:0] sum_hi, sum_lo;
  sadhna_add4 #(.W(W)) u_sum_hi (.x0(term[6]), .x1(term[5]), .x2(term[4]),
                                 .x3(term[3]), .y(sum_hi));
  sadhna_add3 #(.W(W)) u_sum_lo (.x0(term[2]), .x1(term[1]), .x2(term[0]),
                                 .y(sum_lo));
  sadhna_add2 #(.W(W)) u_sum    (.x0(sum_hi), .x1(sum_lo), .y(i));
endmodule
