// tb_vedic_multiplier: end-to-end self-checking testbench for the SADHNA
// 4-digit by 4-digit multiplier at its default parameters (W = 32, RADIX = 10).
//
// The digits a b c d (multiplicand) and e f g h (multiplier) are driven, the
// combinational result is sampled 1 ns later and compared with a reference
// computed here without the column rule: both operands are first assembled
// into integers (digit * 10^k summed) and multiplied in 64-bit arithmetic,
// then truncated to 32 bits. The seven column sums of the digit products are
// computed here only to classify the stimulus (whether a column carries).
//
// Stimulus: the two worked examples 12 x 13 = 156 and 3451 x 0001, the
// all-nines worst case, every single-digit pair, random 4-digit decimal
// operands, random signed digits and random full-range digits (products that
// overflow and wrap). The mechanisms of the design are counted and each must
// occur at least once: a carry out of a column (column sum >= 10), a busy
// widest column (all four crosswise products of x^3 non-zero), negative
// digits and a product that wraps modulo 2^32.
module tb_vedic_multiplier;
  localparam int unsigned W = 32;
  localparam int          R = 10;

  logic signed [W-1:0] a, b, c, d, e, f, g, h, i;
  int checks = 0, failures = 0;
  int n_carry = 0, n_wide = 0, n_negative = 0, n_wrap = 0;

  vedic_multiplier dut (.*);

  // Operand value of a digit string, leftmost digit first.
  function automatic longint value(input longint d3, d2, d1, d0);
    return ((d3 * R + d2) * R + d1) * R + d0;
  endfunction

  task automatic apply(input longint da, db, dc, dd, de, df, dg, dh);
    longint m [4], q [4], colref [7], prod, vm, vq;
    bit carry;
    a = W'(da); b = W'(db); c = W'(dc); d = W'(dd);
    e = W'(de); f = W'(df); g = W'(dg); h = W'(dh);
    #1;
    // sign-extended values the design actually sees
    m = '{longint'(d), longint'(c), longint'(b), longint'(a)};
    q = '{longint'(h), longint'(g), longint'(f), longint'(e)};
    vm = value(m[3], m[2], m[1], m[0]);
    vq = value(q[3], q[2], q[1], q[0]);
    prod = vm * vq;
    checks++;
    if (i !== prod[W-1:0]) begin
      failures++;
      $display("MISMATCH %0d %0d %0d %0d x %0d %0d %0d %0d: i=%0d expected=%0d",
               a, b, c, d, e, f, g, h, i, $signed(prod[W-1:0]));
    end
    // column sums, from the digit products directly (for the carry count)
    foreach (colref[k]) colref[k] = 0;
    for (int j = 0; j < 4; j++)
      for (int k = 0; k < 4; k++) colref[j + k] += m[j] * q[k];
    carry = 0;
    foreach (colref[k]) if (colref[k] >= longint'(R)) carry = 1;
    if (carry) n_carry++;
    if (m[3] * q[0] != 0 && m[2] * q[1] != 0 && m[1] * q[2] != 0 && m[0] * q[3] != 0) n_wide++;
    if (m[0] < 0 || m[1] < 0 || m[2] < 0 || m[3] < 0 ||
        q[0] < 0 || q[1] < 0 || q[2] < 0 || q[3] < 0) n_negative++;
    if (prod > 64'sh7fff_ffff || prod < -64'sh8000_0000) n_wrap++;
  endtask

  function automatic longint rdigit();
    return longint'($urandom_range(0, R - 1));
  endfunction

  initial begin
    // 12 x 13 = 156, the worked example, as 0012 x 0013
    apply(0, 0, 1, 2, 0, 0, 1, 3);
    checks++;
    if (i != 156) begin failures++; $display("12 x 13 gave %0d", i); end
    // 3451 x 0001
    apply(3, 4, 5, 1, 0, 0, 0, 1);
    checks++;
    if (i != 3451) begin failures++; $display("3451 x 1 gave %0d", i); end
    // 9999 x 9999 = 99980001, the largest 4-digit decimal product
    apply(9, 9, 9, 9, 9, 9, 9, 9);
    checks++;
    if (i != 99980001) begin failures++; $display("9999 x 9999 gave %0d", i); end
    // each digit position of one operand against each of the other
    for (int p = 0; p < 4; p++)
      for (int s = 0; s < 4; s++) begin
        longint v [8];
        foreach (v[k]) v[k] = 0;
        v[p] = 7; v[4 + s] = 8;
        apply(v[0], v[1], v[2], v[3], v[4], v[5], v[6], v[7]);
      end
    // random 4-digit decimal operands
    for (int n = 0; n < 3000; n++)
      apply(rdigit(), rdigit(), rdigit(), rdigit(), rdigit(), rdigit(), rdigit(), rdigit());
    // random signed digits
    for (int n = 0; n < 1000; n++) begin
      longint v [8];
      foreach (v[k]) v[k] = longint'($urandom_range(0, 40)) - 20;
      apply(v[0], v[1], v[2], v[3], v[4], v[5], v[6], v[7]);
    end
    // random full-range integers as digits: the result wraps modulo 2^32
    for (int n = 0; n < 1000; n++) begin
      longint v [8];
      foreach (v[k]) v[k] = longint'(int'($urandom));
      apply(v[0], v[1], v[2], v[3], v[4], v[5], v[6], v[7]);
    end

    $display("mechanisms: carry=%0d widest_column=%0d negative=%0d wrap=%0d",
             n_carry, n_wide, n_negative, n_wrap);
    if (n_carry == 0)    begin failures++; $display("no column carry exercised"); end
    if (n_wide == 0)     begin failures++; $display("x^3 column never fully used"); end
    if (n_negative == 0) begin failures++; $display("no negative digit exercised"); end
    if (n_wrap == 0)     begin failures++; $display("no wrapping product exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
