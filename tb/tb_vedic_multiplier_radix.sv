// tb_vedic_multiplier_radix: checks the SADHNA multiplier at radices other
// than the default decimal one.
//
// Two instances are driven with the same digits: one with RADIX = 2 and
// W = 16, where each input is one bit and the design is an ordinary 4 x 4 bit
// multiplier (product < 256), and one with RADIX = 16, where each input is a
// hexadecimal digit (4-digit hex operands, product kept to 32 bits). Results
// are compared with the operands assembled into integers and multiplied here.
module tb_vedic_multiplier_radix;
  logic signed [15:0] a2, b2, c2, d2, e2, f2, g2, h2, i2;
  logic signed [31:0] a16, b16, c16, d16, e16, f16, g16, h16, i16;
  int checks = 0, failures = 0;

  vedic_multiplier #(.W(16), .RADIX(2)) dut2 (
    .a(a2), .b(b2), .c(c2), .d(d2), .e(e2), .f(f2), .g(g2), .h(h2), .i(i2));
  vedic_multiplier #(.W(32), .RADIX(16)) dut16 (
    .a(a16), .b(b16), .c(c16), .d(d16), .e(e16), .f(f16), .g(g16), .h(h16), .i(i16));

  initial begin
    // binary: every pair of 4-bit operands
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        {a2, b2, c2, d2} = {16'(x[3]), 16'(x[2]), 16'(x[1]), 16'(x[0])};
        {e2, f2, g2, h2} = {16'(y[3]), 16'(y[2]), 16'(y[1]), 16'(y[0])};
        #1;
        checks++;
        if (i2 != 16'(x * y)) begin
          failures++;
          $display("RADIX 2: %0d x %0d gave %0d", x, y, i2);
        end
      end
    // hexadecimal: random 16-bit operands split into nibbles
    for (int n = 0; n < 2000; n++) begin
      logic [15:0] x, y;
      logic [31:0] p;
      x = 16'($urandom); y = 16'($urandom);
      if (n == 0) begin x = 16'hffff; y = 16'hffff; end
      a16 = 32'(x[15:12]); b16 = 32'(x[11:8]); c16 = 32'(x[7:4]); d16 = 32'(x[3:0]);
      e16 = 32'(y[15:12]); f16 = 32'(y[11:8]); g16 = 32'(y[7:4]); h16 = 32'(y[3:0]);
      p = 32'(x) * 32'(y);
      #1;
      checks++;
      if (i16 != p) begin
        failures++;
        $display("RADIX 16: %h x %h gave %h expected %h", x, y, i16, p);
      end
    end
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
