// tb_sadhna_add4: self-checking testbench for sadhna_add4, the four-input signed adder.
//
// Drives directed corner values (zero, one, minus one, the 32-bit integer
// extremes) and then random operands, waits 1 ns for the combinational result
// and compares y with a reference computed independently in 64-bit arithmetic
// and truncated to W bits. A watchdog ends the run with a failure if it hangs.
module tb_sadhna_add4;
  localparam int unsigned W = 32;
  logic signed [W-1:0] x [4];
  logic signed [W-1:0] y;
  int checks = 0, failures = 0;

  sadhna_add4 dut (.x0(x[0]), .x1(x[1]), .x2(x[2]), .x3(x[3]), .y(y));

  function automatic longint ref_model(input longint p0, p1, p2, p3);
    return p0 + p1 + p2 + p3;
  endfunction

  function automatic logic signed [W-1:0] corner(input int n);
    case (n % 8)
      0: return 0;
      1: return 1;
      2: return -1;
      3: return 32'sh7fff_ffff;
      4: return -32'sh7fff_ffff;
      5: return 10;
      6: return 9;
      default: return 32'($urandom);
    endcase
  endfunction

  task automatic check();
    longint r;
    #1;
    r = ref_model(longint'(x[0]), longint'(x[1]), longint'(x[2]), longint'(x[3]));
    checks++;
    if (y !== r[W-1:0]) begin
      failures++;
      $display("MISMATCH x=%0d %0d %0d %0d y=%0d expected=%0d",
               x[0], x[1], x[2], x[3], y, $signed(r[W-1:0]));
    end
  endtask

  initial begin
    // corner values, every combination of the first seven for x0/x1
    for (int p = 0; p < 7; p++)
      for (int q = 0; q < 7; q++) begin
        x[0] = corner(p); x[1] = corner(q); x[2] = corner(p + q); x[3] = corner(p * q + 3);
        check();
      end
    // small digit-sized values, as the multiplier feeds them
    for (int n = 0; n < 500; n++) begin
      foreach (x[k]) x[k] = $signed(32'($urandom_range(0, 200))) - 100;
      check();
    end
    // full-range random values
    for (int n = 0; n < 2000; n++) begin
      foreach (x[k]) x[k] = 32'($urandom);
      check();
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
