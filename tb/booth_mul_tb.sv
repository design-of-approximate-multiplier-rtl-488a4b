// Self-checking testbench for booth_mul, the unsigned radix-4 Booth segment
// multiplier. Three instances are checked against the plain product x*y:
// the default 18-bit one with corner values (0, 1, all ones, the patterns
// that produce every Booth digit) and random operands, an 8-bit one
// exhaustively (all 65536 operand pairs) and an odd 7-bit one exhaustively,
// which exercises the extra zero-extension bit. A watchdog ends the run if
// it hangs. Timing: combinational; each vector is checked 1 ns after it is
// applied.
module booth_mul_tb;

  int checks = 0;
  int failures = 0;

  logic [17:0] x18, y18;
  logic [35:0] z18;
  logic [7:0]  x8, y8;
  logic [15:0] z8;
  logic [6:0]  x7, y7;
  logic [13:0] z7;

  booth_mul dut18 (.x(x18), .y(y18), .z(z18));
  booth_mul #(.M(8)) dut8 (.x(x8), .y(y8), .z(z8));
  booth_mul #(.M(7)) dut7 (.x(x7), .y(y7), .z(z7));

  task automatic check18(input logic [17:0] xa, input logic [17:0] ya);
    longint unsigned expect_v;
    x18 = xa; y18 = ya;
    #1;
    expect_v = longint'(xa) * longint'(ya);
    checks++;
    if (z18 !== expect_v[35:0]) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH M=18 x=%0d y=%0d z=%0d expected=%0d", xa, ya, z18, expect_v);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [17:0] corners [8];
    corners = '{18'd0, 18'd1, 18'h3FFFF, 18'h2AAAA, 18'h15555,
                18'h20000, 18'h1FFFF, 18'h0CCCC};
    foreach (corners[i])
      foreach (corners[j])
        check18(corners[i], corners[j]);
    for (int k = 0; k < 20000; k++)
      check18(18'($urandom), 18'($urandom));

    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        x8 = 8'(i); y8 = 8'(j);
        #1;
        checks++;
        if (z8 !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("MISMATCH M=8 x=%0d y=%0d z=%0d", i, j, z8);
        end
      end
    end

    for (int i = 0; i < 128; i++) begin
      for (int j = 0; j < 128; j++) begin
        x7 = 7'(i); y7 = 7'(j);
        #1;
        checks++;
        if (z7 !== 14'(i * j)) begin
          failures++;
          if (failures < 10) $display("MISMATCH M=7 x=%0d y=%0d z=%0d", i, j, z7);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
