// Self-checking testbench for seg_adder: applies all four combinations of the
// two segment-select flags and checks the 2-bit sum against the number of
// flags that are set (0 -> SHIFT_NONE, 1 -> SHIFT_ONE, 2 -> SHIFT_TWO).
// Combinational; each input is checked 1 ns after it is applied. A watchdog
// ends the run if it hangs.
module seg_adder_tb;

  int checks = 0;
  int failures = 0;

  logic                a, b;
  ssm_pkg::shift_sel_e cs;

  seg_adder dut (.a(a), .b(b), .cs(cs));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      int count;
      a = i[0]; b = i[1];
      count = int'(i[0]) + int'(i[1]);
      #1;
      checks++;
      if (int'(cs) != count) begin
        failures++;
        $display("MISMATCH a=%0b b=%0b cs=%0d expected=%0d", a, b, cs, count);
      end
      checks++;
      if ((count == 0 && cs != ssm_pkg::SHIFT_NONE) ||
          (count == 1 && cs != ssm_pkg::SHIFT_ONE)  ||
          (count == 2 && cs != ssm_pkg::SHIFT_TWO)) begin
        failures++;
        $display("MISMATCH code a=%0b b=%0b cs=%0d", a, b, cs);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
