// Self-checking testbench for mux_3to1, the 72-bit result expansion mux.
// Drives three different random 72-bit words and checks, for each of the
// three legal select codes, that the output equals the selected word.
// Combinational; each vector is checked 1 ns after it is applied. A watchdog
// ends the run if it hangs.
module mux_3to1_tb;

  int checks = 0;
  int failures = 0;

  logic [71:0]         d0, d1, d2, y;
  ssm_pkg::shift_sel_e sel;

  mux_3to1 dut (.d0(d0), .d1(d1), .d2(d2), .sel(sel), .y(y));

  function automatic logic [71:0] rand72();
    return {8'($urandom), $urandom, $urandom};
  endfunction

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3000; k++) begin
      logic [71:0] expect_v;
      d0 = rand72(); d1 = rand72(); d2 = rand72();
      case (k % 3)
        0: begin sel = ssm_pkg::SHIFT_NONE; expect_v = d0; end
        1: begin sel = ssm_pkg::SHIFT_ONE;  expect_v = d1; end
        default: begin sel = ssm_pkg::SHIFT_TWO; expect_v = d2; end
      endcase
      #1;
      checks++;
      if (y !== expect_v) begin
        failures++;
        if (failures < 10) $display("MISMATCH sel=%0d y=%h expected=%h", sel, y, expect_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
