// Self-checking testbench for bitwise_or_mux, the static segment selector.
// The default 36-bit/18-bit instance and an overlapping 16-bit/10-bit
// instance are driven with random operands of random magnitude (so that
// both the upper and the lower segment are taken) and with the boundary
// values 0, 2^m - 1, 2^m and all ones. The expected segment is worked out
// arithmetically: if the operand is at least 2^m, the operand divided by
// 2^(n-m); otherwise the operand itself. Combinational; each vector is
// checked 1 ns after it is applied. A watchdog ends the run if it hangs.
module bitwise_or_mux_tb;

  int checks = 0;
  int failures = 0;
  int n_upper = 0;
  int n_lower = 0;

  logic [35:0] a36;
  logic [17:0] seg36;
  logic        sel36;
  logic [15:0] a16;
  logic [9:0]  seg16;
  logic        sel16;

  bitwise_or_mux dut36 (.a(a36), .seg(seg36), .sel(sel36));
  bitwise_or_mux #(.N(16), .M(10)) dut16 (.a(a16), .seg(seg16), .sel(sel16));

  task automatic check36(input longint unsigned v);
    longint unsigned exp_seg;
    logic exp_sel;
    a36 = v[35:0];
    #1;
    exp_sel = (v >= (64'd1 << 18));
    exp_seg = exp_sel ? (v / (64'd1 << 18)) : v;
    if (exp_sel) n_upper++; else n_lower++;
    checks++;
    if (sel36 !== exp_sel || seg36 !== exp_seg[17:0]) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH n=36 a=%0d seg=%0d sel=%0b expected seg=%0d sel=%0b",
                 v, seg36, sel36, exp_seg, exp_sel);
    end
  endtask

  task automatic check16(input int unsigned v);
    int unsigned exp_seg;
    logic exp_sel;
    a16 = v[15:0];
    #1;
    exp_sel = (v >= 1024);
    exp_seg = exp_sel ? (v / 64) : v;
    checks++;
    if (sel16 !== exp_sel || seg16 !== exp_seg[9:0]) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH n=16 a=%0d seg=%0d sel=%0b expected seg=%0d sel=%0b",
                 v, seg16, sel16, exp_seg, exp_sel);
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
    longint unsigned v;
    check36(0); check36((64'd1 << 18) - 1); check36(64'd1 << 18);
    check36((64'd1 << 36) - 1); check36(44100); check36(32000);
    for (int k = 0; k < 20000; k++) begin
      int width;
      width = 1 + int'($urandom % 36);
      v = {$urandom, $urandom};
      v = v & ((64'd1 << width) - 1);
      check36(v);
    end
    for (int unsigned i = 0; i < 65536; i++) check16(i);
    checks++;
    if (n_upper == 0 || n_lower == 0) begin
      failures++;
      $display("segment coverage missing: upper=%0d lower=%0d", n_upper, n_lower);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
