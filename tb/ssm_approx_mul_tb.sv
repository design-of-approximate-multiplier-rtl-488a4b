// End-to-end self-checking testbench for ssm_approx_mul at its default size
// (36 x 36 -> 72 bits, 18-bit segments), with no parameter overrides.
//
// Reference model, written independently of the RTL's segment/shift
// structure: an operand of 2^18 or more has its lower 18 bits cleared,
// a smaller operand is kept; the expected output is the exact 72-bit
// product of the two resulting values. Besides equality with that model the
// bench checks that the result never exceeds the exact product, that
// operands below 2^18 give the exact product (including the sample values
// 44100 x 32000, 45150 x 32000 and 45150 x 39098), and that when both
// operands are at least 2^35 the relative error is below 2^-16.
//
// It counts how often each mechanism occurs: no shift (both lower
// segments), a shift by n-m with the upper segment of a only and of b only,
// and a shift by 2(n-m) (both upper segments). A mechanism that never
// occurs counts as a failure. Combinational; each vector is checked 1 ns
// after it is applied. A watchdog ends the run if it hangs.
module ssm_approx_mul_tb;

  localparam int N = 36;
  localparam int M = 18;

  int checks = 0;
  int failures = 0;
  int n_shift0 = 0;
  int n_shift1_a = 0;
  int n_shift1_b = 0;
  int n_shift2 = 0;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] y;

  ssm_approx_mul dut (.a(a), .b(b), .y(y));

  function automatic logic [N-1:0] trunc_op(input logic [N-1:0] v);
    if (v >= (N'(1) << M)) return (v >> (N - M)) << (N - M);
    return v;
  endfunction

  task automatic apply(input logic [N-1:0] av, input logic [N-1:0] bv);
    logic [2*N-1:0] exact, expect_v;
    logic a_up, b_up;
    a = av; b = bv;
    #1;
    exact    = (2*N)'(av) * (2*N)'(bv);
    expect_v = (2*N)'(trunc_op(av)) * (2*N)'(trunc_op(bv));
    a_up = (av >= (N'(1) << M));
    b_up = (bv >= (N'(1) << M));
    if (!a_up && !b_up) n_shift0++;
    else if (a_up && !b_up) n_shift1_a++;
    else if (!a_up && b_up) n_shift1_b++;
    else n_shift2++;

    checks++;
    if (y !== expect_v) begin
      failures++;
      if (failures < 10) $display("MISMATCH a=%0d b=%0d y=%0d expected=%0d", av, bv, y, expect_v);
    end
    checks++;
    if (y > exact) begin
      failures++;
      $display("OVERESTIMATE a=%0d b=%0d y=%0d exact=%0d", av, bv, y, exact);
    end
    if (!a_up && !b_up) begin
      checks++;
      if (y !== exact) begin
        failures++;
        $display("NOT EXACT a=%0d b=%0d y=%0d exact=%0d", av, bv, y, exact);
      end
    end
    if (av[N-1] && bv[N-1]) begin
      real rel;
      rel = (real'(exact) - real'(y)) / real'(exact);
      checks++;
      if (rel >= 1.0 / 65536.0) begin
        failures++;
        $display("ERROR TOO LARGE a=%0d b=%0d rel=%g", av, bv, rel);
      end
    end
  endtask

  function automatic logic [N-1:0] rand_op(input int width);
    logic [63:0] r;
    r = {$urandom, $urandom};
    return N'(r & ((64'd1 << width) - 1));
  endfunction

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Sample operand pairs and their exact products.
    apply(36'd44100, 36'd32000);
    checks++;
    if (y != 72'd1411200000) begin failures++; $display("44100*32000 -> %0d", y); end
    apply(36'd45150, 36'd32000);
    checks++;
    if (y != 72'd1444800000) begin failures++; $display("45150*32000 -> %0d", y); end
    apply(36'd45150, 36'd39098);
    checks++;
    if (y != 72'd1765274700) begin failures++; $display("45150*39098 -> %0d", y); end

    // Boundaries of the segment decision.
    apply(0, 0);
    apply(36'h3FFFF, 36'h3FFFF);
    apply(36'h40000, 36'h3FFFF);
    apply(36'h3FFFF, 36'h40000);
    apply(36'h40000, 36'h40000);
    apply('1, '1);
    apply('1, 1);

    // Random operands of random magnitude cover all four segment pairings.
    for (int k = 0; k < 40000; k++)
      apply(rand_op(1 + int'($urandom % N)), rand_op(1 + int'($urandom % N)));

    $display("mechanisms: no_shift=%0d shift_n-m(a upper)=%0d shift_n-m(b upper)=%0d shift_2(n-m)=%0d",
             n_shift0, n_shift1_a, n_shift1_b, n_shift2);
    checks++;
    if (n_shift0 == 0 || n_shift1_a == 0 || n_shift1_b == 0 || n_shift2 == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
