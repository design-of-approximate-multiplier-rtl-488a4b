// Audio workload testbench for ssm_approx_mul at its default size.
//
// Two synthetic speech-like signals stand in for recorded audio: a 2-second
// signal at 44.1 kHz (88200 samples) and a 1-second signal at 8 kHz (8000
// samples), each a sum of sines under a slowly varying envelope plus
// pseudo-random noise, with amplitude in [-1, 1]. Samples are quantised to
// 16-bit offset-binary unsigned words (0..65535, silence = 32768), and
// every sample of the long signal is multiplied with a sample of the short
// one (the short one repeats). Three passes are made:
//   1. the 16-bit words as they are: all operands are below 2^18, so the
//      lower segments are always taken and every product must be exact;
//   2. the same words placed at the top of the 36-bit operand (shifted left
//      by 20): the upper segments are always taken and the product must
//      equal the exact product of the operands with their lower 18 bits
//      cleared, which is again exact since those bits are zero;
//   3. as pass 2 with a random 20-bit fraction below each word, which the
//      multiplier partly drops; the mean and largest relative error are
//      reported.
// Every output is checked against the exact arithmetic of the reference
// model; the run ends with the TB_RESULT line. A watchdog ends a hung run.
module audio_workload_tb;

  localparam int N = 36;
  localparam int M = 18;
  localparam int LEN_A = 88200;   // 2 s at 44.1 kHz
  localparam int LEN_B = 8000;    // 1 s at 8 kHz

  int checks = 0;
  int failures = 0;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] y;

  logic [15:0] sig_a [LEN_A];
  logic [15:0] sig_b [LEN_B];

  ssm_approx_mul dut (.a(a), .b(b), .y(y));

  function automatic logic [15:0] quantise(input real s);
    real c;
    c = s > 1.0 ? 1.0 : (s < -1.0 ? -1.0 : s);
    return 16'($rtoi((c + 1.0) * 32767.5));
  endfunction

  function automatic real noise();
    return (real'($urandom % 2001) - 1000.0) / 1000.0;
  endfunction

  function automatic logic [N-1:0] trunc_op(input logic [N-1:0] v);
    if (v >= (N'(1) << M)) return (v >> (N - M)) << (N - M);
    return v;
  endfunction

  task automatic check(input logic [N-1:0] av, input logic [N-1:0] bv, input bit want_exact,
                       inout real err_sum, inout real err_max);
    logic [2*N-1:0] exact, expect_v;
    real rel;
    a = av; b = bv;
    #1;
    exact    = (2*N)'(av) * (2*N)'(bv);
    expect_v = (2*N)'(trunc_op(av)) * (2*N)'(trunc_op(bv));
    checks++;
    if (y !== expect_v || (want_exact && y !== exact)) begin
      failures++;
      if (failures < 10) $display("MISMATCH a=%0d b=%0d y=%0d expected=%0d exact=%0d",
                                  av, bv, y, expect_v, exact);
    end
    rel = (exact == 0) ? 0.0 : (real'(exact) - real'(y)) / real'(exact);
    err_sum += rel;
    if (rel > err_max) err_max = rel;
  endtask

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pi, t, env, s;
    real err_sum, err_max;
    pi = 3.14159265358979;
    for (int i = 0; i < LEN_A; i++) begin
      t   = real'(i) / 44100.0;
      env = 0.35 * (0.2 + 0.8 * $sin(pi * t / 2.0) * $sin(pi * t / 2.0) * (0.5 + 0.5 * $sin(2.0 * pi * 1.3 * t)));
      s   = env * (0.6 * $sin(2.0 * pi * 220.0 * t) + 0.3 * $sin(2.0 * pi * 660.0 * t) + 0.1 * noise());
      sig_a[i] = quantise(s);
    end
    for (int i = 0; i < LEN_B; i++) begin
      t   = real'(i) / 8000.0;
      env = 0.2 + 0.8 * (0.5 + 0.5 * $sin(2.0 * pi * 4.0 * t));
      s   = env * (0.7 * $sin(2.0 * pi * 300.0 * t) + 0.3 * noise());
      sig_b[i] = quantise(s);
    end

    err_sum = 0.0; err_max = 0.0;
    for (int i = 0; i < LEN_A; i++)
      check(N'(sig_a[i]), N'(sig_b[i % LEN_B]), 1'b1, err_sum, err_max);
    $display("pass 1 (16-bit words, lower segments): %0d products, max rel error %g", LEN_A, err_max);

    err_sum = 0.0; err_max = 0.0;
    for (int i = 0; i < LEN_A; i++)
      check({sig_a[i], 20'd0}, {sig_b[i % LEN_B], 20'd0}, 1'b1, err_sum, err_max);
    $display("pass 2 (words at top of 36 bits, upper segments): max rel error %g", err_max);

    err_sum = 0.0; err_max = 0.0;
    for (int i = 0; i < LEN_A; i++)
      check({sig_a[i], 20'($urandom)}, {sig_b[i % LEN_B], 20'($urandom)}, 1'b0, err_sum, err_max);
    $display("pass 3 (36-bit words with random low bits): mean rel error %g, max %g",
             err_sum / real'(LEN_A), err_max);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
