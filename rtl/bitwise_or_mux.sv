// Static segment selector for one n-bit unsigned operand.
//
// An (n-m)-input OR over the operand's upper bits a[n-1:m] tells whether the
// operand needs more than m bits. If it does, the m-bit segment a[n-1:n-m]
// (the upper m bits) is steered to the multiplier; otherwise the lower
// segment a[m-1:0], which then holds the whole operand exactly. The OR
// result is also brought out as `sel` so the shift amount of the product can
// be worked out. This replaces the leading-one detector and barrel shifter
// of a dynamic-segment multiplier with one OR tree and one m-bit 2-to-1 mux.
//
// Interface: a (N bits) in; seg (M bits), sel (1 bit) out.
// Timing: purely combinational.
// The OR-plus-mux structure is the one the static segment method prescribes;
// treating the operand as unsigned is this design's choice. M must be at
// least N/2 so that the two segments together cover the operand.
module bitwise_or_mux #(
  parameter int unsigned N = ssm_pkg::SSM_N,
  parameter int unsigned M = ssm_pkg::SSM_M
) (
  input  logic [N-1:0] a,
  output logic [M-1:0] seg,
  output logic         sel
);

  if (M < (N + 1) / 2 || M >= N) begin : g_bad_width
    $error("bitwise_or_mux: M must satisfy N/2 <= M < N");
  end

  always_comb begin
    sel = |a[N-1:M];
    seg = sel ? a[N-1:N-M] : a[M-1:0];
  end

endmodule
