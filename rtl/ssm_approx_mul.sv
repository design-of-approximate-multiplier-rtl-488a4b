// Static-segment approximate multiplier (top level), n x n -> 2n bits.
//
// Each unsigned n-bit operand is reduced to one m-bit segment: the upper m
// bits when any of its top n-m bits is set, else the lower m bits (which
// then hold the operand exactly). bitwise_or_mux does this per operand and
// reports which segment it took. The two segments are multiplied exactly by
// an m x m radix-4 Booth multiplier (booth_mul). seg_adder adds the two
// select flags; the sum, 0, 1 or 2, says how many upper segments were used,
// and mux_3to1 picks the 2m-bit product padded with zeros so that it is
// shifted left by 0, n-m or 2(n-m) bits. The result equals the exact product
// of the two operands with, for each operand whose upper segment was taken,
// its lower n-m bits cleared. Operands below 2^m are multiplied exactly.
//
// Interface: a, b (N bits, unsigned) in; y (2N bits) out.
// Timing: purely combinational, no clock or reset.
// Defaults N = 36, M = 18 and the block structure (two OR-plus-mux segment
// selectors, Booth segment multiplier, select adder, 3-to-1 output mux)
// follow the design; unsigned operands are this design's choice.
module ssm_approx_mul #(
  parameter int unsigned N = ssm_pkg::SSM_N,
  parameter int unsigned M = ssm_pkg::SSM_M
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] y
);

  localparam int unsigned S = N - M;   // shift step n-m

  logic [M-1:0]        seg_a, seg_b;
  logic                sel_a, sel_b;
  logic [2*M-1:0]      z;
  ssm_pkg::shift_sel_e shift_sel;
  logic [2*N-1:0]      z_sh0, z_sh1, z_sh2;

  bitwise_or_mux #(.N(N), .M(M)) u_sel_a (.a(a), .seg(seg_a), .sel(sel_a));
  bitwise_or_mux #(.N(N), .M(M)) u_sel_b (.a(b), .seg(seg_b), .sel(sel_b));

  booth_mul #(.M(M)) u_mul (.x(seg_a), .y(seg_b), .z(z));

  seg_adder u_add (.a(sel_a), .b(sel_b), .cs(shift_sel));

  // The three zero-padded placements of the segment product.
  always_comb begin
    z_sh0 = {{(2*S){1'b0}}, z};
    z_sh1 = {{S{1'b0}}, z, {S{1'b0}}};
    z_sh2 = {z, {(2*S){1'b0}}};
  end

  mux_3to1 #(.W(2*N)) u_mux (
    .d0(z_sh0), .d1(z_sh1), .d2(z_sh2), .sel(shift_sel), .y(y)
  );

endmodule
