// Unsigned M x M radix-4 (modified) Booth multiplier: the segment multiplier
// of the static-segment approximate multiplier.
//
// The multiplier operand y is zero-extended to an even width YW of at least
// M+1 bits, so that its top bit is 0 and it reads as a non-negative two's
// complement number. It is then recoded, two bits at a time with one bit of
// overlap, into ND = YW/2 Booth digits in {-2,-1,0,+1,+2}: digit i is
// -2*y[2i+1] + y[2i] + y[2i-1], with y[-1] = 0. Each digit selects a partial
// product of 0, +-x or +-2x (a shift and a two's complement negation), which
// is sign-extended and weighted by 4^i. The ND partial products, about half
// as many as an array multiplier forms, are summed to give the exact 2M-bit
// product; the sum is taken modulo 2^(2M+2) and the upper two bits are always
// zero for unsigned inputs.
//
// Interface: x, y (M bits, unsigned) in; z (2M bits) out.
// Timing: purely combinational.
// That the segment multiplier is a radix-4 Booth multiplier follows the
// design; the recoding details, the unsigned operands and the plain adder
// chain that sums the partial products are this design's choices.
module booth_mul #(
  parameter int unsigned M = ssm_pkg::SSM_M
) (
  input  logic [M-1:0]   x,
  input  logic [M-1:0]   y,
  output logic [2*M-1:0] z
);

  localparam int unsigned YW  = ((M + 2) / 2) * 2;  // even, >= M+1
  localparam int unsigned ND  = YW / 2;             // number of Booth digits
  localparam int unsigned PW  = 2 * M + 2;          // partial-product width

  logic [YW:0]           ye;      // {zero-extended y, y[-1] = 0}
  logic [ND-1:0]         neg;     // digit is negative
  logic [ND-1:0]         one;     // |digit| == 1
  logic [ND-1:0]         two;     // |digit| == 2
  logic signed [PW-1:0]  pp [ND];
  logic signed [PW-1:0]  acc;

  // Booth recoding of y.
  always_comb begin
    ye = {{(YW - M){1'b0}}, y, 1'b0};
    for (int i = 0; i < ND; i++) begin
      logic [2:0] trip;
      trip   = ye[2*i +: 3];
      neg[i] = trip[2] & ~(trip[1] & trip[0]);
      one[i] = trip[1] ^ trip[0];
      two[i] = (trip == 3'b011) || (trip == 3'b100);
    end
  end

  // Partial-product generation and summation.
  always_comb begin
    logic signed [PW-1:0] mag;
    acc = '0;
    for (int i = 0; i < ND; i++) begin
      mag   = one[i] ? PW'(x) : (two[i] ? PW'({x, 1'b0}) : '0);
      pp[i] = neg[i] ? -mag : mag;
      acc   = acc + (pp[i] <<< (2 * i));
    end
    z = acc[2*M-1:0];
  end

endmodule
