// Segment-select adder.
//
// Adds the two 1-bit segment-select flags of the operands and returns the
// 2-bit sum {c, s}, which is the number of operands whose upper segment was
// taken: 0, 1 or 2. The sum drives the select input of the result
// expansion multiplexer directly, as the shift code ssm_pkg::shift_sel_e.
//
// Interface: a, b (1 bit each) in; cs (2 bits, {carry, sum}) out.
// Timing: purely combinational (a half adder).
module seg_adder (
  input  logic               a,
  input  logic               b,
  output ssm_pkg::shift_sel_e cs
);

  always_comb begin
    cs = ssm_pkg::shift_sel_e'({a & b, a ^ b});
  end

endmodule
