// Result expansion multiplexer (2n bits wide, three inputs).
//
// Chooses one of three zero-padded copies of the 2m-bit segment product:
// d0 = product unshifted, d1 = product shifted left by n-m, d2 = product
// shifted left by 2(n-m). The select is the 2-bit segment-select sum from
// seg_adder: 2'b00 picks d0, 2'b01 picks d1, 2'b10 picks d2. The code 2'b11
// cannot come from that adder; the mux then outputs zero and an assertion
// reports it in simulation.
//
// Interface: d0, d1, d2 (W bits) and sel in; y (W bits) out. W is 2n.
// Timing: purely combinational.
// The three inputs and their select codes follow the static segment method;
// the zero output for the unused code is this design's choice.
module mux_3to1 #(
  parameter int unsigned W = 2 * ssm_pkg::SSM_N
) (
  input  logic [W-1:0]        d0,
  input  logic [W-1:0]        d1,
  input  logic [W-1:0]        d2,
  input  ssm_pkg::shift_sel_e sel,
  output logic [W-1:0]        y
);

  always_comb begin
    unique case (sel)
      ssm_pkg::SHIFT_NONE: y = d0;
      ssm_pkg::SHIFT_ONE:  y = d1;
      ssm_pkg::SHIFT_TWO:  y = d2;
      default:             y = '0;
    endcase
  end

  // The select comes from the sum of two 1-bit flags, so 2'b11 is illegal.
  always_comb begin
    a_sel_legal : assert (sel != 2'b11)
      else $error("mux_3to1: illegal select 2'b11");
  end

endmodule
