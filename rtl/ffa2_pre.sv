// ffa2_pre: pre-processing adders of the symmetric two-parallel fast FIR filter.
//
// The two polyphase input words of one block, X0 = x(2k) and X1 = x(2k+1),
// are turned into the inputs of the two folded sub-filters:
//     s01 = X0 + X1   (feeds H0 + H1)
//     d01 = X0 - X1   (feeds H0 - H1)
// The third sub-filter (H1) takes X1 directly. Purely combinational; the
// outputs are one bit wider than the inputs, so no overflow is possible.
// The adder set follows the two-parallel equations; the widths are own choice.
module ffa2_pre #(
  parameter int XW = 16
) (
  input  logic signed [XW-1:0] x0,
  input  logic signed [XW-1:0] x1,
  output logic signed [XW:0]   s01,
  output logic signed [XW:0]   d01
);

  assign s01 = (XW+1)'(x0) + (XW+1)'(x1);
  assign d01 = (XW+1)'(x0) - (XW+1)'(x1);

endmodule
