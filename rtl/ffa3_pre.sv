// ffa3_pre: pre-processing adders of the symmetric three-parallel fast FIR filter.
//
// The three polyphase input words of one block, X0 = x(3k), X1 = x(3k+1) and
// X2 = x(3k+2), are turned into the inputs of the sub-filters:
//     s01 = X0 + X1   (H0 + H1)        d01 = X0 - X1   (H0 - H1)
//     s02 = X0 + X2   (H0 + H2)        d02 = X0 - X2   (H0 - H2)
//     s12 = X1 + X2   (H1 + H2)
// The sixth sub-filter (H1) takes X1 directly. Purely combinational; the
// outputs are one bit wider than the inputs, so no overflow is possible.
// The adder set follows the three-parallel equations; the widths are own choice.
module ffa3_pre #(
  parameter int XW = 16
) (
  input  logic signed [XW-1:0] x0,
  input  logic signed [XW-1:0] x1,
  input  logic signed [XW-1:0] x2,
  output logic signed [XW:0]   s01,
  output logic signed [XW:0]   d01,
  output logic signed [XW:0]   s02,
  output logic signed [XW:0]   d02,
  output logic signed [XW:0]   s12
);

  assign s01 = (XW+1)'(x0) + (XW+1)'(x1);
  assign d01 = (XW+1)'(x0) - (XW+1)'(x1);
  assign s02 = (XW+1)'(x0) + (XW+1)'(x2);
  assign d02 = (XW+1)'(x0) - (XW+1)'(x2);
  assign s12 = (XW+1)'(x1) + (XW+1)'(x2);

endmodule
