// fir_ffa_sym_top: the symmetric two-parallel and three-parallel fast FIR
// filters side by side.
//
// The two filters are independent designs of the same family and share only
// the clock and reset: ffa2_sym_fir takes two samples per clock through the
// *_l2 ports, ffa3_sym_fir three samples per clock through the *_l3 ports.
// Each has its own valid/stall input and valid output and a latency of one
// clock. The default tap counts (2 and 3) are the filter sizes the area and
// power comparison of this structure family uses; the default tap values are
// this implementation's own low-pass examples. Override N2/H2 and N3/H3 for
// longer filters (the taps must be even-symmetric, N2 even, N3 a multiple of 3).
module fir_ffa_sym_top
  import fir_ffa_pkg::*;
#(
  parameter int XW = 16,
  parameter int CW = 16,
  parameter int N2 = 2,
  parameter logic signed [CW-1:0] H2 [N2] = '{16'sd16384, 16'sd16384},
  parameter int N3 = 3,
  parameter logic signed [CW-1:0] H3 [N3] = '{16'sd8192, 16'sd16384, 16'sd8192},
  localparam int Y2W = out_width(XW, CW, N2),
  localparam int Y3W = out_width(XW, CW, N3)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // two-parallel filter: x_l2[p] = x(2k+p), y_l2[p] = y(2k+p)
  input  logic                  in_valid_l2,
  input  logic signed [XW-1:0]  x_l2 [2],
  output logic                  out_valid_l2,
  output logic signed [Y2W-1:0] y_l2 [2],
  // three-parallel filter: x_l3[p] = x(3k+p), y_l3[p] = y(3k+p)
  input  logic                  in_valid_l3,
  input  logic signed [XW-1:0]  x_l3 [3],
  output logic                  out_valid_l3,
  output logic signed [Y3W-1:0] y_l3 [3]
);

  ffa2_sym_fir #(.XW(XW), .CW(CW), .N(N2), .H(H2)) u_l2 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid_l2), .x(x_l2),
    .out_valid(out_valid_l2), .y(y_l2)
  );

  ffa3_sym_fir #(.XW(XW), .CW(CW), .N(N3), .H(H3)) u_l3 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid_l3), .x(x_l3),
    .out_valid(out_valid_l3), .y(y_l3)
  );

endmodule
