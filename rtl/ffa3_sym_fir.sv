// ffa3_sym_fir: three-parallel FIR filter for even-symmetric taps, built on
// the three-parallel fast FIR algorithm with symmetric sub-filters.
//
// An N-tap filter y(n) = sum_i h(i) x(n-i) is computed three samples per
// clock. With the polyphase sets Hp = {h(3k+p)} and block inputs
// Xp = x(3k+p), the outputs Yp = y(3k+p) are
//     Y0 = H0X0 + z^-3 [(H1+H2)(X1+X2) - H1X1 - H2X2]
//     Y1 = 1/2[(H0+H1)(X0+X1) - (H0-H1)(X0-X1)] + z^-3 H2X2
//     Y2 = 1/2[(H0+H2)(X0+X2) - (H0-H2)(X0-X2)] + H1X1
// with H0X0 = 1/2[(H0+H1)(X0+X1) + (H0-H1)(X0-X1)] - H1X1 and
//      H2X2 = 1/2[(H0+H2)(X0+X2) + (H0-H2)(X0-X2)] - H0X0.
// Six length-N/3 sub-filters are used, as in the ordinary three-parallel
// fast FIR structure: H0+H1, H0-H1, H0+H2, H0-H2, H1 and H1+H2. For
// even-symmetric h with N a multiple of 3, H0+H2 (symmetric), H0-H2
// (antisymmetric) and H1 (symmetric) have symmetric taps and are folded to
// half their multipliers (fir_subfilter_sym); the other three are plain
// sub-filters (fir_subfilter). ffa3_pre holds the pre-adders and ffa3_post the
// post-adders, the halving and the one-block delays.
//
// Interface: x[p] = x(3k+p) are taken on a clock edge with in_valid high;
// y[p] = y(3k+p) appear one clock later with out_valid high. in_valid low
// stalls the filter. Reset is asynchronous, active low, and clears all state.
// The taps are the parameter H and must satisfy h(i) = h(N-1-i) with N a
// multiple of 3; elaboration stops otherwise. Widths and the valid/stall
// handshake are this implementation's choices.
module ffa3_sym_fir
  import fir_ffa_pkg::*;
#(
  parameter int XW = 16,               // sample width
  parameter int CW = 16,               // tap width
  parameter int N  = 3,                // number of taps (multiple of 3)
  parameter logic signed [CW-1:0] H [N] = '{16'sd8192, 16'sd16384, 16'sd8192},
  localparam int YW = out_width(XW, CW, N),
  localparam int IW = int_width(XW, CW, N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [XW-1:0] x [3],
  output logic                 out_valid,
  output logic signed [YW-1:0] y [3]
);

  function automatic bit is_symmetric();
    for (int i = 0; i < N; i++)
      if (H[i] != H[N-1-i]) return 1'b0;
    return 1'b1;
  endfunction

  if (N % 3 != 0 || N < 3) begin : g_chk_n
    $error("ffa3_sym_fir: N must be a multiple of 3");
  end
  if (!is_symmetric()) begin : g_chk_sym
    $error("ffa3_sym_fir: taps must be even-symmetric");
  end

  logic signed [XW:0]   s01, d01, s02, d02, s12;
  logic signed [IW-1:0] pa01, pb01, pa02, pb02, p1, pa12;

  ffa3_pre #(.XW(XW)) u_pre (
    .x0(x[0]), .x1(x[1]), .x2(x[2]),
    .s01(s01), .d01(d01), .s02(s02), .d02(d02), .s12(s12)
  );

  // (H0 + H1): plain
  fir_subfilter #(.XW(XW+1), .CW(CW), .OW(IW), .N(N), .L(3),
                  .PA(0), .PB(1), .SB(1), .H(H)) u_h01p (
    .clk(clk), .rst_n(rst_n), .en(in_valid), .x(s01), .y(pa01)
  );

  // (H0 - H1): plain
  fir_subfilter #(.XW(XW+1), .CW(CW), .OW(IW), .N(N), .L(3),
                  .PA(0), .PB(1), .SB(-1), .H(H)) u_h01m (
    .clk(clk), .rst_n(rst_n), .en(in_valid), .x(d01), .y(pb01)
  );

  // (H0 + H2): symmetric
  fir_subfilter_sym #(.XW(XW+1), .CW(CW), .OW(IW), .N(N), .L(3),
                      .PA(0), .PB(2), .SB(1), .FOLD(1), .H(H)) u_h02p (
    .clk(clk), .rst_n(rst_n), .en(in_valid), .x(s02), .y(pa02)
  );

  // (H0 - H2): antisymmetric
  fir_subfilter_sym #(.XW(XW+1), .CW(CW), .OW(IW), .N(N), .L(3),
                      .PA(0), .PB(2), .SB(-1), .FOLD(-1), .H(H)) u_h02m (
    .clk(clk), .rst_n(rst_n), .en(in_valid), .x(d02), .y(pb02)
  );

  // H1: symmetric
  fir_subfilter_sym #(.XW(XW), .CW(CW), .OW(IW), .N(N), .L(3),
                      .PA(1), .PB(-1), .SB(1), .FOLD(1), .H(H)) u_h1 (
    .clk(clk), .rst_n(rst_n), .en(in_valid), .x(x[1]), .y(p1)
  );

  // (H1 + H2): plain
  fir_subfilter #(.XW(XW+1), .CW(CW), .OW(IW), .N(N), .L(3),
                  .PA(1), .PB(2), .SB(1), .H(H)) u_h12p (
    .clk(clk), .rst_n(rst_n), .en(in_valid), .x(s12), .y(pa12)
  );

  ffa3_post #(.IW(IW), .YW(YW)) u_post (
    .clk(clk), .rst_n(rst_n), .en(in_valid),
    .pa01(pa01), .pb01(pb01), .pa02(pa02), .pb02(pb02), .p1(p1), .pa12(pa12),
    .out_valid(out_valid), .y0(y[0]), .y1(y[1]), .y2(y[2])
  );

endmodule
