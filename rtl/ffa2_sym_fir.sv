// ffa2_sym_fir: two-parallel FIR filter for even-symmetric taps, built on the
// two-parallel fast FIR algorithm with symmetric sub-filters.
//
// An N-tap filter y(n) = sum_i h(i) x(n-i) is computed two samples per clock.
// With the polyphase sets H0 = {h(2k)}, H1 = {h(2k+1)} and the block inputs
// X0 = x(2k), X1 = x(2k+1), the outputs Y0 = y(2k), Y1 = y(2k+1) are
//     Y0 = { 1/2[(H0+H1)(X0+X1) + (H0-H1)(X0-X1)] - H1X1 } + z^-2 H1X1
//     Y1 =   1/2[(H0+H1)(X0+X1) - (H0-H1)(X0-X1)]
// Three length-N/2 sub-filters are used, as in the ordinary two-parallel fast
// FIR structure, but two of them (H0+H1, symmetric, and H0-H1, antisymmetric)
// inherit the symmetry of h and are folded to half their multipliers
// (fir_subfilter_sym); H1 is a plain sub-filter (fir_subfilter).
// ffa2_pre holds the two pre-adders and ffa2_post the post-adders, the
// halving and the one-block delay.
//
// Interface: x[0] = x(2k), x[1] = x(2k+1) are taken on a clock edge with
// in_valid high; y[0] = y(2k), y[1] = y(2k+1) appear one clock later with
// out_valid high. in_valid low stalls the filter (its state holds). Reset is
// asynchronous, active low, and clears all state (zero initial history).
// The taps are the parameter H and must satisfy h(i) = h(N-1-i) with N even;
// elaboration stops otherwise. Widths and the valid/stall handshake are this
// implementation's choices; the arithmetic follows the fast FIR equations.
module ffa2_sym_fir
  import fir_ffa_pkg::*;
#(
  parameter int XW = 16,               // sample width
  parameter int CW = 16,               // tap width
  parameter int N  = 2,                // number of taps (even)
  parameter logic signed [CW-1:0] H [N] = '{16'sd16384, 16'sd16384},
  localparam int YW = out_width(XW, CW, N),
  localparam int IW = int_width(XW, CW, N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [XW-1:0] x [2],
  output logic                 out_valid,
  output logic signed [YW-1:0] y [2]
);

  function automatic bit is_symmetric();
    for (int i = 0; i < N; i++)
      if (H[i] != H[N-1-i]) return 1'b0;
    return 1'b1;
  endfunction

  if (N % 2 != 0 || N < 2) begin : g_chk_n
    $error("ffa2_sym_fir: N must be even");
  end
  if (!is_symmetric()) begin : g_chk_sym
    $error("ffa2_sym_fir: taps must be even-symmetric");
  end

  logic signed [XW:0]   s01, d01;
  logic signed [IW-1:0] pa, pb, p1;

  ffa2_pre #(.XW(XW)) u_pre (
    .x0(x[0]), .x1(x[1]), .s01(s01), .d01(d01)
  );

  // (H0 + H1): symmetric
  fir_subfilter_sym #(.XW(XW+1), .CW(CW), .OW(IW), .N(N), .L(2),
                      .PA(0), .PB(1), .SB(1), .FOLD(1), .H(H)) u_h01p (
    .clk(clk), .rst_n(rst_n), .en(in_valid), .x(s01), .y(pa)
  );

  // (H0 - H1): antisymmetric
  fir_subfilter_sym #(.XW(XW+1), .CW(CW), .OW(IW), .N(N), .L(2),
                      .PA(0), .PB(1), .SB(-1), .FOLD(-1), .H(H)) u_h01m (
    .clk(clk), .rst_n(rst_n), .en(in_valid), .x(d01), .y(pb)
  );

  // H1: mirror image of H0, no symmetry of its own
  fir_subfilter #(.XW(XW), .CW(CW), .OW(IW), .N(N), .L(2),
                  .PA(1), .PB(-1), .SB(1), .H(H)) u_h1 (
    .clk(clk), .rst_n(rst_n), .en(in_valid), .x(x[1]), .y(p1)
  );

  ffa2_post #(.IW(IW), .YW(YW)) u_post (
    .clk(clk), .rst_n(rst_n), .en(in_valid),
    .pa(pa), .pb(pb), .p1(p1),
    .out_valid(out_valid), .y0(y[0]), .y1(y[1])
  );

endmodule
