// ffa3_post: post-processing adders and block delays of the symmetric
// three-parallel fast FIR filter.
//
// Inputs are the block-rate outputs of the six sub-filters
//     pa01 = (H0+H1)(X0+X1)   pb01 = (H0-H1)(X0-X1)
//     pa02 = (H0+H2)(X0+X2)   pb02 = (H0-H2)(X0-X2)
//     p1   = H1 X1            pa12 = (H1+H2)(X1+X2)
// Halving sums and differences (exact: the sums are even) gives
//     e01 = H0X0 + H1X1    o01 = H0X1 + H1X0
//     e02 = H0X0 + H2X2    o02 = H0X2 + H2X0
// from which the direct products follow without extra sub-filters:
//     h00 = e01 - H1X1 = H0X0,     h22 = e02 - h00 = H2X2,
//     c   = pa12 - H1X1 - h22 = H1X2 + H2X1.
// The outputs are
//     Y0 = h00 + z^-3 c            = H0X0 + z^-3 (H1X2 + H2X1)
//     Y1 = o01 + z^-3 h22          = H0X1 + H1X0 + z^-3 H2X2
//     Y2 = o02 + H1X1              = H0X2 + H1X1 + H2X0
// where z^-3 at the sample rate is one block (one enabled clock) of delay,
// held in two registers (c and h22).
//
// Timing: on a clock edge with en high the outputs take the values for the
// block presented in that cycle and out_valid goes high; with en low the state
// and outputs hold and out_valid goes low. Latency is one clock. Asynchronous
// active-low reset clears the delay registers and outputs.
// Y1 and Y2 follow the symmetric three-parallel equations; Y0 uses the
// ordinary three-parallel fast FIR form, fed from the same folded products.
// The output registers, handshake and reset are this implementation's own.
module ffa3_post #(
  parameter int IW = 45,               // width of the sub-filter outputs
  parameter int YW = 34                // width of the filter outputs
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [IW-1:0] pa01,
  input  logic signed [IW-1:0] pb01,
  input  logic signed [IW-1:0] pa02,
  input  logic signed [IW-1:0] pb02,
  input  logic signed [IW-1:0] p1,
  input  logic signed [IW-1:0] pa12,
  output logic                 out_valid,
  output logic signed [YW-1:0] y0,
  output logic signed [YW-1:0] y1,
  output logic signed [YW-1:0] y2
);

  logic signed [IW-1:0] s01, t01, s02, t02;
  logic signed [IW-1:0] e01, o01, e02, o02;
  logic signed [IW-1:0] h00, h22, c;
  logic signed [IW-1:0] c_d, h22_d;
  logic signed [IW-1:0] y0_n, y1_n, y2_n;

  always_comb begin
    s01  = pa01 + pb01;
    t01  = pa01 - pb01;
    s02  = pa02 + pb02;
    t02  = pa02 - pb02;
    e01  = s01 >>> 1;
    o01  = t01 >>> 1;
    e02  = s02 >>> 1;
    o02  = t02 >>> 1;
    h00  = e01 - p1;
    h22  = e02 - h00;
    c    = pa12 - p1 - h22;
    y0_n = h00 + c_d;
    y1_n = o01 + h22_d;
    y2_n = o02 + p1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_d       <= '0;
      h22_d     <= '0;
      y0        <= '0;
      y1        <= '0;
      y2        <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= en;
      if (en) begin
        c_d   <= c;
        h22_d <= h22;
        y0    <= YW'(y0_n);
        y1    <= YW'(y1_n);
        y2    <= YW'(y2_n);
      end
    end
  end

  // The halving relies on the sums being even.
  a_even: assert property (@(posedge clk) disable iff (!rst_n)
                           en |-> (s01[0] == 1'b0 && t01[0] == 1'b0 &&
                                   s02[0] == 1'b0 && t02[0] == 1'b0))
    else $error("ffa3_post: odd sum at the halving adders");

endmodule
