// ffa2_post: post-processing adders and block delay of the symmetric
// two-parallel fast FIR filter.
//
// Inputs are the block-rate outputs of the three sub-filters
//     pa = (H0 + H1)(X0 + X1),  pb = (H0 - H1)(X0 - X1),  p1 = H1 X1.
// Half the sum and half the difference of pa and pb give the two mixed terms
//     e = (pa + pb) / 2 = H0X0 + H1X1,   o = (pa - pb) / 2 = H0X1 + H1X0
// (both sums are even, so the arithmetic right shift is exact). The outputs are
//     Y0 = (e - H1X1) + z^-2 H1X1 = H0X0 + z^-2 H1X1
//     Y1 = o
// where z^-2 at the sample rate is one block (one enabled clock) of delay,
// held in a register that captures p1.
//
// Timing: on a clock edge with en high the outputs y0/y1 take the values for
// the block presented in that cycle and out_valid goes high; with en low the
// state and outputs hold and out_valid goes low. Latency is one clock.
// Asynchronous active-low reset clears the delay register and outputs.
// The equations are those of the symmetric two-parallel fast FIR structure;
// the output register, handshake and reset are this implementation's own.
module ffa2_post #(
  parameter int IW = 43,               // width of the sub-filter outputs
  parameter int YW = 33                // width of the filter outputs
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [IW-1:0] pa,
  input  logic signed [IW-1:0] pb,
  input  logic signed [IW-1:0] p1,
  output logic                 out_valid,
  output logic signed [YW-1:0] y0,
  output logic signed [YW-1:0] y1
);

  logic signed [IW-1:0] sum_ab, dif_ab, e, o, p1_d;
  logic signed [IW-1:0] y0_n;

  always_comb begin
    sum_ab = pa + pb;
    dif_ab = pa - pb;
    e      = sum_ab >>> 1;
    o      = dif_ab >>> 1;
    y0_n   = (e - p1) + p1_d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1_d      <= '0;
      y0        <= '0;
      y1        <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= en;
      if (en) begin
        p1_d <= p1;
        y0   <= YW'(y0_n);
        y1   <= YW'(o);
      end
    end
  end

  // The halving relies on the sums being even.
  a_even: assert property (@(posedge clk) disable iff (!rst_n)
                           en |-> (sum_ab[0] == 1'b0 && dif_ab[0] == 1'b0))
    else $error("ffa2_post: odd sum at the halving adders");

endmodule
