// fir_subfilter: one direct-form FIR sub-filter of a fast-FIR parallel filter.
//
// An L-parallel filter splits the N taps h(i) into L polyphase sets
// H_p = { h(L*k + p) }, k = 0 .. M-1, M = N/L. A sub-filter runs at the block
// rate (one input word per clock) and filters with either one polyphase set or
// the sum/difference of two of them:
//     g(k) = h(L*k + PA) + SB * h(L*k + PB)      (PB < 0: g(k) = h(L*k + PA))
// so it realises H_PA, H_PA + H_PB or H_PA - H_PB. This plain version spends
// one multiplier per tap and is used for the sub-filters whose coefficients are
// not symmetric; fir_subfilter_sym is the folded variant.
//
// Interface: x is the block-rate input word, y = sum_k g(k) * x[n-k] where
// x[n] is the word on x in this cycle (y is combinational in x) and the older
// words come from a delay line of M-1 registers that shifts when en is high.
// One register of this delay line is the z^-L delay of the full-rate filter.
// Reset (asynchronous, active low) clears the delay line.
// The sub-filter's role and length follow the fast FIR structures; the direct
// form, the combinational output and the reset are this implementation's own.
module fir_subfilter #(
  parameter int XW = 16,               // input word width
  parameter int CW = 16,               // width of the prototype taps h(i)
  parameter int OW = 40,               // output width (must hold the exact sum)
  parameter int N  = 3,                // prototype filter length
  parameter int L  = 3,                // parallelism (polyphase factor)
  parameter int PA = 0,                // first polyphase set
  parameter int PB = -1,               // second polyphase set, -1 for none
  parameter int SB = 1,                // +1: H_PA + H_PB, -1: H_PA - H_PB
  parameter logic signed [CW-1:0] H [N] = '{16'sd5461, 16'sd21845, 16'sd5461}
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [XW-1:0] x,
  output logic signed [OW-1:0] y
);

  localparam int M  = N / L;           // sub-filter length
  localparam int GW = CW + 1;          // width of a derived coefficient
  localparam int D  = (M > 1) ? M - 1 : 1;

  function automatic logic signed [GW-1:0] coef(int k);
    logic signed [GW-1:0] g;
    g = GW'(H[L*k + PA]);
    if (PB >= 0) begin
      if (SB < 0) g = g - GW'(H[L*k + PB]);
      else        g = g + GW'(H[L*k + PB]);
    end
    return g;
  endfunction

  if (N % L != 0 || PA < 0 || PA >= L || PB >= L) begin : g_chk
    $error("fir_subfilter: N must be a multiple of L and phases below L");
  end

  logic signed [XW-1:0] sr  [D];       // x[n-1] .. x[n-M+1]
  logic signed [XW-1:0] tap [M];       // x[n]   .. x[n-M+1]
  logic signed [OW-1:0] prod [M];

  always_comb begin
    tap[0] = x;
    for (int k = 1; k < M; k++) tap[k] = sr[k-1];
  end

  if (M > 1) begin : g_delay
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        sr <= '{default: '0};
      end else if (en) begin
        sr[0] <= x;
        for (int k = 1; k < D; k++) sr[k] <= sr[k-1];
      end
    end
  end else begin : g_no_delay
    assign sr[0] = '0;
  end

  for (genvar k = 0; k < M; k++) begin : g_tap
    localparam logic signed [GW-1:0] G = coef(k);
    assign prod[k] = OW'(G) * OW'(tap[k]);
  end

  always_comb begin
    y = '0;
    for (int k = 0; k < M; k++) y = y + prod[k];
  end

endmodule
