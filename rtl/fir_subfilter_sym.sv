// fir_subfilter_sym: folded FIR sub-filter for symmetric or antisymmetric taps.
//
// This is the shaded sub-filter of the symmetric fast-FIR structures. When the
// prototype filter h(i) is even-symmetric, some of the derived sub-filters
//     g(k) = h(L*k + PA) + SB * h(L*k + PB)      (PB < 0: g(k) = h(L*k + PA))
// inherit the symmetry: g(k) = FOLD * g(M-1-k) with FOLD = +1 (symmetric, e.g.
// H0 + H1 of a two-parallel filter) or FOLD = -1 (antisymmetric, e.g. H0 - H1).
// Such a sub-filter first adds (FOLD = +1) or subtracts (FOLD = -1) the two
// delay-line words that share a coefficient and then multiplies once, so it
// needs floor(M/2) multipliers, plus one for the centre tap of an odd-length
// symmetric sub-filter (the centre tap of an antisymmetric one is zero). The
// multiplier count halves, at the price of floor(M/2) pre-adders.
// Elaboration stops with an error if the coefficients lack the stated symmetry.
//
// Interface and timing are those of fir_subfilter: y = sum_k g(k) * x[n-k],
// combinational in the current word x, with an M-1 word delay line that
// shifts when en is high and is cleared by the asynchronous active-low reset.
// Halving the multipliers of the symmetric sub-filters is the point of the
// structure; folding by pre-adding mirrored words is this implementation's way
// of doing it.
module fir_subfilter_sym #(
  parameter int XW   = 16,             // input word width
  parameter int CW   = 16,             // width of the prototype taps h(i)
  parameter int OW   = 40,             // output width (must hold the exact sum)
  parameter int N    = 3,              // prototype filter length
  parameter int L    = 3,              // parallelism (polyphase factor)
  parameter int PA   = 0,              // first polyphase set
  parameter int PB   = 2,              // second polyphase set, -1 for none
  parameter int SB   = 1,              // +1: H_PA + H_PB, -1: H_PA - H_PB
  parameter int FOLD = 1,              // +1 symmetric, -1 antisymmetric
  parameter logic signed [CW-1:0] H [N] = '{16'sd5461, 16'sd21845, 16'sd5461}
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [XW-1:0] x,
  output logic signed [OW-1:0] y
);

  localparam int M     = N / L;        // sub-filter length
  localparam int GW    = CW + 1;       // width of a derived coefficient
  localparam int D     = (M > 1) ? M - 1 : 1;
  localparam int HALF  = M / 2;        // number of folded pairs
  localparam bit MID   = (M % 2 == 1) && (FOLD > 0);
  localparam int NPROD = HALF + (MID ? 1 : 0);
  localparam int PN    = (NPROD > 0) ? NPROD : 1;

  function automatic logic signed [GW-1:0] coef(int k);
    logic signed [GW-1:0] g;
    g = GW'(H[L*k + PA]);
    if (PB >= 0) begin
      if (SB < 0) g = g - GW'(H[L*k + PB]);
      else        g = g + GW'(H[L*k + PB]);
    end
    return g;
  endfunction

  function automatic bit folds_ok();
    for (int k = 0; k < M; k++) begin
      if (FOLD > 0 && coef(k) != coef(M-1-k))  return 1'b0;
      if (FOLD < 0 && coef(k) != -coef(M-1-k)) return 1'b0;
    end
    return 1'b1;
  endfunction

  if (N % L != 0 || PA < 0 || PA >= L || PB >= L || (FOLD != 1 && FOLD != -1)) begin : g_chk
    $error("fir_subfilter_sym: bad geometry or FOLD");
  end
  if (!folds_ok()) begin : g_chk_sym
    $error("fir_subfilter_sym: coefficients lack the requested symmetry");
  end

  logic signed [XW-1:0] sr  [D];       // x[n-1] .. x[n-M+1]
  logic signed [XW-1:0] tap [M];       // x[n]   .. x[n-M+1]
  logic signed [OW-1:0] prod [PN];

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

  // Folded pairs: one pre-adder and one multiplier per coefficient pair.
  for (genvar k = 0; k < HALF; k++) begin : g_pair
    localparam logic signed [GW-1:0] G = coef(k);
    logic signed [XW:0] f;
    if (FOLD > 0) begin : g_add
      assign f = (XW+1)'(tap[k]) + (XW+1)'(tap[M-1-k]);
    end else begin : g_sub
      assign f = (XW+1)'(tap[k]) - (XW+1)'(tap[M-1-k]);
    end
    assign prod[k] = OW'(G) * OW'(f);
  end

  // An antisymmetric sub-filter of length one has a zero tap: no multiplier.
  if (NPROD == 0) begin : g_zero
    assign prod[0] = '0;
  end

  if (MID) begin : g_mid
    localparam logic signed [GW-1:0] G = coef(HALF);
    assign prod[HALF] = OW'(G) * OW'(tap[HALF]);
  end

  always_comb begin
    y = '0;
    for (int k = 0; k < NPROD; k++) y = y + prod[k];
  end

endmodule
