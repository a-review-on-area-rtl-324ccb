// tb_fir_subfilter_sym: self-checking test of the folded sub-filter.
//
// Five instances cover every fold case on even-symmetric prototypes:
// a 15-tap, 3-phase prototype (odd sub-filter length 5) gives H0+H2
// (symmetric), H0-H2 (antisymmetric, zero centre tap) and H1 (symmetric, one
// phase); a 12-tap, 2-phase prototype (even length 6) gives H0+H1 and H0-H1.
// All are fed the same random words with random enable gaps, and every cycle
// the outputs are compared with an unfolded convolution computed here.
module tb_fir_subfilter_sym;
  localparam int XW = 17, CW = 16, OW = 40;
  localparam int NA = 15, LA = 3, MA = NA / LA;
  localparam int NB = 12, LB = 2, MB = NB / LB;
  localparam logic signed [CW-1:0] HA [NA] = '{
    16'sd300, -16'sd1200, 16'sd4500, 16'sd32767, -16'sd32768, 16'sd77,
    16'sd9000, -16'sd15000, 16'sd9000, 16'sd77, -16'sd32768, 16'sd32767,
    16'sd4500, -16'sd1200, 16'sd300};
  localparam logic signed [CW-1:0] HB [NB] = '{
    -16'sd5, 16'sd2100, -16'sd32768, 16'sd12000, 16'sd32767, -16'sd640,
    -16'sd640, 16'sd32767, 16'sd12000, -16'sd32768, 16'sd2100, -16'sd5};

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [XW-1:0] x = '0;
  logic signed [OW-1:0] y [5];
  int checks = 0, failures = 0, stalls = 0;
  longint hist [$];

  // case table: prototype, phases, signs
  localparam int PA [5] = '{0, 0, 1, 0, 0};
  localparam int PB [5] = '{2, 2, -1, 1, 1};
  localparam int SB [5] = '{1, -1, 1, 1, -1};

  fir_subfilter_sym #(.XW(XW), .CW(CW), .OW(OW), .N(NA), .L(LA),
    .PA(0), .PB(2), .SB(1), .FOLD(1), .H(HA)) dut_a02p (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y[0]));
  fir_subfilter_sym #(.XW(XW), .CW(CW), .OW(OW), .N(NA), .L(LA),
    .PA(0), .PB(2), .SB(-1), .FOLD(-1), .H(HA)) dut_a02m (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y[1]));
  fir_subfilter_sym #(.XW(XW), .CW(CW), .OW(OW), .N(NA), .L(LA),
    .PA(1), .PB(-1), .SB(1), .FOLD(1), .H(HA)) dut_a1 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y[2]));
  fir_subfilter_sym #(.XW(XW), .CW(CW), .OW(OW), .N(NB), .L(LB),
    .PA(0), .PB(1), .SB(1), .FOLD(1), .H(HB)) dut_b01p (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y[3]));
  fir_subfilter_sym #(.XW(XW), .CW(CW), .OW(OW), .N(NB), .L(LB),
    .PA(0), .PB(1), .SB(-1), .FOLD(-1), .H(HB)) dut_b01m (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y[4]));

  always #5 clk = ~clk;

  function automatic longint g(int c, int k);
    longint v;
    if (c < 3) begin
      v = longint'(HA[LA*k + PA[c]]);
      if (PB[c] >= 0) v += SB[c] * longint'(HA[LA*k + PB[c]]);
    end else begin
      v = longint'(HB[LB*k + PA[c]]);
      if (PB[c] >= 0) v += SB[c] * longint'(HB[LB*k + PB[c]]);
    end
    return v;
  endfunction

  function automatic longint expect_y(int c, longint xc);
    longint acc = 0;
    int m = (c < 3) ? MA : MB;
    for (int k = 0; k < m; k++) begin
      longint w = (k == 0) ? xc : ((k - 1 < hist.size()) ? hist[k-1] : 0);
      acc += g(c, k) * w;
    end
    return acc;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 600; c++) begin
      @(negedge clk);
      en = ($urandom % 4) != 0;
      case ($urandom % 8)
        0:       x = {1'b0, {(XW-1){1'b1}}};
        1:       x = {1'b1, {(XW-1){1'b0}}};
        default: x = XW'($urandom);
      endcase
      if (!en) stalls++;
      #1;
      for (int i = 0; i < 5; i++) begin
        automatic longint e = expect_y(i, longint'(x));
        checks++;
        if (longint'(y[i]) != e) begin
          failures++;
          $display("FAIL case %0d cycle %0d: got %0d expected %0d", i, c, y[i], e);
        end
      end
      @(posedge clk);
      #1;
      if (en) hist.push_front(longint'(x));
    end
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
