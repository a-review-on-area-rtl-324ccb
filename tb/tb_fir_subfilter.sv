// tb_fir_subfilter: self-checking test of the plain block-rate sub-filter.
//
// Two instances on a 12-tap, 3-phase prototype (sub-filter length 4) are fed
// the same random words, with random enable gaps: one realises H1 alone, the
// other H0 - H1. Every cycle both combinational outputs are compared with a
// convolution of the accepted words computed here, which also checks that the
// delay line advances only when en is high.
module tb_fir_subfilter;
  localparam int N = 12, L = 3, XW = 17, CW = 16, OW = 40, M = N / L;
  localparam logic signed [CW-1:0] HT [N] = '{
    16'sd1200, -16'sd3400, 16'sd32767, -16'sd32768, 16'sd17, 16'sd9000,
    -16'sd250, 16'sd4095, -16'sd7777, 16'sd31000, 16'sd5, -16'sd12345};

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [XW-1:0] x = '0;
  logic signed [OW-1:0] y_h1, y_h01m;
  int checks = 0, failures = 0, stalls = 0;
  longint hist [$];

  fir_subfilter #(.XW(XW), .CW(CW), .OW(OW), .N(N), .L(L),
                  .PA(1), .PB(-1), .SB(1), .H(HT)) dut_h1 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y_h1));
  fir_subfilter #(.XW(XW), .CW(CW), .OW(OW), .N(N), .L(L),
                  .PA(0), .PB(1), .SB(-1), .H(HT)) dut_h01m (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y_h01m));

  always #5 clk = ~clk;

  function automatic longint g(int pa, int pb, int sb, int k);
    longint v = longint'(HT[L*k + pa]);
    if (pb >= 0) v += sb * longint'(HT[L*k + pb]);
    return v;
  endfunction

  function automatic longint expect_y(int pa, int pb, int sb, longint xc);
    longint acc = 0;
    for (int k = 0; k < M; k++) begin
      longint w = (k == 0) ? xc : ((k - 1 < hist.size()) ? hist[k-1] : 0);
      acc += g(pa, pb, sb, k) * w;
    end
    return acc;
  endfunction

  task automatic check(string what, logic signed [OW-1:0] got, longint exp);
    checks++;
    if (longint'(got) != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

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
      check("H1", y_h1, expect_y(1, -1, 1, longint'(x)));
      check("H0-H1", y_h01m, expect_y(0, 1, -1, longint'(x)));
      @(posedge clk);
      #1;
      if (en) hist.push_front(longint'(x));
    end
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
