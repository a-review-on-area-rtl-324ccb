// tb_fir_ffa_sym_top_full: end-to-end test of fir_ffa_sym_top at its default sizes.
//
// The top is instantiated without parameter overrides: a 2-tap two-parallel
// filter (taps 0.5, 0.5 in Q15) and a 3-tap three-parallel filter (taps 0.25,
// 0.5, 0.25). Both get independent random sample blocks with independent
// in_valid gaps; every output block is compared with the direct convolution
// of the rebuilt serial input, and out_valid must follow in_valid by one clock.
module tb_fir_ffa_sym_top_full;
  localparam int XW = 16, CW = 16;
  localparam int N2 = 2, N3 = 3;
  localparam logic signed [CW-1:0] H2 [N2] = '{16'sd16384, 16'sd16384};
  localparam logic signed [CW-1:0] H3 [N3] = '{16'sd8192, 16'sd16384, 16'sd8192};
  localparam int Y2W = fir_ffa_pkg::out_width(XW, CW, N2);
  localparam int Y3W = fir_ffa_pkg::out_width(XW, CW, N3);

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid_l2 = 1'b0, in_valid_l3 = 1'b0;
  logic signed [XW-1:0] x_l2 [2];
  logic signed [XW-1:0] x_l3 [3];
  logic out_valid_l2, out_valid_l3;
  logic signed [Y2W-1:0] y_l2 [2];
  logic signed [Y3W-1:0] y_l3 [3];
  int checks = 0, failures = 0;
  int stalls2 = 0, stalls3 = 0, blocks2 = 0, blocks3 = 0;
  int carry2 = 0, carry3 = 0, fullscale = 0;
  longint xs2 [$];
  longint xs3 [$];

  fir_ffa_sym_top dut (
    .clk(clk), .rst_n(rst_n),
    .in_valid_l2(in_valid_l2), .x_l2(x_l2), .out_valid_l2(out_valid_l2), .y_l2(y_l2),
    .in_valid_l3(in_valid_l3), .x_l3(x_l3), .out_valid_l3(out_valid_l3), .y_l3(y_l3));

  always #5 clk = ~clk;

  // Direct convolution of the rebuilt serial input; lo_only keeps only the
  // samples older than the block that holds output n (the cross-block part).
  function automatic longint conv2(int n, bit lo_only);
    longint acc = 0;
    for (int i = 0; i < N2; i++)
      if (n - i >= 0 && (!lo_only || n - i < (n / 2) * 2)) acc += longint'(H2[i]) * xs2[n-i];
    return acc;
  endfunction

  function automatic longint conv3(int n, bit lo_only);
    longint acc = 0;
    for (int i = 0; i < N3; i++)
      if (n - i >= 0 && (!lo_only || n - i < (n / 3) * 3)) acc += longint'(H3[i]) * xs3[n-i];
    return acc;
  endfunction

  function automatic logic signed [XW-1:0] pick();
    case ($urandom % 8)
      0:       return 16'sh7fff;
      1:       return -16'sh8000;
      default: return XW'($urandom);
    endcase
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
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
    for (int p = 0; p < 2; p++) x_l2[p] = '0;
    for (int p = 0; p < 3; p++) x_l3[p] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      in_valid_l2 = ($urandom % 4) != 0;
      in_valid_l3 = ($urandom % 5) != 0;
      for (int p = 0; p < 2; p++) x_l2[p] = pick();
      for (int p = 0; p < 3; p++) x_l3[p] = pick();
      @(posedge clk);
      #1;
      check("out_valid_l2", longint'(out_valid_l2), longint'(in_valid_l2));
      check("out_valid_l3", longint'(out_valid_l3), longint'(in_valid_l3));
      if (in_valid_l2) begin
        for (int p = 0; p < 2; p++) begin
          xs2.push_back(longint'(x_l2[p]));
          if (x_l2[p] == 16'sh7fff || x_l2[p] == -16'sh8000) fullscale++;
        end
        for (int p = 0; p < 2; p++) begin
          check("y_l2", longint'(y_l2[p]), conv2(2*blocks2 + p, 1'b0));
          if (conv2(2*blocks2 + p, 1'b1) != 0) carry2++;
        end
        blocks2++;
      end else stalls2++;
      if (in_valid_l3) begin
        for (int p = 0; p < 3; p++) begin
          xs3.push_back(longint'(x_l3[p]));
          if (x_l3[p] == 16'sh7fff || x_l3[p] == -16'sh8000) fullscale++;
        end
        for (int p = 0; p < 3; p++) begin
          check("y_l3", longint'(y_l3[p]), conv3(3*blocks3 + p, 1'b0));
          if (conv3(3*blocks3 + p, 1'b1) != 0) carry3++;
        end
        blocks3++;
      end else stalls3++;
    end
    $display("blocks: l2=%0d l3=%0d  stalls: l2=%0d l3=%0d  cross-block outputs: l2=%0d l3=%0d  full-scale inputs=%0d",
             blocks2, blocks3, stalls2, stalls3, carry2, carry3, fullscale);
    if (blocks2 == 0 || blocks3 == 0 || stalls2 == 0 || stalls3 == 0 ||
        carry2 == 0 || carry3 == 0 || fullscale == 0) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
