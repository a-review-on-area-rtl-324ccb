// tb_ffa3_post: self-checking test of the three-parallel post-processing.
//
// Each block is described by nine random cross products Pij = Hi Xj. The six
// sub-filter outputs are formed from them ((H0+H1)(X0+X1), (H0-H1)(X0-X1),
// (H0+H2)(X0+X2), (H0-H2)(X0-X2), H1X1, (H1+H2)(X1+X2)) and the registered
// outputs must be
//   Y0 = P00 + (P12 + P21) of the previous accepted block
//   Y1 = P01 + P10 + P22 of the previous accepted block
//   Y2 = P02 + P11 + P20
// one clock after the block, with out_valid following en. Random en gaps check
// that the block delays and outputs hold during a stall.
module tb_ffa3_post;
  localparam int IW = 45, YW = 34;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [IW-1:0] pa01 = '0, pb01 = '0, pa02 = '0, pb02 = '0, p1 = '0, pa12 = '0;
  logic out_valid;
  logic signed [YW-1:0] y0, y1, y2;
  int checks = 0, failures = 0, stalls = 0;
  longint prev_c = 0, prev_p22 = 0, exp_y0 = 0, exp_y1 = 0, exp_y2 = 0;

  ffa3_post #(.IW(IW), .YW(YW)) dut (.clk(clk), .rst_n(rst_n), .en(en),
    .pa01(pa01), .pb01(pb01), .pa02(pa02), .pb02(pb02), .p1(p1), .pa12(pa12),
    .out_valid(out_valid), .y0(y0), .y1(y1), .y2(y2));

  always #5 clk = ~clk;

  function automatic longint prod();
    return longint'($signed(30'($urandom))) * (($urandom % 2) ? 1 : -1);
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint p [3][3];
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 500; c++) begin
      @(negedge clk);
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) p[i][j] = prod();
      en = ($urandom % 4) != 0;
      pa01 = IW'(p[0][0] + p[0][1] + p[1][0] + p[1][1]);
      pb01 = IW'(p[0][0] - p[0][1] - p[1][0] + p[1][1]);
      pa02 = IW'(p[0][0] + p[0][2] + p[2][0] + p[2][2]);
      pb02 = IW'(p[0][0] - p[0][2] - p[2][0] + p[2][2]);
      p1   = IW'(p[1][1]);
      pa12 = IW'(p[1][1] + p[1][2] + p[2][1] + p[2][2]);
      @(posedge clk);
      #1;
      check("out_valid", longint'(out_valid), longint'(en));
      if (en) begin
        exp_y0 = p[0][0] + prev_c;
        exp_y1 = p[0][1] + p[1][0] + prev_p22;
        exp_y2 = p[0][2] + p[1][1] + p[2][0];
        prev_c = p[1][2] + p[2][1];
        prev_p22 = p[2][2];
      end else begin
        stalls++;
      end
      check("y0", longint'(y0), exp_y0);
      check("y1", longint'(y1), exp_y1);
      check("y2", longint'(y2), exp_y2);
    end
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
