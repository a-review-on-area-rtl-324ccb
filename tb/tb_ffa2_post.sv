// tb_ffa2_post: self-checking test of the two-parallel post-processing.
//
// Each block is described by four random cross products P00 = H0X0,
// P01 = H0X1, P10 = H1X0, P11 = H1X1; the sub-filter outputs are formed from
// them (pa = (H0+H1)(X0+X1), pb = (H0-H1)(X0-X1), p1 = H1X1) and the registered
// outputs must be Y0 = P00 + P11 of the previous accepted block and
// Y1 = P01 + P10, one clock after the block, with out_valid following en.
// Random en gaps check that the block delay and outputs hold during a stall.
module tb_ffa2_post;
  localparam int IW = 43, YW = 33;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [IW-1:0] pa = '0, pb = '0, p1 = '0;
  logic out_valid;
  logic signed [YW-1:0] y0, y1;
  int checks = 0, failures = 0, stalls = 0;
  longint prev_p11 = 0, exp_y0 = 0, exp_y1 = 0;

  ffa2_post #(.IW(IW), .YW(YW)) dut (.clk(clk), .rst_n(rst_n), .en(en),
    .pa(pa), .pb(pb), .p1(p1), .out_valid(out_valid), .y0(y0), .y1(y1));

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
    longint p00, p01, p10, p11;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 500; c++) begin
      @(negedge clk);
      p00 = prod(); p01 = prod(); p10 = prod(); p11 = prod();
      en = ($urandom % 4) != 0;
      pa = IW'(p00 + p01 + p10 + p11);
      pb = IW'(p00 - p01 - p10 + p11);
      p1 = IW'(p11);
      @(posedge clk);
      #1;
      check("out_valid", longint'(out_valid), longint'(en));
      if (en) begin
        exp_y0 = p00 + prev_p11;
        exp_y1 = p01 + p10;
        prev_p11 = p11;
      end else begin
        stalls++;
      end
      check("y0", longint'(y0), exp_y0);
      check("y1", longint'(y1), exp_y1);
    end
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
