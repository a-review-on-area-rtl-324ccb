// tb_ffa2_pre: self-checking test of the two-parallel pre-adders.
// Random and extreme sample pairs; s01 and d01 are compared with X0 + X1 and
// X0 - X1 computed in 64-bit integers, which also checks the extra output bit.
module tb_ffa2_pre;
  localparam int XW = 16;
  logic signed [XW-1:0] x0, x1;
  logic signed [XW:0]   s01, d01;
  int checks = 0, failures = 0;

  ffa2_pre #(.XW(XW)) dut (.x0(x0), .x1(x1), .s01(s01), .d01(d01));

  function automatic logic signed [XW-1:0] pick();
    case ($urandom % 6)
      0:       return {1'b0, {(XW-1){1'b1}}};
      1:       return {1'b1, {(XW-1){1'b0}}};
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
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      x0 = pick();
      x1 = pick();
      #1;
      check("s01", longint'(s01), longint'(x0) + longint'(x1));
      check("d01", longint'(d01), longint'(x0) - longint'(x1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
