// tb_ffa3_pre: self-checking test of the three-parallel pre-adders.
// Random and extreme sample triples; the five outputs are compared with the
// sums and differences computed in 64-bit integers.
module tb_ffa3_pre;
  localparam int XW = 16;
  logic signed [XW-1:0] x0, x1, x2;
  logic signed [XW:0]   s01, d01, s02, d02, s12;
  int checks = 0, failures = 0;

  ffa3_pre #(.XW(XW)) dut (.x0(x0), .x1(x1), .x2(x2),
    .s01(s01), .d01(d01), .s02(s02), .d02(d02), .s12(s12));

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
      x2 = pick();
      #1;
      check("s01", longint'(s01), longint'(x0) + longint'(x1));
      check("d01", longint'(d01), longint'(x0) - longint'(x1));
      check("s02", longint'(s02), longint'(x0) + longint'(x2));
      check("d02", longint'(d02), longint'(x0) - longint'(x2));
      check("s12", longint'(s12), longint'(x1) + longint'(x2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
