// tb_ffa2_sym_fir: self-checking end-to-end test of the 2-parallel symmetric
// fast FIR filter.
//
// Two instances, with 12 and 10 even-symmetric taps (sub-filter lengths
// 6 and 5), get the same random blocks of 2 samples, including
// full-scale values, with random in_valid gaps. The serial sequence x(n) is
// rebuilt from the accepted blocks and every output block is compared with the
// direct convolution y(n) = sum h(i) x(n-i) computed here. out_valid must
// follow in_valid by exactly one clock (the filter's latency).
module tb_ffa2_sym_fir;
  localparam int XW = 16, CW = 16, L = 2;
  localparam int NA = 12, NB = 10;
  localparam logic signed [CW-1:0] HA [NA] = '{-16'sd32768, 16'sd2767, 16'sd32767, -16'sd759, 16'sd32767, 16'sd1771, 16'sd1771, 16'sd32767, -16'sd759, 16'sd32767, 16'sd2767, -16'sd32768};
  localparam logic signed [CW-1:0] HB [NB] = '{16'sd32767, -16'sd32768, -16'sd32768, 16'sd32767, 16'sd11544, 16'sd11544, 16'sd32767, -16'sd32768, -16'sd32768, 16'sd32767};
  localparam int YA = fir_ffa_pkg::out_width(XW, CW, NA);
  localparam int YB = fir_ffa_pkg::out_width(XW, CW, NB);

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [XW-1:0] x [L];
  logic out_valid_a, out_valid_b;
  logic signed [YA-1:0] y_a [L];
  logic signed [YB-1:0] y_b [L];
  int checks = 0, failures = 0, stalls = 0, blocks = 0;
  longint xs [$];

  ffa2_sym_fir #(.XW(XW), .CW(CW), .N(NA), .H(HA)) dut_a (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
    .out_valid(out_valid_a), .y(y_a));
  ffa2_sym_fir #(.XW(XW), .CW(CW), .N(NB), .H(HB)) dut_b (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
    .out_valid(out_valid_b), .y(y_b));

  always #5 clk = ~clk;

  function automatic longint conv_a(int n);
    longint acc = 0;
    for (int i = 0; i < NA; i++) if (n - i >= 0) acc += longint'(HA[i]) * xs[n-i];
    return acc;
  endfunction

  function automatic longint conv_b(int n);
    longint acc = 0;
    for (int i = 0; i < NB; i++) if (n - i >= 0) acc += longint'(HB[i]) * xs[n-i];
    return acc;
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
    for (int p = 0; p < L; p++) x[p] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 800; c++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      for (int p = 0; p < L; p++)
        case ($urandom % 8)
          0:       x[p] = 16'sh7fff;
          1:       x[p] = -16'sh8000;
          default: x[p] = XW'($urandom);
        endcase
      @(posedge clk);
      #1;
      check("out_valid_a", longint'(out_valid_a), longint'(in_valid));
      check("out_valid_b", longint'(out_valid_b), longint'(in_valid));
      if (in_valid) begin
        for (int p = 0; p < L; p++) xs.push_back(longint'(x[p]));
        for (int p = 0; p < L; p++) begin
          check("y_a", longint'(y_a[p]), conv_a(L*blocks + p));
          check("y_b", longint'(y_b[p]), conv_b(L*blocks + p));
        end
        blocks++;
      end else begin
        stalls++;
      end
    end
    if (stalls == 0) failures++;
    $display("blocks=%0d stalls=%0d", blocks, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
