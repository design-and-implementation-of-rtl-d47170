// tb_pi_loop_filter: random inputs and gain shifts; after each valid input the output must be
// (x<<FRAC)>>>kp plus the accumulator of earlier (x<<FRAC)>>>ki terms, computed by an
// independent model, for a saturating instance (FRAC = 13) and a wrapping instance (FRAC = 0),
// including a long constant input that drives the first into saturation.
module tb_pi_loop_filter;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, in_valid, v1, v2;
  logic signed [17:0] din;
  logic [4:0] kp, ki;
  logic signed [31:0] out1, int1, out2, int2;
  int checks = 0, failures = 0;

  pi_loop_filter #(.W_IN(18), .W(32), .FRAC(13), .SAT(1'b1)) dut1 (
    .clk(clk), .rst(rst), .in_valid(in_valid), .din(din), .kp(kp), .ki(ki),
    .dout(out1), .integ(int1), .out_valid(v1));
  pi_loop_filter #(.W_IN(18), .W(32), .FRAC(0), .SAT(1'b0)) dut2 (
    .clk(clk), .rst(rst), .in_valid(in_valid), .din(din), .kp(kp), .ki(ki),
    .dout(out2), .integ(int2), .out_valid(v2));

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat32(input longint v);
    if (v > 64'sd2147483647) return 64'sd2147483647;
    if (v < -64'sd2147483647) return -64'sd2147483647;
    return v;
  endfunction

  initial begin
    longint a1, a2, o1, o2, x;
    logic signed [31:0] w;
    rst = 1; in_valid = 0; din = 0; kp = 4; ki = 9;
    @(posedge clk); #1 rst = 0;
    a1 = 0; a2 = 0; o1 = 0; o2 = 0;
    for (int n = 0; n < 6000; n++) begin
      in_valid = ($urandom % 3) != 0;
      if (n < 4000) din = 18'($urandom);
      else          din = 18'sd100000;
      if (n % 500 == 0) begin kp = 5'($urandom % 10); ki = 5'(4 + $urandom % 12); end
      @(posedge clk); #1;
      if (in_valid) begin
        x = longint'(din);
        o1 = sat32(a1 + ((x <<< 13) >>> kp));
        a1 = sat32(a1 + ((x <<< 13) >>> ki));
        w = 32'(a2 + (x >>> kp)); o2 = longint'(w);
        w = 32'(a2 + (x >>> ki)); a2 = longint'(w);
      end
      checks++;
      if (longint'(out1) != o1 || longint'(int1) != a1 || longint'(out2) != o2 ||
          longint'(int2) != a2 || v1 != in_valid) begin
        failures++;
        if (failures < 5) $display("n %0d got %0d %0d %0d %0d want %0d %0d %0d %0d", n, out1, int1, out2, int2, o1, a1, o2, a2);
      end
    end
    checks++;
    if (int1 != 32'sd2147483647) begin failures++; $display("no saturation %0d", int1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
