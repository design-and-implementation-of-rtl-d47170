// tb_phase_wrapper: random phases within (-3*pi, 3*pi), at two fixed-point scalings; the output
// must be x, x - 2*pi or x + 2*pi with pi = 25735 * 2^FRAC, and inside [-pi, pi].
module tb_phase_wrapper;
  logic signed [33:0] din16, dout16;
  logic signed [15:0] din0, dout0;
  int checks = 0, failures = 0;

  phase_wrapper #(.W(34), .FRAC(16)) dut16 (.din(din16), .dout(dout16));
  phase_wrapper #(.W(16), .FRAC(0)) dut0 (.din(din0), .dout(dout0));

  initial begin
    longint pi16, x, e;
    int x0, e0;
    pi16 = 64'd25735 << 16;
    for (int n = 0; n < 5000; n++) begin
      x = (longint'($urandom) << 2 | longint'($urandom % 4)) % (3 * pi16 - 1);
      if ($urandom % 2) x = -x;
      if (n == 0) x = pi16;
      if (n == 1) x = -pi16;
      if (n == 2) x = pi16 + 1;
      din16 = 34'(x);
      #1;
      e = (x > pi16) ? x - 2 * pi16 : (x < -pi16) ? x + 2 * pi16 : x;
      checks++;
      if (longint'(dout16) != e) begin
        failures++;
        if (failures < 5) $display("%0d -> %0d want %0d", x, dout16, e);
      end
    end
    // FRAC = 0 instance (pi = 25735)
    for (int n = 0; n < 200; n++) begin
      din0 = 16'($urandom);
      #1;
      x0 = int'(din0);
      e0 = (x0 > 25735) ? x0 - 51470 : (x0 < -25735) ? x0 + 51470 : x0;
      checks++;
      if (int'(dout0) != e0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
