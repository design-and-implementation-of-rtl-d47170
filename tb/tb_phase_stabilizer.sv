// tb_phase_stabilizer: feeds constellations with a fixed residual rotation and checks that the
// stabiliser turns them onto the constellation of the selected scheme: BPSK points rotated by 45
// degrees (as the carrier loop leaves them) must end on the real axis (|Q| < 3 % of |I|), QPSK
// points rotated by 20 degrees must end on the diagonals. The settled angle must be the opposite of
// the applied rotation (modulo the constellation symmetry), and with `enable` low the samples
// must pass unrotated.
module tb_phase_stabilizer;
  import modem_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, in_valid, out_valid, enable;
  psk_mode_e mode;
  iq_t din, dout;
  logic [4:0] kg;
  phase_t theta;
  int checks = 0, failures = 0;

  phase_stabilizer dut (.*);

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input psk_mode_e m, input real rot_deg, input logic en);
    real r, si, sq, th, sym;
    int bad;
    r = rot_deg * 3.14159265358979 / 180.0;
    mode = m; enable = en;
    rst = 1; in_valid = 0; din = '0;
    @(posedge clk); #1 rst = 0;
    bad = 0;
    for (int n = 0; n < 20000; n++) begin
      if (n % 24 == 0) begin
        si = ($urandom % 2) ? 10000.0 : -10000.0;
        sq = (m == MODE_QPSK) ? (($urandom % 2) ? 10000.0 : -10000.0) : 0.0;
      end
      din.i = 16'(int'(si * $cos(r) - sq * $sin(r)));
      din.q = 16'(int'(si * $sin(r) + sq * $cos(r)));
      in_valid = 1;
      @(posedge clk); #1;
      if (n > 15000 && (n % 24) == 12) begin
        if (!en) begin
          if (dout.i != din.i && rabs(real'(dout.i) - real'(din.i)) > 3.0) bad++;
        end else if (m == MODE_BPSK) begin
          if (rabs(real'(dout.q)) > 0.03 * rabs(real'(dout.i))) bad++;
        end else begin
          if (rabs(rabs(real'(dout.q)) - rabs(real'(dout.i))) > 0.03 * rabs(real'(dout.i))) bad++;
        end
      end
    end
    checks++;
    if (bad > 0) begin failures++; $display("mode %0d rot %f: %0d bad samples", m, rot_deg, bad); end
    if (en) begin
      // settled angle + rotation must be a multiple of the symmetry angle
      sym = (m == MODE_BPSK) ? 180.0 : 90.0;
      th = real'(theta) / 8192.0 * 180.0 / 3.14159265358979 + rot_deg;
      while (th < 0.0) th += sym;
      while (th >= sym) th -= sym;
      if (th > sym / 2.0) th -= sym;
      checks++;
      if (rabs(th) > 2.0) begin failures++; $display("settled angle off by %f deg", th); end
    end
  endtask

  initial begin
    kg = 8;
    run(MODE_BPSK, 45.0, 1'b1);
    run(MODE_BPSK, -30.0, 1'b1);
    run(MODE_QPSK, 20.0, 1'b1);
    run(MODE_QPSK, 0.0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
