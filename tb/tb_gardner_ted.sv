// tb_gardner_ted: random sample triples; the registered error must equal
// ((y[n-2] - y[n]) * y[n-1] for I plus the same for Q) >>> 15. A late-sampled rising transition
// must give a negative error and an early one a positive error.
module tb_gardner_ted;
  import modem_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, in_valid, out_valid;
  iq_t y0, y1, y2;
  logic signed [19:0] err;
  int checks = 0, failures = 0;

  gardner_ted dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    rst = 1; in_valid = 0; y0 = '0; y1 = '0; y2 = '0;
    @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 3000; n++) begin
      y0 = iq_t'($urandom); y1 = iq_t'($urandom); y2 = iq_t'($urandom);
      in_valid = 1;
      @(posedge clk); #1;
      e = ((longint'(y2.i) - longint'(y0.i)) * longint'(y1.i) +
           (longint'(y2.q) - longint'(y0.q)) * longint'(y1.q)) >>> 15;
      checks++;
      if (longint'(err) != e || !out_valid) begin
        failures++;
        if (failures < 5) $display("got %0d want %0d", err, e);
      end
    end
    // rising transition -A -> +A sampled late: the middle sample is already positive
    y2 = '{i: -16'sd10000, q: 16'sd0}; y1 = '{i: 16'sd3000, q: 16'sd0}; y0 = '{i: 16'sd10000, q: 16'sd0};
    @(posedge clk); #1; checks++; if (err >= 0) failures++;
    y1 = '{i: -16'sd3000, q: 16'sd0};
    @(posedge clk); #1; checks++; if (err <= 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
