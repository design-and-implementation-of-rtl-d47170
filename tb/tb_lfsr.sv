// tb_lfsr: checks the 10-bit LFSR against an independent model of the x^9 + x^6 + 1 register.
// It loads a seed, steps the register with irregular gaps, compares the state and output bit
// after every clock, checks that the sequence repeats after exactly 1023 steps and that a
// reset reloads the seed.
module tb_lfsr;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, step;
  logic [9:0] seed, state;
  logic bit_out;
  int checks = 0, failures = 0;

  lfsr dut (.*);

  logic [9:0] model;
  function automatic logic [9:0] nxt(input logic [9:0] s);
    return {s[8:0], s[9] ^ s[6]};
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int period;
    logic [9:0] first;
    seed = 10'h2A5;
    rst = 1; step = 0;
    @(posedge clk); #1;
    rst = 0;
    model = seed;
    checks++; if (state !== seed) failures++;
    for (int n = 0; n < 2500; n++) begin
      step = ($urandom % 4) != 0;
      @(posedge clk); #1;
      if (step) model = nxt(model);
      checks++;
      if (state !== model || bit_out !== model[0]) begin
        failures++;
        if (failures < 5) $display("mismatch at %0d: %h vs %h", n, state, model);
      end
    end
    // period
    step = 1;
    first = state;
    period = 0;
    do begin
      @(posedge clk); #1;
      period++;
    end while (state !== first && period < 2000);
    checks++;
    if (period != 1023) begin failures++; $display("period %0d", period); end
    // reset reloads seed
    seed = 10'h001;
    rst = 1; @(posedge clk); #1; rst = 0;
    checks++; if (state !== 10'h001) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
