// tb_prbs16: checks the generator against the properties of the polynomial
// x^16 + x^15 + x^13 + x^4 + 1: the state returns to the seed after exactly
// 2^16 - 1 steps and not before, the sequence holds 2^15 ones, and every
// output bit satisfies the recurrence of the reciprocal polynomial,
// s[n+16] = s[n+12] ^ s[n+3] ^ s[n+1] ^ s[n] (the order in which a
// right-shifting Galois register emits the sequence). Holding step low must
// freeze the state.
`timescale 1ns/1fs
module tb_prbs16;
  logic clk = 0, rst_n = 0, step = 0, bit_out;
  logic [15:0] state;
  int checks = 0, failures = 0;

  prbs16 dut (.clk, .rst_n, .step, .bit_out, .state);
  always #2.5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit seq [0:65551];

  initial begin
    int ones, period, rec_fail;
    logic [15:0] seed, hold;
    #3 rst_n = 1;
    @(negedge clk);
    seed = state;
    checks++;
    if (seed == 16'h0) begin failures++; $display("zero seed"); end
    hold = state;
    repeat (5) @(negedge clk);
    checks++;
    if (state != hold) begin failures++; $display("advanced without step"); end
    step = 1;
    ones = 0; period = 0;
    for (int n = 0; n < 65552; n++) begin
      seq[n] = bit_out;
      if (n < 65535) ones += int'(bit_out);
      @(negedge clk);
      if (period == 0 && state == seed) period = n + 1;
    end
    checks++;
    if (period != 65535) begin failures++; $display("period %0d", period); end
    checks++;
    if (ones != 32768) begin failures++; $display("ones %0d", ones); end
    rec_fail = 0;
    for (int n = 0; n + 16 < 65552; n++) begin
      checks++;
      if (seq[n+16] != (seq[n+12] ^ seq[n+3] ^ seq[n+1] ^ seq[n])) rec_fail++;
    end
    failures += rec_fail;
    if (rec_fail != 0) $display("recurrence failed %0d times", rec_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
