// tb_loop_integrator: drives random +/-Kpd words and compares the integrator
// with an integer model of acc += (pd * Klp_code) >> 16, including the
// 16-bit output slice, the one-cycle latency and saturation at both ends
// (forced by long runs of one sign). With Kpd = 1311 the step must be 187.
`timescale 1ns/1fs
module tb_loop_integrator;
  import fnpll_pkg::*;
  logic clk = 0, rst_n = 0;
  pd_word_t pd;
  logic [19:0] ctrl;
  logic [15:0] ctrl16;
  int checks = 0, failures = 0;
  int sat_hi = 0, sat_lo = 0;

  loop_integrator dut (.clk, .rst_n, .pd, .ctrl, .ctrl16);
  always #2.5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint m, step;
    pd = pd_word_t'(KPD_CODE);
    #3 rst_n = 1;
    m = (64'd1 << 20) - 1;
    checks++;
    if (ctrl != 20'(m)) begin failures++; $display("reset value %0d", ctrl); end
    for (int n = 0; n < 40000; n++) begin
      @(negedge clk);
      checks++;
      if (longint'(ctrl) != m || ctrl16 != 16'(m >> 4)) begin
        failures++;
        if (failures < 10) $display("n%0d ctrl=%0d model=%0d", n, ctrl, m);
      end
      // phases: random, long positive run, random, long negative run
      if ((n / 10000) % 2 == 1) pd = ((n / 20000) == 0) ? pd_word_t'(KPD_CODE) : -pd_word_t'(KPD_CODE);
      else                      pd = $urandom_range(0, 1) ? pd_word_t'(KPD_CODE) : -pd_word_t'(KPD_CODE);
      step = (longint'(pd) * longint'(KLP_CODE)) >>> 16;
      if (n == 0) begin
        checks++;
        if (step != 187 && step != -188) begin failures++; $display("step %0d", step); end
      end
      m = m + step;
      if (m > (64'sd1 <<< 20) - 1) begin m = (64'sd1 <<< 20) - 1; sat_hi++; end
      if (m < 0) begin m = 0; sat_lo++; end
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin failures++; $display("saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
