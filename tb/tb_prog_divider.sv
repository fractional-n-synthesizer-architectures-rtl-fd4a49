// tb_prog_divider: drives the divider with a fast clock and a control word
// that changes at random instants, asynchronously to the divider. Every
// output period is measured in input periods and must equal
// 8 + CON0 + 2*CON1 + 4*CON2 for the control captured at the start of that
// period, which in turn must be the control applied at that moment. All
// eight ratios must be seen.
`timescale 1ns/1fs
module tb_prog_divider;
  logic vco_clk = 0, rst_n = 0;
  logic [2:0] con = 3'd0, con_q;
  logic div_out;
  int checks = 0, failures = 0;
  int unsigned seen = 0;

  prog_divider dut (.vco_clk, .rst_n, .con, .div_out, .con_q);

  always #0.223 vco_clk = ~vco_clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // change the control at random times
  initial begin
    forever begin
      #($urandom_range(1000, 9000) * 0.001);
      con = 3'($urandom);
      t_change = $realtime;
    end
  end

  real t_change = 0.0;
  int cnt = 0;
  always @(posedge vco_clk) cnt <= cnt + 1;

  initial begin
    int last_edge, periods, exp_ratio;
    logic [2:0] con_at_start;
    #2 rst_n = 1;
    @(posedge div_out);
    #0.01;
    last_edge = cnt; con_at_start = con_q;
    periods = 0;
    while (periods < 4000) begin
      @(posedge div_out);
      exp_ratio = 8 + int'(con_at_start[0]) + 2 * int'(con_at_start[1]) + 4 * int'(con_at_start[2]);
      checks++;
      if (cnt - last_edge != exp_ratio) begin
        failures++;
        if (failures < 10) $display("period %0d: %0d input periods, expected %0d", periods, cnt - last_edge, exp_ratio);
      end
      seen |= 1 << (exp_ratio - 8);
      // the capture register takes the control present at the output edge
      #0.001;
      if ($realtime - t_change > 0.01) begin
        checks++;
        if (con_q !== con) begin failures++; $display("capture mismatch"); end
      end
      #0.009;
      last_edge = cnt; con_at_start = con_q;
      periods++;
    end
    checks++;
    if (seen != 8'hFF) begin failures++; $display("ratios seen %b", seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
