// tb_analog_mux: toggles the select and checks break-before-make: right
// after a change both switches are open and the output holds its previous
// voltage, and after the gap exactly the selected switch is closed and the
// output follows the selected input (also when that input moves).
`timescale 1ns/1fs
module tb_analog_mux;
  real va, vb, vout;
  logic sel_a = 0, sw_a, sw_b;
  int checks = 0, failures = 0;
  int gaps = 0;

  analog_mux dut (.va, .vb, .sel_a, .vout, .sw_a, .sw_b);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(sw_a or sw_b) begin
    checks++;
    if (sw_a && sw_b) begin failures++; $display("both on at %t", $realtime); end
  end

  initial begin
    real v_prev;
    va = 0.9; vb = 0.3;
    #5;
    for (int i = 0; i < 50; i++) begin
      va = 0.5 + 0.01 * real'(i); vb = 0.2 + 0.005 * real'(i);
      #1;
      v_prev = vout;
      sel_a = ~sel_a;
      #0.05;
      checks++;
      if (sw_a || sw_b) begin failures++; $display("no break at %0d", i); end
      else gaps++;
      checks++;
      if (vout != v_prev) begin failures++; $display("output not held"); end
      #1;
      checks++;
      if (sw_a != sel_a || sw_b != !sel_a) begin failures++; $display("wrong switch %0d", i); end
      checks++;
      if (vout != (sel_a ? va : vb)) begin failures++; $display("vout %f", vout); end
      if (sel_a) va = va + 0.1; else vb = vb + 0.1;
      #0.1;
      checks++;
      if (vout != (sel_a ? va : vb)) begin failures++; $display("not tracking"); end
    end
    checks++;
    if (gaps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
