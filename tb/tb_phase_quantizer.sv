// tb_phase_quantizer: checks that the quantizer flop takes the level of the
// divider clock at each reference rising edge (not between edges) and that
// the output word is +kpd for 1 and -kpd for 0, for random kpd values.
`timescale 1ns/1fs
module tb_phase_quantizer;
  import fnpll_pkg::*;
  logic ref_clk = 0, rst_n = 0, div_clk = 0, q;
  logic [RATIO_W-1:0] kpd;
  pd_word_t pd_out;
  int checks = 0, failures = 0;

  phase_quantizer dut (.ref_clk, .rst_n, .div_clk, .kpd, .q, .pd_out);

  always #2.7 ref_clk = ~ref_clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_q;
    kpd = 20'(KPD_CODE);
    #1 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge ref_clk);
      kpd     = (i % 7 == 0) ? 20'($urandom_range(1, 20000)) : 20'(KPD_CODE);
      exp_q   = 1'($urandom);
      div_clk = exp_q;
      @(posedge ref_clk);
      #0.5 div_clk = ~exp_q;              // change after the edge: ignored
      #0.5;
      checks++;
      if (q !== exp_q) begin failures++; $display("q mismatch at %0d", i); end
      checks++;
      if (pd_out !== (exp_q ? pd_word_t'(kpd) : -pd_word_t'(kpd))) begin
        failures++; $display("pd_out %0d for q=%0b kpd=%0d", pd_out, exp_q, kpd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
