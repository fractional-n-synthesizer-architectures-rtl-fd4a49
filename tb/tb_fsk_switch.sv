// tb_fsk_switch: drives a random-walk loop word and random data with bits of
// random length, and compares every cycle with a model of the sampling
// scheme: path B = loop word, path A = loop word + Delta (saturated), the A
// word sampled at each 1->0 transition and the B word at each 0->1, Delta =
// last A sample - last B sample once both exist, everything cleared while the
// scheme is disabled. Both kinds of update must occur.
`timescale 1ns/1fs
module tb_fsk_switch;
  logic clk = 0, rst_n = 0, en = 1, data = 0;
  logic [15:0] loop_word = 16'd30000, word_a, word_b;
  logic mux_sel, upd_ab, upd_ba;
  logic signed [16:0] delta;
  int checks = 0, failures = 0, n_ab = 0, n_ba = 0;

  fsk_switch dut (.clk, .rst_n, .en, .data, .loop_word, .word_a, .word_b,
                  .mux_sel, .delta, .upd_ab, .upd_ba);
  always #2.5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m_delta, m_va, m_vb, e_a, run;
    bit m_dd, m_vaok, m_vbok;
    m_delta = 0; m_va = 0; m_vb = 0; m_dd = 0; m_vaok = 0; m_vbok = 0; run = 0;
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 60000; n++) begin
      e_a = int'(loop_word) + m_delta;
      if (e_a < 0) e_a = 0;
      if (e_a > 65535) e_a = 65535;
      checks++;
      if (word_b != loop_word || int'(word_a) != e_a || int'(delta) != m_delta || mux_sel != data) begin
        failures++;
        if (failures < 10) $display("n%0d a=%0d/%0d delta=%0d/%0d", n, word_a, e_a, delta, m_delta);
      end
      checks++;
      if (upd_ab != (en && m_dd && !data && m_vbok) || upd_ba != (en && !m_dd && data && m_vaok)) begin
        failures++; $display("update flags at %0d", n);
      end
      // model update at the coming edge
      if (!en) begin m_vaok = 0; m_vbok = 0; m_delta = 0; end
      else if (m_dd && !data) begin
        if (m_vbok) begin m_delta = e_a - m_vb; n_ab++; end
        m_va = e_a; m_vaok = 1;
      end else if (!m_dd && data) begin
        if (m_vaok) begin m_delta = m_va - int'(loop_word); n_ba++; end
        m_vb = int'(loop_word); m_vbok = 1;
      end
      m_dd = data;
      @(negedge clk);
      // new stimulus
      loop_word = 16'(int'(loop_word) + $urandom_range(0, 40) - 20);
      if (n % 500 == 0) loop_word = 16'($urandom_range(0, 65535));
      if (run == 0) begin data = ~data; run = $urandom_range(1, 6); end
      run--;
      en = !(n > 20000 && n < 21000);
      #1;
    end
    checks++;
    if (n_ab == 0 || n_ba == 0) begin failures++; $display("updates %0d %0d", n_ab, n_ba); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
