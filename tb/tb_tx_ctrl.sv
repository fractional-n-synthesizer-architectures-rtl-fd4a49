// tb_tx_ctrl: checks the bit timing (one strobe every 200 reference cycles),
// that data takes the external input at each strobe in normal mode and the
// PRBS bit in test mode (against a model register with taps 16, 15, 13, 4),
// and that the ratio word is the channel entry plus the FSK offset for
// data = 1: entry 15 = round(4.075 * 2^17) = 534118, entries spaced by
// round(5 MHz / 185.5 MHz * 2^17) = 3533, offset round(0.0025 * 2^17) = 328.
`timescale 1ns/1fs
module tb_tx_ctrl;
  logic clk = 0, rst_n = 0, prbs_mode = 0, ext_data = 0;
  logic [3:0] chan = 4'd15;
  logic [19:0] ratio;
  logic data, bit_strobe;
  int checks = 0, failures = 0;

  tx_ctrl dut (.clk, .rst_n, .chan, .prbs_mode, .ext_data, .ratio, .data, .bit_strobe);
  always #2.5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, last_strobe, nbits;
    logic [15:0] lfsr;
    logic exp_d;
    lfsr = 16'hACE1;
    cyc = 0; last_strobe = -1; nbits = 0;
    @(negedge clk);
    rst_n = 1;
    while (nbits < 600) begin
      if (bit_strobe) begin
        if (last_strobe >= 0) begin
          checks++;
          if (cyc - last_strobe != 200) begin failures++; $display("bit period %0d", cyc - last_strobe); end
        end
        last_strobe = cyc;
        exp_d = prbs_mode ? lfsr[0] : ext_data;
        if (prbs_mode) lfsr = (lfsr >> 1) ^ (lfsr[0] ? 16'hD008 : 16'h0);
        @(negedge clk); cyc++;
        checks++;
        if (data != exp_d) begin failures++; $display("data at bit %0d", nbits); end
        checks++;
        if (ratio != 20'(534118 - (15 - int'(chan)) * 3533 + (data ? 328 : 0))) begin
          failures++; $display("ratio %0d chan %0d data %0d", ratio, chan, data);
        end
        nbits++;
        ext_data = 1'($urandom);
        if (nbits % 50 == 0) chan = 4'($urandom);
        if (nbits == 300) prbs_mode = 1;
      end else begin
        @(negedge clk); cyc++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
