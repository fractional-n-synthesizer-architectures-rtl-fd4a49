// tb_dac_decoder: exhaustive check that code k raises select k and no other.
`timescale 1ns/1fs
module tb_dac_decoder;
  logic [4:0] code;
  logic [31:0] sel;
  int checks = 0, failures = 0;

  dac_decoder dut (.code, .sel);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 32; k++) begin
      code = 5'(k);
      #1;
      for (int j = 0; j < 32; j++) begin
        checks++;
        if (sel[j] !== (j == k)) begin failures++; $display("code %0d bit %0d", k, j); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
