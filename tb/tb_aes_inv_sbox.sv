// tb_aes_inv_sbox: exhaustive check of aes_inv_sbox. All 256 inputs are applied and
// each output is compared with the reference model, which builds the table
// from the S-box definition rather than from a stored table.
module tb_aes_inv_sbox;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] a, y;

  aes_inv_sbox dut (.in_byte(a), .out_byte(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      byte unsigned exp;
      a = 8'(i);
      #1;
      exp = inv_sbox(a);
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL in=%02h got=%02h exp=%02h", a, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
