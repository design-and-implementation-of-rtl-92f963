// tb_aes_round_key_select: fills the expanded key with random words and
// checks that every round index 0..NR returns words r*NB..r*NB+NB-1, and
// that an index past NR returns zero.
module tb_aes_round_key_select;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [120*32-1:0] rks;
  logic [3:0]        round;
  logic [255:0]      rk;

  aes_round_key_select dut (.round_keys(rks), .round(round), .round_key(rk));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 10; t++) begin
      for (int i = 0; i < 120; i++) rks[32*i +: 32] = $urandom;
      for (int r = 0; r < 16; r++) begin
        logic [255:0] exp;
        round = 4'(r);
        #1;
        exp = '0;
        if (r <= 14) for (int c = 0; c < 8; c++) exp[255-32*c -: 32] = rks[120*32-1-32*(8*r+c) -: 32];
        checks++;
        if (rk !== exp) begin failures++; $display("FAIL round %0d got %h exp %h", r, rk, exp); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
