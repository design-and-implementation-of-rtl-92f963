// tb_aes_inv_mix_columns: random-vector check of aes_inv_mix_columns against
// the reference model, for the 256-bit block (NB = 8) and, in a second
// instance, the 128-bit block (NB = 4). Known column: 8e 4d a1 bc -> db 13 53
// 45.
module tb_aes_inv_mix_columns;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [255:0] s8, k8, y8;
  logic [127:0] s4, k4, y4;

  aes_inv_mix_columns #(.NB(8)) dut8 (.state_in(s8), .state_out(y8));
  aes_inv_mix_columns #(.NB(4)) dut4 (.state_in(s4), .state_out(y4));

  task automatic check(input vec_t got, input vec_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t r, k;
    for (int i = 0; i < 200; i++) begin
      r = (i == 0) ? '0 : (i == 1) ? '1 : rand_vec();
      k = rand_vec();
      s8 = r; k8 = k;
      s4 = r[127:0]; k4 = k[127:0];
      #1;
      check(vec_t'(y8), mix_columns(s8, 8, 1), "NB=8");
      check(vec_t'(y4), mix_columns(vec_t'(s4), 4, 1), "NB=4");
    end
    s8 = {8{32'h8e4da1bc}};
    #1;
    check(vec_t'(y8), {8{32'hdb135345}}, "known column");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
