// tb_aes_shift_rows: random-vector check of aes_shift_rows against the
// reference model, for the 256-bit block (NB = 8) and, in a second instance,
// the 128-bit block (NB = 4). It also applies the byte-numbering example for
// 256-bit blocks (bytes 1..32 in column order; rows end up rotated by 1, 3
// and 4 places).
module tb_aes_shift_rows;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [255:0] s8, k8, y8;
  logic [127:0] s4, k4, y4;

  aes_shift_rows #(.NB(8)) dut8 (.state_in(s8), .state_out(y8));
  aes_shift_rows #(.NB(4)) dut4 (.state_in(s4), .state_out(y4));

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
      check(vec_t'(y8), shift_rows(s8, 8, 0), "NB=8");
      check(vec_t'(y4), shift_rows(vec_t'(s4), 4, 0), "NB=4");
    end
    // Byte n+1 placed at position n; expected layout after ShiftRows, by row.
    begin
      int exp_rows[4][8] = '{'{1, 5, 9, 13, 17, 21, 25, 29},
                             '{6, 10, 14, 18, 22, 26, 30, 2},
                             '{15, 19, 23, 27, 31, 3, 7, 11},
                             '{20, 24, 28, 32, 4, 8, 12, 16}};
      for (int n = 0; n < 32; n++) s8[255-8*n -: 8] = 8'(n + 1);
      #1;
      for (int c = 0; c < 8; c++)
        for (int rr = 0; rr < 4; rr++) begin
          checks++;
          if (y8[255-8*(4*c+rr) -: 8] != 8'(exp_rows[rr][c])) begin
            failures++;
            $display("FAIL layout row %0d col %0d got %0d", rr, c, y8[255-8*(4*c+rr) -: 8]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
