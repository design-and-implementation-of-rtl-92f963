// tb_aes_dec_round: drives aes_dec_round with a new random state every clock
// (so three blocks are in flight at once), a random "last round" flag and a
// fixed round key, and checks each output against the reference InvShiftRows,
// InvSubBytes, AddRoundKey, InvMixColumns (skipped when last), and that it
// appears exactly three clocks after it went in.
module tb_aes_dec_round;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         in_valid = 0, in_last = 0, out_valid;
  logic [255:0] state_in = '0, round_key = '0, state_out;
  vec_t         exp_q[$];
  int           sent_at[$];
  int           cycle = 0, n_last = 0, n_mid = 0;

  aes_dec_round dut (.clk, .rst_n, .in_valid, .in_last, .state_in, .round_key,
                     .out_valid, .state_out);

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checker: compare every valid output with the oldest expected value.
  always @(negedge clk) if (rst_n && out_valid) begin
    vec_t e;
    int   t0;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL unexpected output");
    end else begin
      e  = exp_q.pop_front();
      t0 = sent_at.pop_front();
      if (state_out !== e) begin failures++; $display("FAIL got %h exp %h", state_out, e); end
      checks++;
      if (cycle - t0 != 3) begin failures++; $display("FAIL latency %0d", cycle - t0); end
    end
  end

  initial begin
    vec_t s, k, x;
    bit   last;
    repeat (3) @(posedge clk);
    rst_n = 1;
    k = rand_vec();
    round_key = k;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      s    = (i == 0) ? '0 : rand_vec();
      last = ($urandom % 3 == 0);
      if (last) n_last++; else n_mid++;
      in_valid = (i % 7 != 6);  // an idle slot now and then
      in_last  = last;
      state_in = s;
      if (in_valid) begin
        begin x = sub_bytes(shift_rows(s, 8, 1), 8, 1) ^ k; if (!last) x = mix_columns(x, 8, 1); end
        exp_q.push_back(x);
        sent_at.push_back(cycle);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
    checks++;
    if (n_last == 0 || n_mid == 0) begin failures++; $display("FAIL bypass not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
