// tb_aes_top: end-to-end test of aes_top at its default configuration
// (256-bit block, 256-bit key, 14 rounds).
// It loads keys through the key schedule, encrypts and decrypts known-answer
// and random blocks, decrypts every cipher-text it produced, and checks each
// result against the reference model plus the documented timing (key ready
// 112 clocks after load, done 56 clocks after start). It also counts how
// often each mechanism of the design was exercised and fails if any never
// was: key expansion, encryption, decryption, a switch between the two
// modes, the last round without (Inv)MixColumns, a start ignored while busy,
// a start ignored while the key was still expanding, a key load ignored
// while busy.
module tb_aes_top;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         key_load = 0, start = 0, decrypt = 0;
  logic [255:0] key = '0, block_in = '0, block_out;
  logic         key_ready, busy, done;
  int           cycle = 0;

  int n_keyexp = 0, n_enc = 0, n_dec = 0, n_switch = 0, n_enc_last = 0, n_dec_last = 0;
  int n_start_busy = 0, n_start_nokey = 0, n_load_busy = 0;
  bit last_mode_valid = 0, last_mode = 0;

  aes_top dut (.clk, .rst_n, .key_load, .key, .key_ready, .start, .decrypt, .block_in,
               .busy, .done, .block_out);

  always @(posedge clk) cycle <= cycle + 1;

  // Rounds that skip (Inv)MixColumns, seen at the round pipelines' inputs.
  always @(posedge clk) begin
    if (dut.u_enc.u_round.in_valid && dut.u_enc.u_round.in_last) n_enc_last++;
    if (dut.u_dec.u_round.in_valid && dut.u_dec.u_round.in_last) n_dec_last++;
  end

  task automatic check(input vec_t got, input vec_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  task automatic load_key(input vec_t k);
    int t0;
    @(negedge clk);
    key = k;
    key_load = 1;
    @(negedge clk);
    t0 = cycle;
    key_load = 0;
    // A start during key expansion must be ignored.
    start = 1; block_in = rand_vec();
    @(negedge clk);
    start = 0;
    checks++;
    if (!busy || key_ready) begin failures++; $display("FAIL start taken during key expansion"); end
    else n_start_nokey++;
    while (!key_ready) @(negedge clk);
    checks++;
    if (cycle - t0 != 112) begin failures++; $display("FAIL load-to-ready %0d", cycle - t0); end
    n_keyexp++;
  endtask

  task automatic op(input bit dec, input vec_t b, input vec_t exp, input string what,
                    output vec_t result);
    int t0;
    @(negedge clk);
    decrypt = dec; block_in = b; start = 1;
    @(negedge clk);
    t0 = cycle;
    start = 0;
    if (last_mode_valid && last_mode != dec) n_switch++;
    last_mode_valid = 1; last_mode = dec;
    repeat (5) @(negedge clk);
    // While busy: another start (other mode) and a key load must be ignored.
    decrypt = !dec; block_in = ~b; start = 1; key_load = 1; key = ~key;
    @(negedge clk);
    start = 0; key_load = 0; key = ~key;
    n_start_busy++;
    n_load_busy++;
    while (!done) begin
      @(negedge clk);
      if (cycle - t0 > 100) break;
    end
    checks++;
    if (cycle - t0 != 56) begin failures++; $display("FAIL start-to-done %0d", cycle - t0); end
    check(block_out, exp, what);
    checks++;
    if (!key_ready) begin failures++; $display("FAIL key lost after an ignored load"); end
    if (dec) n_dec++; else n_enc++;
    result = block_out;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t k, p, c, r;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (key_ready || busy) begin failures++; $display("FAIL flags after reset"); end

    k = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
    load_key(k);
    op(0, k, 256'h623d2bd4ca3796dc3d02ecf2f37fb637fd3da58509cebb67ab9265b04db51e7d, "KAT enc", c);
    op(1, c, k, "KAT dec", r);
    load_key('0);
    op(0, '0, 256'hc6227e7740b7e53b5cb77865278eab0726f62366d9aabad908936123a1fc8af3, "KAT zero", c);

    for (int t = 0; t < 4; t++) begin
      k = rand_vec();
      load_key(k);
      for (int i = 0; i < 3; i++) begin
        p = rand_vec();
        op(0, p, encrypt(p, k, 8, 8), "random enc", c);
        op(1, c, p, "round trip dec", r);
        p = rand_vec();
        op(1, p, aes_ref_pkg::decrypt(p, k, 8, 8), "random dec", r);
      end
    end

    $display("mechanisms: keyexp=%0d enc=%0d dec=%0d mode_switch=%0d enc_last_round=%0d dec_last_round=%0d start_ignored_busy=%0d start_ignored_nokey=%0d load_ignored_busy=%0d",
             n_keyexp, n_enc, n_dec, n_switch, n_enc_last, n_dec_last, n_start_busy, n_start_nokey, n_load_busy);
    begin
      int cnt[9];
      cnt = '{n_keyexp, n_enc, n_dec, n_switch, n_enc_last, n_dec_last,
                     n_start_busy, n_start_nokey, n_load_busy};
      for (int i = 0; i < 9; i++) begin
        checks++;
        if (cnt[i] == 0) begin failures++; $display("FAIL mechanism %0d never exercised", i); end
      end
      checks++;
      if (n_enc_last != n_enc || n_dec_last != n_dec) begin
        failures++; $display("FAIL last-round count does not match the block count");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
