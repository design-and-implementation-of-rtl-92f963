// tb_aes_decrypt_core: checks the rolled decryption core.
// The expanded key is produced by the reference model, so the core is
// tested on its own. Three configurations run side by side: the 256-bit
// block with a 256-bit key (default), AES-128 and AES-256 (NB = 4).
// Checked: known-answer vectors (FIPS-197 for the NB = 4 ones, 256-bit
// block vectors from an independent model), random blocks against the
// reference, the start-to-done time of 4*NR clocks, that start is ignored
// while busy and while key_ready is low.
module tb_aes_decrypt_core;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              start8 = 0, start4 = 0, start48 = 0, key_ready = 0;
  logic [255:0]      in8 = '0, out8;
  logic [127:0]      in4 = '0, in48 = '0, out4, out48;
  logic [120*32-1:0] rk8 = '0;
  logic [44*32-1:0]  rk4 = '0;
  logic [60*32-1:0]  rk48 = '0;
  logic              busy8, done8, busy4, done4, busy48, done48;
  int                cycle = 0;

  aes_decrypt_core dut8 (.clk, .rst_n, .start(start8), .block_in(in8), .key_ready,
                        .round_keys(rk8), .busy(busy8), .done(done8), .block_out(out8));
  aes_decrypt_core #(.NB(4), .NK(4)) dut4 (.clk, .rst_n, .start(start4), .block_in(in4),
                        .key_ready, .round_keys(rk4), .busy(busy4), .done(done4),
                        .block_out(out4));
  aes_decrypt_core #(.NB(4), .NK(8)) dut48 (.clk, .rst_n, .start(start48), .block_in(in48),
                        .key_ready, .round_keys(rk48), .busy(busy48), .done(done48),
                        .block_out(out48));

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input vec_t got, input vec_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  task automatic set_keys(input vec_t k8, input vec_t k4, input vec_t k48);
    for (int i = 0; i < 120; i++) rk8[120*32-1-32*i -: 32] = key_word(k8, 8, 8, i);
    for (int i = 0; i < 44; i++)  rk4[44*32-1-32*i -: 32]  = key_word(k4, 4, 4, i);
    for (int i = 0; i < 60; i++)  rk48[60*32-1-32*i -: 32] = key_word(k48, 4, 8, i);
  endtask

  // Runs one block through all three cores; a second start arrives mid-way
  // with a different block and must be ignored.
  task automatic run(input vec_t b8, input vec_t b4, input vec_t b48,
                     input vec_t e8, input vec_t e4, input vec_t e48, input string what);
    int t0;
    @(negedge clk);
    in8 = b8; in4 = b4[127:0]; in48 = b48[127:0];
    start8 = 1; start4 = 1; start48 = 1;
    @(negedge clk);
    t0 = cycle;  // clock edges up to and including the one that took start
    start8 = 0; start4 = 0; start48 = 0;
    repeat (10) @(negedge clk);
    in8 = ~b8; in4 = ~b4[127:0]; in48 = ~b48[127:0];
    start8 = 1; start4 = 1; start48 = 1;
    @(negedge clk);
    start8 = 0; start4 = 0; start48 = 0;
    while (!done8) @(negedge clk);
    checks++;
    if (cycle - t0 != 56) begin failures++; $display("FAIL NB8 start-to-done %0d, expected 56", cycle - t0); end
    check(out8, e8, {what, " NB8"});
    while (!done4 || !done48) begin
      @(negedge clk);
      if (cycle - t0 > 60) break;
    end
    check(vec_t'(out4), e4, {what, " NB4"});
    check(vec_t'(out48), e48, {what, " NB4/NK8"});
    @(negedge clk);
    checks++;
    if (busy8 || busy4 || busy48) begin failures++; $display("FAIL busy after done"); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t k, k4, k48, p, p8, p4, p48;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // start with key_ready low: ignored
    @(negedge clk);
    start8 = 1;
    @(negedge clk);
    start8 = 0;
    @(negedge clk);
    checks++;
    if (busy8 || done8) begin failures++; $display("FAIL start taken without key_ready"); end
    key_ready = 1;

    // Known answers.
    k   = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
    k4  = 256'h000102030405060708090a0b0c0d0e0f;
    k48 = k;
    set_keys(k, k4, k48);
    p   = 256'h00112233445566778899aabbccddeeff;
    run(256'h623d2bd4ca3796dc3d02ecf2f37fb637fd3da58509cebb67ab9265b04db51e7d,
        256'h69c4e0d86a7b0430d8cdb78070b4c55a, 256'h8ea2b7ca516745bfeafc49904b496089,
        k, p, p, "KAT");
    set_keys('0, '0, '0);
    run(256'hc6227e7740b7e53b5cb77865278eab0726f62366d9aabad908936123a1fc8af3,
        encrypt('0, '0, 4, 4), encrypt('0, '0, 4, 8), '0, '0, '0, "KAT zero");
    // Random keys and blocks against the reference model.
    for (int t = 0; t < 6; t++) begin
      k = rand_vec(); k4 = vec_t'(k[127:0]); k48 = rand_vec();
      set_keys(k, k4, k48);
      p8 = rand_vec(); p4 = vec_t'(p8[127:0]); p48 = vec_t'(p8[255:128]);
      run(p8, p4, p48, decrypt(p8, k, 8, 8), decrypt(p4, k4, 4, 4), decrypt(p48, k48, 4, 8), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
