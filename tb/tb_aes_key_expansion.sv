// tb_aes_key_expansion: checks the word-serial key schedule.
// Three instances are run: the 256-bit block with a 256-bit key (default),
// AES-128 (NB = NK = 4) and AES-256 with a 128-bit block (NB = 4, NK = 8).
// Every expanded word is compared with the reference model, the known last
// word of the FIPS-197 AES-128 example (b6630ca6) is checked, and the time
// from load to ready must be NW-NK clocks. A load while busy must be ignored.
module tb_aes_key_expansion;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         load8 = 0, load4 = 0, load48 = 0;
  logic [255:0] key8, key48;
  logic [127:0] key4;
  logic         busy8, rdy8, busy4, rdy4, busy48, rdy48;
  logic [120*32-1:0] rk8;
  logic [44*32-1:0]  rk4;
  logic [60*32-1:0]  rk48;

  aes_key_expansion dut8 (.clk, .rst_n, .load(load8), .key(key8), .busy(busy8),
                          .ready(rdy8), .round_keys(rk8));
  aes_key_expansion #(.NB(4), .NK(4)) dut4 (.clk, .rst_n, .load(load4), .key(key4),
                          .busy(busy4), .ready(rdy4), .round_keys(rk4));
  aes_key_expansion #(.NB(4), .NK(8)) dut48 (.clk, .rst_n, .load(load48), .key(key48),
                          .busy(busy48), .ready(rdy48), .round_keys(rk48));

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (rdy8 || busy8) begin failures++; $display("FAIL ready/busy after reset"); end

    for (int t = 0; t < 4; t++) begin
      vec_t k;
      k = (t == 0) ? 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f
                   : rand_vec();
      key8 = k; key48 = k;
      key4 = (t == 0) ? 128'h2b7e151628aed2a6abf7158809cf4f3c : k[127:0];
      load8 = 1; load4 = 1; load48 = 1;
      @(negedge clk);
      load4 = 0; load48 = 0;
      // Keep load high with a different key for a few cycles: it must be ignored.
      key8 = ~k;
      repeat (3) @(negedge clk);
      load8 = 0;
      key8 = k;
      cyc = 3;  // clock edges since the one that took the load
      while (!rdy8) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 112) begin failures++; $display("FAIL load-to-ready %0d clocks, expected 112", cyc); end
      for (int i = 0; i < 120; i++)
        check(rk8[120*32-1-32*i -: 32], key_word(k, 8, 8, i), $sformatf("NB8 w[%0d]", i));
      for (int i = 0; i < 44; i++)
        check(rk4[44*32-1-32*i -: 32], key_word(vec_t'(key4), 4, 4, i), $sformatf("NB4 w[%0d]", i));
      for (int i = 0; i < 60; i++)
        check(rk48[60*32-1-32*i -: 32], key_word(k, 4, 8, i), $sformatf("NB4NK8 w[%0d]", i));
      if (t == 0) check(rk4[31:0], 32'hb6630ca6, "FIPS-197 w[43]");
      checks++;
      if (busy8 || !rdy4 || !rdy48) begin failures++; $display("FAIL flags"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
