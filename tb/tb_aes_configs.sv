// tb_aes_configs: runs aes_top in all nine block/key size combinations of
// Rijndael (128, 192 and 256 bits each, NB and NK in {4, 6, 8}). For each it
// loads random keys, encrypts and decrypts random blocks, and compares with
// the reference model; it also checks the key-ready and start-to-done
// times, (NB*(NR+1)-NK) and 4*NR clocks.
module tb_aes_configs;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0, finished = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int SIZES[3] = '{4, 6, 8};

  for (genvar bi = 0; bi < 3; bi++) begin : g_nb
    for (genvar ki = 0; ki < 3; ki++) begin : g_nk
      localparam int NB = SIZES[bi];
      localparam int NK = SIZES[ki];
      localparam int NR = ((NB > NK) ? NB : NK) + 6;
      logic              key_load = 0, start = 0, decrypt = 0;
      logic [NK*32-1:0]  key = '0;
      logic [NB*32-1:0]  block_in = '0, block_out;
      logic              key_ready, busy, done;

      aes_top #(.NB(NB), .NK(NK)) dut (.clk, .rst_n, .key_load, .key, .key_ready, .start,
                                       .decrypt, .block_in, .busy, .done, .block_out);

      task automatic op(input bit dec, input vec_t b, input vec_t exp);
        int n = 0;
        @(negedge clk);
        decrypt = dec; block_in = b[NB*32-1:0]; start = 1;
        @(negedge clk);
        start = 0;
        while (!done && n < 200) begin @(negedge clk); n++; end
        checks++;
        if (n != 4 * NR) begin failures++; $display("FAIL NB=%0d NK=%0d latency", NB, NK); end
        checks++;
        if (vec_t'(block_out) !== exp) begin
          failures++;
          $display("FAIL NB=%0d NK=%0d dec=%0d got %h exp %h", NB, NK, dec, block_out, exp);
        end
      endtask

      initial begin
        vec_t k, p, c;
        int n;
        @(posedge rst_n);
        for (int t = 0; t < 3; t++) begin
          k = rand_vec() & ((256'd1 << (NK * 32)) - 1);
          @(negedge clk);
          key = k[NK*32-1:0]; key_load = 1;
          @(negedge clk);
          key_load = 0;
          n = 0;
          while (!key_ready && n < 200) begin @(negedge clk); n++; end
          checks++;
          if (n != NB * (NR + 1) - NK) begin failures++; $display("FAIL NB=%0d NK=%0d key time %0d", NB, NK, n); end
          for (int i = 0; i < 2; i++) begin
            p = rand_vec() & ((256'd1 << (NB * 32)) - 1);
            c = encrypt(p, k, NB, NK);
            op(0, p, c);
            op(1, c, p);
          end
        end
        finished++;
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (finished == 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
