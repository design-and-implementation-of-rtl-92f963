// aes_key_expansion: Rijndael key expansion, one 32-bit word per clock.
//
// The NK-word cipher key is mapped to the expanded key of NW = NB*(NR+1)
// words w[0..NW-1]. w[0..NK-1] is the key itself; every further word is
//   w[i] = w[i-NK] xor f(w[i-1]),
// where f is SubWord(RotWord(.)) xor Rcon when i mod NK = 0, SubWord(.)
// alone when NK > 6 and i mod NK = 4 (the extra step of 256-bit keys), and
// the identity otherwise. Only the last NK words are needed to make the
// next one, so they are kept in a shift window; each new word is also
// written into the expanded-key register file, which the round-key
// selectors read. Rcon starts at {01} and is advanced by xtime once per NK
// words, so no Rcon table is stored. One SubWord (four S-boxes) is shared
// by all steps; this word-serial schedule is this design's choice for a
// small key schedule.
//
// Interface and timing: a one-cycle pulse on load (ignored while busy)
// captures key. The remaining NW-NK words follow on the next NW-NK clocks
// (112 for the 256-bit block and key); ready then rises and stays high
// until the next load. round_keys holds w[0] in its most significant 32
// bits, w[NW-1] in its least significant ones; the words are reset to 0.
module aes_key_expansion #(
  parameter int unsigned NB = aes_pkg::NB_DEFAULT,
  parameter int unsigned NK = aes_pkg::NK_DEFAULT,
  parameter int unsigned NR = aes_pkg::num_rounds(NB, NK),
  parameter int unsigned NW = NB * (NR + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [NK*32-1:0] key,
  output logic             busy,
  output logic             ready,
  output logic [NW*32-1:0] round_keys
);

  import aes_pkg::*;

  localparam int unsigned IW = $clog2(NW + 1);
  localparam int unsigned JW = $clog2(NK);

  word_t             w_q   [NW];
  word_t             win_q [NK];  // win_q[NK-1] is the newest word
  logic [IW-1:0]     idx_q;       // index of the word being generated
  logic [JW-1:0]     phase_q;     // idx_q mod NK
  byte_t             rcon_q;

  word_t sub_in, sub_out, temp, next_word;

  // SubWord: four S-box look-ups shared by both kinds of step.
  assign sub_in = (phase_q == '0) ? rot_word(win_q[NK-1]) : win_q[NK-1];
  for (genvar b = 0; b < 4; b++) begin : g_subword
    aes_sbox u_sbox (.in_byte(sub_in[8*b +: 8]), .out_byte(sub_out[8*b +: 8]));
  end

  always_comb begin
    if (phase_q == '0)
      temp = sub_out ^ {rcon_q, 24'h0};
    else if (NK > 6 && phase_q == JW'(4))
      temp = sub_out;
    else
      temp = win_q[NK-1];
    next_word = win_q[0] ^ temp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NW; i++) w_q[i] <= '0;
      for (int i = 0; i < NK; i++) win_q[i] <= '0;
      idx_q   <= '0;
      phase_q <= '0;
      rcon_q  <= 8'h01;
      busy    <= 1'b0;
      ready   <= 1'b0;
    end else if (load && !busy) begin
      for (int i = 0; i < NK; i++) begin
        w_q[i]   <= key[NK*32-1-32*i -: 32];
        win_q[i] <= key[NK*32-1-32*i -: 32];
      end
      idx_q   <= IW'(NK);
      phase_q <= '0;
      rcon_q  <= 8'h01;
      busy    <= 1'b1;
      ready   <= 1'b0;
    end else if (busy) begin
      w_q[idx_q] <= next_word;
      for (int i = 0; i < NK - 1; i++) win_q[i] <= win_q[i+1];
      win_q[NK-1] <= next_word;
      idx_q   <= idx_q + 1'b1;
      phase_q <= (phase_q == JW'(NK - 1)) ? '0 : phase_q + 1'b1;
      if (phase_q == '0) rcon_q <= xtime(rcon_q);
      if (idx_q == IW'(NW - 1)) begin
        busy  <= 1'b0;
        ready <= 1'b1;
      end
    end
  end

  for (genvar i = 0; i < NW; i++) begin : g_out
    assign round_keys[NW*32-1-32*i -: 32] = w_q[i];
  end

  // A load is only taken when idle, so the index never runs past the table.
  a_idx_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> idx_q < IW'(NW));

endmodule
