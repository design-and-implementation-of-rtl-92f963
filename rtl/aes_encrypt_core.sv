// aes_encrypt_core: rolled, inner-pipelined Rijndael encryption of one block.
//
// On start the block is XORed with round key 0 into the round state
// register. Then the round counter runs 1..NR: each round sends the state
// through aes_enc_round (SubBytes, ShiftRows, MixColumns with a register
// between each) and the AddRoundKey output with round key r is written
// back into the state register. Round NR skips MixColumns.
// One round-pipeline serves every round under a round counter, which
// keeps the area to one round of logic.
//
// The rolled round reused under a round counter follows the original
// architecture. NR is the Rijndael round count max(NB,NK)+6, i.e. 14 for
// the 256-bit key. The start/done handshake is this design's own.
//
// Interface: start (pulse) with block_in is taken when the core is idle and
// key_ready is high; otherwise it is ignored. round_keys is the expanded
// key from aes_key_expansion and must not change while busy.
// Timing: a round takes 4 clocks (3 pipeline registers + the state
// register), so done pulses for one cycle 4*NR clocks after the edge that
// took start (56 for the 256-bit block and key); block_out is valid from
// then until the next start. One block is processed at a time.
module aes_encrypt_core #(
  parameter int unsigned NB = aes_pkg::NB_DEFAULT,
  parameter int unsigned NK = aes_pkg::NK_DEFAULT,
  parameter int unsigned NR = aes_pkg::num_rounds(NB, NK),
  parameter int unsigned NW = NB * (NR + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NB*32-1:0] block_in,
  input  logic             key_ready,
  input  logic [NW*32-1:0] round_keys,
  output logic             busy,
  output logic             done,
  output logic [NB*32-1:0] block_out
);

  localparam int unsigned RW = $clog2(NR + 1);

  logic [NB*32-1:0] state_q, round_key, first_ark, rnd_out;
  logic [RW-1:0]    round_q, rk_idx;
  logic             issue_q, rnd_valid, last_round;

  assign rk_idx     = busy ? RW'(round_q) : RW'(0);
  assign last_round = (round_q == RW'(NR));

  aes_round_key_select #(.NB(NB), .NK(NK), .NR(NR), .NW(NW), .RW(RW)) u_rksel (
    .round_keys(round_keys), .round(rk_idx), .round_key(round_key)
  );

  aes_add_round_key #(.NB(NB)) u_first_ark (
    .state_in(block_in), .round_key(round_key), .state_out(first_ark)
  );

  aes_enc_round #(.NB(NB)) u_round (
    .clk, .rst_n,
    .in_valid (issue_q),
    .in_last  (last_round),
    .state_in (state_q),
    .round_key(round_key),
    .out_valid(rnd_valid),
    .state_out(rnd_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      round_q <= '0;
      issue_q <= 1'b0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done    <= 1'b0;
      issue_q <= 1'b0;
      if (!busy) begin
        if (start && key_ready) begin
          state_q <= first_ark;
          round_q <= RW'(1);
          busy    <= 1'b1;
          issue_q <= 1'b1;
        end
      end else if (rnd_valid) begin
        state_q <= rnd_out;
        if (last_round) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          round_q <= round_q + 1'b1;
          issue_q <= 1'b1;
        end
      end
    end
  end

  assign block_out = state_q;

  a_result_only_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    rnd_valid |-> busy);
  a_done_one_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    done |=> !done);

endmodule
