// aes_dec_round: one decryption (inverse) round as an inner pipeline.
//
// InvShiftRows -> reg -> InvSubBytes -> reg -> AddRoundKey -> reg ->
// InvMixColumns. The same three full-width pipelining registers as the
// encryption round split the round into single transformations. In the
// last round (the one that adds round key 0) InvMixColumns is bypassed.
// InvMixColumns is combinational after the third register; the caller
// registers state_out.
//
// The inverse transformations are the standard ones; placing the three
// registers as in the encryption round is this design's own choice.
//
// Timing: state_in/in_valid/in_last sampled on an edge appear at
// state_out/out_valid three edges later. round_key is used by the
// AddRoundKey stage, i.e. it must be valid in the cycle when the block sits
// in the second register (two edges after it entered) and is the key of the
// round being undone. The decryption core holds it constant for a whole
// round.
module aes_dec_round #(
  parameter int unsigned NB = aes_pkg::NB_DEFAULT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_last,
  input  logic [NB*32-1:0] state_in,
  input  logic [NB*32-1:0] round_key,
  output logic             out_valid,
  output logic [NB*32-1:0] state_out
);

  logic [NB*32-1:0] shift_c, sub_c, ark_c, mix_c;
  logic [NB*32-1:0] shift_q, sub_q, ark_q;
  logic             v1_q, v2_q, v3_q;
  logic             last1_q, last2_q, last3_q;

  aes_inv_shift_rows  #(.NB(NB)) u_shift (.state_in(state_in), .state_out(shift_c));
  aes_inv_sub_bytes   #(.NB(NB)) u_sub   (.state_in(shift_q),  .state_out(sub_c));
  aes_add_round_key   #(.NB(NB)) u_ark   (.state_in(sub_q), .round_key(round_key),
                                          .state_out(ark_c));
  aes_inv_mix_columns #(.NB(NB)) u_mix   (.state_in(ark_q),    .state_out(mix_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shift_q <= '0;
      sub_q   <= '0;
      ark_q   <= '0;
      v1_q    <= 1'b0;
      v2_q    <= 1'b0;
      v3_q    <= 1'b0;
      last1_q <= 1'b0;
      last2_q <= 1'b0;
      last3_q <= 1'b0;
    end else begin
      shift_q <= shift_c;
      sub_q   <= sub_c;
      ark_q   <= ark_c;
      v1_q    <= in_valid;
      v2_q    <= v1_q;
      v3_q    <= v2_q;
      last1_q <= in_last;
      last2_q <= last1_q;
      last3_q <= last2_q;
    end
  end

  assign state_out = last3_q ? ark_q : mix_c;  // no InvMixColumns in the last round
  assign out_valid = v3_q;

endmodule
