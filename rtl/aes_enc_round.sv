// aes_enc_round: one encryption round as an inner pipeline.
//
// SubBytes -> reg -> ShiftRows -> reg -> MixColumns -> reg -> AddRoundKey.
// A full-width (NB*32-bit) pipelining register separates each pair of
// transformations, so the longest combinational path is a single
// transformation (in practice the S-box look-up) rather than a whole round.
// A valid bit and a "last round" flag travel with the data; in the last
// round MixColumns is bypassed. AddRoundKey sits after the third register
// and is combinational, so the caller registers state_out (in the cores,
// the round state register that closes the round loop).
//
// The order of the transformations and the three registers follow the
// original architecture; the valid and last-round flags are this design's
// own additions.
//
// Timing: state_in/in_valid/in_last sampled on a clock edge appear at
// state_out/out_valid three edges later. round_key must be valid while
// out_valid is high. Several blocks may be in flight, one per stage.
module aes_enc_round #(
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

  logic [NB*32-1:0] sub_c, shift_c, mix_c;
  logic [NB*32-1:0] sub_q, shift_q, mix_q;
  logic             v1_q, v2_q, v3_q;
  logic             last1_q, last2_q;

  aes_sub_bytes      #(.NB(NB)) u_sub   (.state_in(state_in), .state_out(sub_c));
  aes_shift_rows     #(.NB(NB)) u_shift (.state_in(sub_q),    .state_out(shift_c));
  aes_mix_columns    #(.NB(NB)) u_mix   (.state_in(shift_q),  .state_out(mix_c));
  aes_add_round_key  #(.NB(NB)) u_ark   (.state_in(mix_q), .round_key(round_key),
                                         .state_out(state_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sub_q   <= '0;
      shift_q <= '0;
      mix_q   <= '0;
      v1_q    <= 1'b0;
      v2_q    <= 1'b0;
      v3_q    <= 1'b0;
      last1_q <= 1'b0;
      last2_q <= 1'b0;
    end else begin
      sub_q   <= sub_c;
      shift_q <= shift_c;
      mix_q   <= last2_q ? shift_q : mix_c;  // no MixColumns in the last round
      v1_q    <= in_valid;
      v2_q    <= v1_q;
      v3_q    <= v2_q;
      last1_q <= in_last;
      last2_q <= last1_q;
    end
  end

  assign out_valid = v3_q;

endmodule
