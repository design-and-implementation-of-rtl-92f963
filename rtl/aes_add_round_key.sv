// aes_add_round_key: AddRoundKey, the bytewise XOR of the state with the
// round key (s'[r][c] = s[r][c] xor k[r][c]).
//
// XOR is its own inverse, so the same block serves encryption and
// decryption; only the order in which round keys arrive differs. Purely
// combinational.
//
// Interface: state_in, round_key (NB*32 bits each) -> state_out.
module aes_add_round_key #(
  parameter int unsigned NB = aes_pkg::NB_DEFAULT
) (
  input  logic [NB*32-1:0] state_in,
  input  logic [NB*32-1:0] round_key,
  output logic [NB*32-1:0] state_out
);

  assign state_out = state_in ^ round_key;

endmodule
