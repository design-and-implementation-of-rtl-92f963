// aes_inv_sub_bytes: InvSubBytes over a whole NB-column state.
//
// Every state byte goes through its own copy of the inverse S-box table
// (aes_inv_sbox), all in parallel. Purely combinational.
//
// Interface: state_in (NB*32 bits) -> state_out (NB*32 bits).
module aes_inv_sub_bytes #(
  parameter int unsigned NB = aes_pkg::NB_DEFAULT
) (
  input  logic [NB*32-1:0] state_in,
  output logic [NB*32-1:0] state_out
);

  for (genvar n = 0; n < NB * 4; n++) begin : g_byte
    aes_inv_sbox u_inv_sbox (
      .in_byte (state_in [8*n +: 8]),
      .out_byte(state_out[8*n +: 8])
    );
  end

endmodule
