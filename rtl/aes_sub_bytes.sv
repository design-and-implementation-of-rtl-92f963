// aes_sub_bytes: SubBytes over a whole NB-column state.
//
// Every one of the NB*4 state bytes goes through its own copy of the S-box
// table (aes_sbox), all in parallel, so the whole 256-bit state is
// substituted in one combinational pass. Purely combinational; the
// surrounding round pipeline registers the result.
//
// Interface: state_in (NB*32 bits) -> state_out (NB*32 bits).
module aes_sub_bytes #(
  parameter int unsigned NB = aes_pkg::NB_DEFAULT
) (
  input  logic [NB*32-1:0] state_in,
  output logic [NB*32-1:0] state_out
);

  for (genvar n = 0; n < NB * 4; n++) begin : g_byte
    aes_sbox u_sbox (
      .in_byte (state_in [8*n +: 8]),
      .out_byte(state_out[8*n +: 8])
    );
  end

endmodule
