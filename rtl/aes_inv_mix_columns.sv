// aes_inv_mix_columns: InvMixColumns over an NB-column state.
//
// Each column is multiplied by d(x) = {0b}x^3 + {0d}x^2 + {09}x + {0e}, the
// inverse of the MixColumns polynomial modulo x^4 + 1. The product is formed
// as a cheap pre-multiplication by {04}x^2 + {05} followed by the forward
// MixColumns network, which reuses the xtime-based logic instead of four
// general GF(2^8) multipliers per byte. Purely combinational.
//
// Interface: state_in (NB*32 bits) -> state_out (NB*32 bits).
module aes_inv_mix_columns #(
  parameter int unsigned NB = aes_pkg::NB_DEFAULT
) (
  input  logic [NB*32-1:0] state_in,
  output logic [NB*32-1:0] state_out
);

  for (genvar c = 0; c < NB; c++) begin : g_col
    assign state_out[32*c +: 32] = aes_pkg::inv_mix_column(state_in[32*c +: 32]);
  end

endmodule
