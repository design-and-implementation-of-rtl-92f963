// aes_mix_columns: MixColumns over an NB-column state.
//
// Each 32-bit column is treated as a polynomial over GF(2^8) and multiplied
// by c(x) = {03}x^3 + {01}x^2 + {01}x + {02} modulo x^4 + 1, i.e. by the
// matrix [2 3 1 1; 1 2 3 1; 1 1 2 3; 3 1 1 2]. Multiplication by {02} is the
// shift-and-reduce xtime (polynomial x^8 + x^4 + x^3 + x + 1), {03} is
// xtime plus the byte itself; all columns are processed in parallel.
// Purely combinational.
//
// Interface: state_in (NB*32 bits) -> state_out (NB*32 bits).
module aes_mix_columns #(
  parameter int unsigned NB = aes_pkg::NB_DEFAULT
) (
  input  logic [NB*32-1:0] state_in,
  output logic [NB*32-1:0] state_out
);

  for (genvar c = 0; c < NB; c++) begin : g_col
    assign state_out[32*c +: 32] = aes_pkg::mix_column(state_in[32*c +: 32]);
  end

endmodule
