// aes_inv_shift_rows: InvShiftRows for an NB-column Rijndael state.
//
// The inverse of aes_shift_rows: row r is rotated right by the same offset
// ShiftRows uses (1, 3, 4 for the 256-bit block; 1, 2, 3 otherwise). Output
// byte at (row r, column c) is input byte at (row r, column
// (c - shift) mod NB). Only wiring.
//
// Interface: state_in (NB*32 bits) -> state_out (NB*32 bits).
module aes_inv_shift_rows #(
  parameter int unsigned NB = aes_pkg::NB_DEFAULT
) (
  input  logic [NB*32-1:0] state_in,
  output logic [NB*32-1:0] state_out
);

  localparam int unsigned W = NB * 32;

  for (genvar c = 0; c < NB; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      localparam int unsigned SRC_COL = (c + NB - aes_pkg::row_shift(NB, r)) % NB;
      assign state_out[W-1-8*(4*c+r) -: 8] = state_in[W-1-8*(4*SRC_COL+r) -: 8];
    end
  end

endmodule
