// aes_shift_rows: ShiftRows for an NB-column Rijndael state.
//
// Row r of the state is rotated left by row_shift(NB, r) columns: row 0 is
// left alone, rows 1, 2, 3 move by 1, 3, 4 columns for the 256-bit block
// (NB = 8) and by 1, 2, 3 for 128- and 192-bit blocks. Output byte at
// (row r, column c) is input byte at (row r, column (c + shift) mod NB).
// This is only wiring; no logic and no clock.
//
// Interface: state_in (NB*32 bits) -> state_out (NB*32 bits); byte 0 of the
// block is the most significant byte.
module aes_shift_rows #(
  parameter int unsigned NB = aes_pkg::NB_DEFAULT
) (
  input  logic [NB*32-1:0] state_in,
  output logic [NB*32-1:0] state_out
);

  localparam int unsigned W = NB * 32;

  for (genvar c = 0; c < NB; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      localparam int unsigned SRC_COL = (c + aes_pkg::row_shift(NB, r)) % NB;
      assign state_out[W-1-8*(4*c+r) -: 8] = state_in[W-1-8*(4*SRC_COL+r) -: 8];
    end
  end

endmodule
