// aes_pkg: constants, types and GF(2^8) arithmetic shared by the Rijndael
// (AES) blocks.
//
// The state is NB 32-bit columns packed into one vector of NB*32 bits.
// Byte n of a block (n = 0 is the first byte, in the most significant
// position of the vector) sits in column n/4, row n%4, as in the Rijndael
// specification. The default configuration is a 256-bit block (NB = 8)
// with a 256-bit key (NK = 8), which gives NR = 14 rounds.
//
// GF(2^8) uses the irreducible polynomial x^8 + x^4 + x^3 + x + 1.
// The ShiftRows offsets for rows 1..3 are 1,2,3 for blocks of 4 or 6
// columns and 1,3,4 for 8-column (256-bit) blocks.
package aes_pkg;

  typedef logic [7:0]  byte_t;
  typedef logic [31:0] word_t;

  localparam int unsigned NB_DEFAULT = 8;  // 256-bit data block
  localparam int unsigned NK_DEFAULT = 8;  // 256-bit cipher key

  // Number of rounds of Rijndael for a given block and key size.
  function automatic int unsigned num_rounds(input int unsigned nb, input int unsigned nk);
    return ((nb > nk) ? nb : nk) + 6;
  endfunction

  // Left rotation (in columns) applied to row r by ShiftRows.
  function automatic int unsigned row_shift(input int unsigned nb, input int unsigned r);
    if (r == 0) return 0;
    if (nb < 8) return r;
    return (r == 1) ? 1 : r + 1;  // 1, 3, 4 for 256-bit blocks
  endfunction

  // Multiply by x (i.e. {02}) modulo x^8 + x^4 + x^3 + x + 1.
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General multiply in GF(2^8) by shift-and-add.
  function automatic byte_t gmul(input byte_t a, input byte_t b);
    byte_t acc, p;
    acc = '0;
    p   = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc ^= p;
      p = xtime(p);
    end
    return acc;
  endfunction

  // One column times the MixColumns matrix [2 3 1 1; 1 2 3 1; 1 1 2 3; 3 1 1 2].
  // Row 0 of the column is the most significant byte of the word.
  function automatic word_t mix_column(input word_t c);
    byte_t a0, a1, a2, a3, t;
    {a0, a1, a2, a3} = c;
    t = a0 ^ a1 ^ a2 ^ a3;  // {02}a + {03}b + c + d = a ^ t ^ xtime(a ^ b)
    return {a0 ^ t ^ xtime(a0 ^ a1),
            a1 ^ t ^ xtime(a1 ^ a2),
            a2 ^ t ^ xtime(a2 ^ a3),
            a3 ^ t ^ xtime(a3 ^ a0)};
  endfunction

  // One column times the inverse matrix [e b d 9; 9 e b d; d 9 e b; b d 9 e].
  // Computed as a pre-multiplication by [5 0 4 0] followed by mix_column.
  function automatic word_t inv_mix_column(input word_t c);
    byte_t a0, a1, a2, a3, u, v;
    {a0, a1, a2, a3} = c;
    u = xtime(xtime(a0 ^ a2));
    v = xtime(xtime(a1 ^ a3));
    return mix_column({a0 ^ u, a1 ^ v, a2 ^ u, a3 ^ v});
  endfunction

  // Rotate a word left by one byte (RotWord of the key schedule).
  function automatic word_t rot_word(input word_t w);
    return {w[23:0], w[31:24]};
  endfunction

endpackage
