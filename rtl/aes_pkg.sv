// Shared types, constants and functions of the AES-128 core.
//
// A 128-bit block or key is packed with byte 0 in bits [127:120]. The State is
// the usual column-major 4x4 array: byte 4*c + r sits in row r of column c, so
// column c is bits [127-32*c -: 32] with row 0 in its top byte.
package aes_pkg;

  typedef logic [127:0] block_t;
  typedef logic [31:0]  column_t;

  // Number of rounds and round keys for a 128-bit key.
  localparam int unsigned NR = 10;

  // Multiplication by x (02) in GF(2^8) with the AES polynomial
  // x^8 + x^4 + x^3 + x + 1.
  function automatic logic [7:0] xtime(input logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // Byte c of the State.
  function automatic logic [7:0] get_byte(input block_t s, input int unsigned i);
    return s[127 - 8*i -: 8];
  endfunction

  // ShiftRow: row r rotates left by r columns. InvShiftRow rotates right.
  function automatic block_t shift_rows(input block_t s, input logic inverse);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        int unsigned src;
        src = inverse ? 4*((c + 4 - r) % 4) + r : 4*((c + r) % 4) + r;
        o[127 - 8*(4*c + r) -: 8] = s[127 - 8*src -: 8];
      end
    return o;
  endfunction

endpackage
