// Shared types, constants and helper functions of the Salsa20 encryption core.
//
// Byte strings follow the Salsa20 specification and are packed with byte 0 in
// the most significant position, so {T0, KEY, ...} reads left to right like the
// specification. Inside the core the sixteen 32-bit words x0..x15 are packed
// with x0 in the most significant position as well.
//
// The four expansion constants T0..T3 are the byte strings "expa", "nd 1",
// "6-by" and "te k", i.e. the constants the specification uses with a 16-byte
// key. Their byte values are printed in the paper's text.
package salsa20_pkg;

  typedef logic [31:0]  word_t;
  typedef logic [511:0] block_t;

  localparam logic [31:0] T0 = {8'd101, 8'd120, 8'd112, 8'd97};
  localparam logic [31:0] T1 = {8'd110, 8'd100, 8'd32,  8'd49};
  localparam logic [31:0] T2 = {8'd54,  8'd45,  8'd98,  8'd121};
  localparam logic [31:0] T3 = {8'd116, 8'd101, 8'd32,  8'd107};

  // Rotate a 32-bit word left by a constant distance.
  function automatic word_t rotl(input word_t w, input int unsigned n);
    return (w << n) | (w >> (32 - n));
  endfunction

  // LITTLE_ENDIAN: reverse the byte order inside every 32-bit word of a
  // 512-bit vector. Applied to a byte string it yields the numeric words
  // x0..x15; applied to the words it yields the byte string again.
  function automatic block_t little_endian(input block_t b);
    block_t r;
    for (int w = 0; w < 16; w++)
      for (int k = 0; k < 4; k++)
        r[w*32 + k*8 +: 8] = b[w*32 + (3-k)*8 +: 8];
    return r;
  endfunction

endpackage
