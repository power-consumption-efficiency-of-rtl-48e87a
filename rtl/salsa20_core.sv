// Salsa20 core: the Salsa20 hash of one 64-byte block.
//
// The 512-bit input byte string passes through LITTLE_ENDIAN (byte order
// reversed inside each 32-bit word) to give the words x0..x15, DOUBLEROUND10
// runs the double-rounds on them, the result is added word by word (mod 2^32)
// to the input words, Z = X + DR(X), and a second LITTLE_ENDIAN turns Z back
// into a byte string. This is the structure of the paper's core module.
//
// Interface: data_i is a byte string with byte 0 in bits [511:504]; it must be
// held stable from start_i until ready_o, because the final addition reads it
// (no input copy is kept, as in the paper's block diagram). data_o is valid
// from the ready_o pulse until data_i changes or a new start is given.
// Timing: ready_o comes 1 + 10*ROUNDS clock edges after the start edge.
module salsa20_core
  import salsa20_pkg::*;
#(
  parameter int unsigned ROUNDS = 20
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start_i,
  input  block_t data_i,
  output block_t data_o,
  output logic   ready_o
);

  block_t x_in, x_dr, z;

  assign x_in = little_endian(data_i);

  salsa20_doubleround10 #(.ROUNDS(ROUNDS)) u_doubleround10 (
    .clk, .rst_n, .start_i, .data_i(x_in), .data_o(x_dr), .ready_o
  );

  always_comb
    for (int i = 0; i < 16; i++) z[i*32 +: 32] = x_in[i*32 +: 32] + x_dr[i*32 +: 32];

  assign data_o = little_endian(z);

endmodule
