// Salsa20 expansion: keystream block for a 16-byte key.
//
// Builds the 64-byte core input by plain wire concatenation,
//   {T0, KEY_I, T1, DATA_I, T2, KEY_I, T3},
// where T0..T3 are the expansion constants of the Salsa20 specification for a
// 16-byte key and DATA_I is the 16-byte nonce-and-counter string, and runs the
// Salsa20 core on it. Concatenation order and widths are the paper's.
//
// Interface: key_i and data_i are byte strings, byte 0 most significant; they
// must be held from start_i until ready_o. data_o is the 64-byte keystream
// block, byte 0 most significant.
// Timing: that of the core, 1 + 10*ROUNDS edges from start to ready_o.
module salsa20_expansion
  import salsa20_pkg::*;
#(
  parameter int unsigned ROUNDS = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start_i,
  input  logic [127:0] key_i,
  input  logic [127:0] data_i,
  output block_t       data_o,
  output logic         ready_o
);

  block_t core_in;
  assign core_in = {T0, key_i, T1, data_i, T2, key_i, T3};

  salsa20_core #(.ROUNDS(ROUNDS)) u_core (
    .clk, .rst_n, .start_i, .data_i(core_in), .data_o, .ready_o
  );

endmodule
