// Byte_Col: one output byte of MixColumn or InvMixColumn.
//
// For a column rotated so that a0 is this row's byte:
//   MixColumn:    out = 02*a0 ^ 03*a1 ^ 01*a2 ^ 01*a3
//   InvMixColumn: out = 0e*a0 ^ 0b*a1 ^ 0d*a2 ^ 09*a3
// The inverse is the forward result plus 08*(a0^a1^a2^a3) ^ 04*(a0^a2), so both
// share the 02 multipliers and the inverse adds only two constant multipliers
// on XORed bytes. The coefficients are those of c(x) and c^-1(x) in the paper;
// the way the multipliers are shared is this design's.
//
// Interface: purely combinational; decrypt_i = 1 selects InvMixColumn.
module aes_byte_col
  import aes_pkg::*;
(
  input  logic       decrypt_i,
  input  logic [7:0] a0_i,
  input  logic [7:0] a1_i,
  input  logic [7:0] a2_i,
  input  logic [7:0] a3_i,
  output logic [7:0] data_o
);

  logic [7:0] fwd, all4, even2, x4_even, x8_all;

  assign fwd     = xtime(a0_i) ^ xtime(a1_i) ^ a1_i ^ a2_i ^ a3_i;
  assign all4    = a0_i ^ a1_i ^ a2_i ^ a3_i;
  assign even2   = a0_i ^ a2_i;
  assign x4_even = xtime(xtime(even2));
  assign x8_all  = xtime(xtime(xtime(all4)));
  assign data_o  = decrypt_i ? (fwd ^ x4_even ^ x8_all) : fwd;

endmodule
