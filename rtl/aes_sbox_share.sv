// Shared S-box pair: a multiplexer in front of two identical S-boxes.
//
// SubByte(+ShiftRow) and KeySchedule each present two bytes (16 bits) to be
// substituted; ks_sel_i picks KeySchedule, otherwise SubByte. Byte [15:8] goes
// to the first S-box and [7:0] to the second, and the two results come back as
// one 16-bit word to both requesters. The key schedule always uses the forward
// S-box; SubByte may ask for the inverse one. The sharing and the two parallel
// S-boxes are the paper's; the select encoding is this design's.
//
// Interface: purely combinational.
module aes_sbox_share (
  input  logic        ks_sel_i,
  input  logic [15:0] sb_data_i,
  input  logic        sb_inv_i,
  input  logic [15:0] ks_data_i,
  output logic [15:0] new_data_o
);

  logic [15:0] data;
  logic        inv;

  assign data = ks_sel_i ? ks_data_i : sb_data_i;
  assign inv  = ks_sel_i ? 1'b0 : sb_inv_i;

  aes_sbox u_sbox1 (.inv_i(inv), .data_i(data[15:8]), .data_o(new_data_o[15:8]));
  aes_sbox u_sbox2 (.inv_i(inv), .data_i(data[7:0]),  .data_o(new_data_o[7:0]));

endmodule
