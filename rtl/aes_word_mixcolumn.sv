// Word_MixColumn: multiplies one 32-bit State column by c(x) = 03x^3 + 01x^2 +
// 01x + 02 (or by c^-1(x) = 0bx^3 + 0dx^2 + 09x + 0e when decrypt_i = 1)
// modulo x^4 + 1, using four Byte_Col blocks, one per output row. Row r's
// block receives the column rotated by r bytes. Structure as in the paper.
//
// Interface: purely combinational; column bits [31:24] are row 0.
module aes_word_mixcolumn
  import aes_pkg::*;
(
  input  logic    decrypt_i,
  input  column_t data_i,
  output column_t data_o
);

  logic [7:0] a [4];
  assign a = '{data_i[31:24], data_i[23:16], data_i[15:8], data_i[7:0]};

  for (genvar r = 0; r < 4; r++) begin : g_byte_col
    aes_byte_col u_byte_col (
      .decrypt_i,
      .a0_i(a[r]), .a1_i(a[(r+1)%4]), .a2_i(a[(r+2)%4]), .a3_i(a[(r+3)%4]),
      .data_o(data_o[31-8*r -: 8])
    );
  end

endmodule
