// MixColumn controller: (Inv)MixColumn of the whole State in four cycles.
//
// While en_i is high the controller sends column col_q (0..3) of the State to
// Word_MixColumn and writes the result back, one column per cycle, as in the
// paper. done_o marks the cycle of the fourth column; the column counter then
// returns to 0.
//
// Interface: state_i is the State register; when state_we_o is high the owner
// loads state_o, which is state_i with column col_q replaced.
// Timing: en_i must stay high for four cycles; done_o is high in the fourth.
module aes_mixcolumn
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en_i,
  input  logic   decrypt_i,
  input  block_t state_i,
  output block_t state_o,
  output logic   state_we_o,
  output logic   done_o
);

  logic [1:0] col_q;
  column_t    col_in, col_out;

  assign col_in = state_i[127 - 32*col_q -: 32];

  aes_word_mixcolumn u_word_mixcolumn (.decrypt_i, .data_i(col_in), .data_o(col_out));

  always_comb begin
    state_o = state_i;
    state_o[127 - 32*col_q -: 32] = col_out;
  end

  assign state_we_o = en_i;
  assign done_o     = en_i && (col_q == 2'd3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    col_q <= '0;
    else if (en_i) col_q <= col_q + 2'd1;
  end

endmodule
