// KeySchedule: expands the AES-128 key into the ten round keys up front and
// keeps them in a bank of ten 128-bit registers.
//
// Round key i (1..10) is derived from round key i-1 in three cycles:
//   step 0  RotWord bytes 0,1 of the last word go through the shared S-box pair
//   step 1  RotWord bytes 2,3 go through the S-box pair
//   step 2  XOR: w0' = w0 ^ SubWord(RotWord(w3)) ^ Rcon, w1' = w1 ^ w0',
//           w2' = w2 ^ w1', w3' = w3 ^ w2'; the new key is written to the bank
// so the whole expansion takes 30 cycles. Storing every round key before the
// data is processed lets decryption read them in reverse order without
// recomputing them; round key 0 is the cipher key itself, read from key_i.
// The up-front expansion, the register bank and the use of two S-boxes per
// cycle follow the paper; the three-step split is this design's reading of the
// paper's step list (S-boxes, repeat, XOR).
//
// Interface: start_i (while idle) begins an expansion of key_i, which must be
// held until the core has finished using round key 0. done_o is high in the
// last XOR cycle. sbox_sel_o claims the S-box pair while busy. rk_sel_i
// (0..10) selects the round key on rk_o.
module aes_key_schedule
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_i,
  input  block_t      key_i,
  output logic        busy_o,
  output logic        done_o,
  output logic        sbox_sel_o,
  output logic [15:0] sbox_data_o,
  input  logic [15:0] sbox_new_i,
  input  logic [3:0]  rk_sel_i,
  output block_t      rk_o
);

  block_t     bank_q [NR];
  logic [3:0] idx_q;
  logic [1:0] step_q;
  logic [7:0] rcon_q;
  logic [31:0] sub_q;
  block_t     prev, next;
  logic [31:0] w3, temp;

  assign prev = (idx_q == 4'd1) ? key_i : bank_q[idx_q - 4'd2];
  assign w3   = prev[31:0];

  // RotWord(w3) = bytes 1,2,3,0 of w3.
  assign sbox_data_o = (step_q == 2'd0) ? w3[23:8] : {w3[7:0], w3[31:24]};
  assign sbox_sel_o  = busy_o;

  assign temp = sub_q ^ {rcon_q, 24'h0};
  always_comb begin
    next[127:96] = prev[127:96] ^ temp;
    next[95:64]  = prev[95:64]  ^ next[127:96];
    next[63:32]  = prev[63:32]  ^ next[95:64];
    next[31:0]   = prev[31:0]   ^ next[63:32];
  end

  assign done_o = busy_o && (step_q == 2'd2) && (idx_q == 4'(NR));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_o <= 1'b0;
      idx_q  <= 4'd1;
      step_q <= '0;
      rcon_q <= 8'h01;
      sub_q  <= '0;
    end else if (!busy_o) begin
      if (start_i) begin
        busy_o <= 1'b1;
        idx_q  <= 4'd1;
        step_q <= '0;
        rcon_q <= 8'h01;
      end
    end else begin
      unique case (step_q)
        2'd0: begin sub_q[31:16] <= sbox_new_i; step_q <= 2'd1; end
        2'd1: begin sub_q[15:0]  <= sbox_new_i; step_q <= 2'd2; end
        default: begin
          step_q <= 2'd0;
          rcon_q <= xtime(rcon_q);
          idx_q  <= idx_q + 4'd1;
          if (done_o) busy_o <= 1'b0;
        end
      endcase
    end
  end

  // Round key bank.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NR; i++) bank_q[i] <= '0;
    end else if (busy_o && step_q == 2'd2) begin
      bank_q[idx_q - 4'd1] <= next;
    end
  end

  assign rk_o = (rk_sel_i == 4'd0) ? key_i : bank_q[rk_sel_i - 4'd1];

endmodule
