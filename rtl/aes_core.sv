// AES-128 encryption and decryption core for low-power tags.
//
// One 128-bit State register and a small set of processing blocks reused in
// every round: KeySchedule (with its round key bank), SubByte+ShiftRow,
// MixColumn, and a pair of S-boxes shared by KeySchedule and SubByte through a
// multiplexer. AddRoundKey is the XOR of the State with the selected round key
// and takes one cycle. A state machine follows the paper's flowcharts:
//   encryption: KeySchedule; AddRoundKey(k0);
//               rounds 1..9: SubByte+ShiftRow, MixColumn, AddRoundKey(k_r);
//               round 10:    SubByte+ShiftRow, AddRoundKey(k10)
//   decryption: KeySchedule; AddRoundKey(k10); InvSubByte+InvShiftRow;
//               rounds 9..1: AddRoundKey(k_r), InvMixColumn,
//                            InvSubByte+InvShiftRow;
//               AddRoundKey(k0)
// Block sizes, the reuse of the blocks, the up-front key expansion into a
// register bank and the shared S-box pair are the paper's. The cycle split of
// each step (30 key-schedule cycles, 9 for SubByte+ShiftRow, 4 for MixColumn,
// 1 for AddRoundKey) is this design's, and gives 168 cycles where the paper
// reports 180.
//
// Interface: start_i (while not busy) latches data_i and decrypt_i; key_i must
// be held until ready_o. ready_o pulses for one cycle when data_o (the State
// register) holds the result, which stays there until the next start.
// Timing: ready_o is high 168 clock edges after the edge that samples
// start_i, for either direction.
module aes_core
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start_i,
  input  logic   decrypt_i,
  input  block_t key_i,
  input  block_t data_i,
  output block_t data_o,
  output logic   ready_o,
  output logic   busy_o
);

  typedef enum logic [2:0] {IDLE, KEYEXP, ARK, SUBSHIFT, MIXCOL} aes_state_e;

  aes_state_e  fsm_q;
  block_t      state_q;
  logic        dec_q;
  logic [3:0]  round_q;

  // Key schedule and round keys.
  logic        ks_start, ks_busy, ks_done, ks_sel;
  logic [15:0] ks_sbox_data, sbox_new;
  block_t      round_key;

  // SubByte + ShiftRow.
  logic        sb_en, sb_we, sb_done, sb_inv;
  logic [15:0] sb_sbox_data;
  block_t      sb_state;

  // MixColumn.
  logic        mc_en, mc_we, mc_done;
  block_t      mc_state;

  assign ks_start = (fsm_q == IDLE) && start_i;
  assign sb_en    = (fsm_q == SUBSHIFT);
  assign mc_en    = (fsm_q == MIXCOL);

  aes_key_schedule u_key_schedule (
    .clk, .rst_n, .start_i(ks_start), .key_i, .busy_o(ks_busy), .done_o(ks_done),
    .sbox_sel_o(ks_sel), .sbox_data_o(ks_sbox_data), .sbox_new_i(sbox_new),
    .rk_sel_i(round_q), .rk_o(round_key)
  );

  aes_subbytes u_subbytes (
    .clk, .rst_n, .en_i(sb_en), .decrypt_i(dec_q), .state_i(state_q), .state_o(sb_state),
    .state_we_o(sb_we), .done_o(sb_done), .sbox_data_o(sb_sbox_data), .sbox_inv_o(sb_inv),
    .sbox_new_i(sbox_new)
  );

  aes_sbox_share u_sbox_share (
    .ks_sel_i(ks_sel), .sb_data_i(sb_sbox_data), .sb_inv_i(sb_inv),
    .ks_data_i(ks_sbox_data), .new_data_o(sbox_new)
  );

  aes_mixcolumn u_mixcolumn (
    .clk, .rst_n, .en_i(mc_en), .decrypt_i(dec_q), .state_i(state_q), .state_o(mc_state),
    .state_we_o(mc_we), .done_o(mc_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm_q   <= IDLE;
      state_q <= '0;
      dec_q   <= 1'b0;
      round_q <= '0;
      ready_o <= 1'b0;
    end else begin
      ready_o <= 1'b0;
      unique case (fsm_q)
        IDLE: if (start_i) begin
          state_q <= data_i;
          dec_q   <= decrypt_i;
          round_q <= decrypt_i ? 4'(NR) : 4'd0;
          fsm_q   <= KEYEXP;
        end
        KEYEXP: if (ks_done) fsm_q <= ARK;
        ARK: begin
          state_q <= state_q ^ round_key;
          if (!dec_q) begin
            if (round_q == 4'(NR)) begin
              fsm_q   <= IDLE;
              ready_o <= 1'b1;
            end else begin
              round_q <= round_q + 4'd1;
              fsm_q   <= SUBSHIFT;
            end
          end else begin
            if (round_q == 4'd0) begin
              fsm_q   <= IDLE;
              ready_o <= 1'b1;
            end else if (round_q == 4'(NR)) begin
              fsm_q <= SUBSHIFT;
            end else begin
              fsm_q <= MIXCOL;
            end
          end
        end
        SUBSHIFT: begin
          if (sb_we) state_q <= sb_state;
          if (sb_done) begin
            if (dec_q) begin
              round_q <= round_q - 4'd1;
              fsm_q   <= ARK;
            end else begin
              fsm_q <= (round_q == 4'(NR)) ? ARK : MIXCOL;
            end
          end
        end
        MIXCOL: begin
          if (mc_we) state_q <= mc_state;
          if (mc_done) fsm_q <= dec_q ? SUBSHIFT : ARK;
        end
        default: fsm_q <= IDLE;
      endcase
    end
  end

  assign data_o = state_q;
  assign busy_o = (fsm_q != IDLE);

  // The key schedule and SubByte never claim the shared S-boxes together.
  assert property (@(posedge clk) disable iff (!rst_n) !(ks_busy && sb_en))
    else $error("S-box pair claimed by KeySchedule and SubByte at once");

endmodule
