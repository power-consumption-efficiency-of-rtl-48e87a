// SubByte + ShiftRow controller.
//
// While en_i is high the controller runs nine steps. Steps 0..7 send State
// bytes 2k and 2k+1 to the shared S-box pair and write the two substituted
// bytes back, so the 16 bytes take eight cycles ("use two S-boxes per cycle,
// repeat seven times"). Step 8 applies ShiftRow to the State, or InvShiftRow
// when decrypt_i is high (the S-boxes are then asked for the inverse
// substitution). done_o marks step 8. Because (Inv)ShiftRow and
// (Inv)SubByte commute, the same order serves both directions. The step list
// is the paper's; the byte pairing and the single ShiftRow cycle are this
// design's.
//
// Interface: state_i is the State register, state_o the value to load when
// state_we_o is high. sbox_data_o/sbox_inv_o go to the S-box pair and
// sbox_new_i returns its result in the same cycle.
// Timing: en_i must stay high for nine cycles; done_o is high in the ninth.
module aes_subbytes
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en_i,
  input  logic        decrypt_i,
  input  block_t      state_i,
  output block_t      state_o,
  output logic        state_we_o,
  output logic        done_o,
  output logic [15:0] sbox_data_o,
  output logic        sbox_inv_o,
  input  logic [15:0] sbox_new_i
);

  logic [3:0] step_q;
  logic       shift_step;

  assign shift_step  = (step_q == 4'd8);
  assign sbox_data_o = state_i[127 - 16*step_q[2:0] -: 16];
  assign sbox_inv_o  = decrypt_i;

  always_comb begin
    if (shift_step) begin
      state_o = shift_rows(state_i, decrypt_i);
    end else begin
      state_o = state_i;
      state_o[127 - 16*step_q[2:0] -: 16] = sbox_new_i;
    end
  end

  assign state_we_o = en_i;
  assign done_o     = en_i && shift_step;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          step_q <= '0;
    else if (done_o)     step_q <= '0;
    else if (en_i)       step_q <= step_q + 4'd1;
  end

endmodule
