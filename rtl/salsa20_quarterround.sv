// Salsa20 QUARTERROUND, one output word per clock cycle.
//
// Computes (OUT0,OUT1,OUT2,OUT3) = QR(IN0,IN1,IN2,IN3) of the Salsa20
// specification as four sub-blocks, each an adder, a constant left rotation
// and an XOR feeding a 32-bit register:
//   OUT1 = IN1 ^ ((IN0  + IN3 ) <<< 7)
//   OUT2 = IN2 ^ ((OUT1 + IN0 ) <<< 9)
//   OUT3 = IN3 ^ ((OUT2 + OUT1) <<< 13)
//   OUT0 = IN0 ^ ((OUT3 + OUT2) <<< 18)
// A four-state machine (S0..S3) enables one sub-block register per cycle, so
// only one of them switches at a time; the enables are where a gated-clock
// netlist would put its clock gates. The structure, rotation distances and the
// state machine follow the paper; the enable form of the gating is this
// design's choice.
//
// Interface: data_i = {IN0,IN1,IN2,IN3} must stay stable from the start_i
// cycle until ready_o. data_o = {OUT0,OUT1,OUT2,OUT3} holds the result until
// the next start.
// Timing: start_i is accepted in S0; OUT1 loads at that clock edge, OUT2,
// OUT3 and OUT0 at the next three, and ready_o is high for the one cycle after
// OUT0 has loaded (four clock edges after the start edge).
module salsa20_quarterround
  import salsa20_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start_i,
  input  logic [127:0] data_i,
  output logic [127:0] data_o,
  output logic         ready_o
);

  typedef enum logic [1:0] {S0, S1, S2, S3} qr_state_e;
  qr_state_e state_q;

  word_t in0, in1, in2, in3;
  word_t out0_q, out1_q, out2_q, out3_q;
  assign {in0, in1, in2, in3} = data_i;

  // Evaluation enables, one per sub-block.
  logic eval_out1, eval_out2, eval_out3, eval_out0;
  assign eval_out1 = (state_q == S0) && start_i;
  assign eval_out2 = (state_q == S1);
  assign eval_out3 = (state_q == S2);
  assign eval_out0 = (state_q == S3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S0;
      ready_o <= 1'b0;
    end else begin
      ready_o <= eval_out0;
      unique case (state_q)
        S0: if (start_i) state_q <= S1;
        S1: state_q <= S2;
        S2: state_q <= S3;
        S3: state_q <= S0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out0_q <= '0;
      out1_q <= '0;
      out2_q <= '0;
      out3_q <= '0;
    end else begin
      if (eval_out1) out1_q <= in1 ^ rotl(in0 + in3, 7);
      if (eval_out2) out2_q <= in2 ^ rotl(out1_q + in0, 9);
      if (eval_out3) out3_q <= in3 ^ rotl(out2_q + out1_q, 13);
      if (eval_out0) out0_q <= in0 ^ rotl(out3_q + out2_q, 18);
    end
  end

  assign data_o = {out0_q, out1_q, out2_q, out3_q};

endmodule
