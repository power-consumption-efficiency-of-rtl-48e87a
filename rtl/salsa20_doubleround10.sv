// Salsa20 DOUBLEROUND10: ROUNDS/2 double-rounds over a 4x4 matrix of words.
//
// A control state machine (S0..S4) owns the 512-bit matrix register and two
// QUARTERROUND units. Each double-round is split into four half-rounds, and in
// each half-round both units run at once on two independent quadruples:
//   S1  column round, 1st half:  QR(x0,x4,x8,x12)   QR(x5,x9,x13,x1)
//   S2  column round, 2nd half:  QR(x10,x14,x2,x6)  QR(x15,x3,x7,x11)
//   S3  row round,    1st half:  QR(x0,x1,x2,x3)    QR(x5,x6,x7,x4)
//   S4  row round,    2nd half:  QR(x10,x11,x8,x9)  QR(x15,x12,x13,x14)
// When the units report ready the results are written back and the next
// half-round is launched. ROUND counts single rounds in steps of two; after the
// row round of ROUND == ROUNDS-2 the machine returns to S0 and pulses ready_o.
// The states, the quadruples and the ROUND test follow the paper; the registered
// launch pulse and the step of two are this design's reading of it.
//
// Interface: data_i = {x0,...,x15} (numeric words, x0 most significant) is
// loaded when start_i is seen in S0; start_i must not be raised while a block
// is in progress (an assertion checks this). data_o is the matrix register; it holds
// the result from the ready_o pulse until the next start.
// Timing: every half-round takes 5 clock edges (launch, 4 QUARTERROUND steps),
// so ready_o is high 1 + 4*5*ROUNDS/2 edges after the start edge is sampled
// (201 edges for ROUNDS = 20).
module salsa20_doubleround10
  import salsa20_pkg::*;
#(
  parameter int unsigned ROUNDS = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start_i,
  input  block_t       data_i,
  output block_t       data_o,
  output logic         ready_o
);

  typedef enum logic [2:0] {S0, S1, S2, S3, S4} dr_state_e;

  dr_state_e   state_q;
  word_t       x_q [16];
  logic [7:0]  round_q;
  logic        qr_start_q;
  logic        qr1_ready, qr2_ready;
  logic [127:0] qr1_in, qr2_in, qr1_out, qr2_out;

  // Matrix indices of the two quadruples (a,b,c,d) used in each half-round.
  typedef int unsigned quad_t [4];
  function automatic quad_t quad1(input dr_state_e s);
    unique case (s)
      S1:      return '{0, 4, 8, 12};
      S2:      return '{10, 14, 2, 6};
      S3:      return '{0, 1, 2, 3};
      default: return '{10, 11, 8, 9};
    endcase
  endfunction
  function automatic quad_t quad2(input dr_state_e s);
    unique case (s)
      S1:      return '{5, 9, 13, 1};
      S2:      return '{15, 3, 7, 11};
      S3:      return '{5, 6, 7, 4};
      default: return '{15, 12, 13, 14};
    endcase
  endfunction

  quad_t q1, q2;
  assign q1 = quad1(state_q);
  assign q2 = quad2(state_q);

  assign qr1_in = {x_q[q1[0]], x_q[q1[1]], x_q[q1[2]], x_q[q1[3]]};
  assign qr2_in = {x_q[q2[0]], x_q[q2[1]], x_q[q2[2]], x_q[q2[3]]};

  salsa20_quarterround u_quarterround1 (
    .clk, .rst_n, .start_i(qr_start_q), .data_i(qr1_in), .data_o(qr1_out), .ready_o(qr1_ready)
  );
  salsa20_quarterround u_quarterround2 (
    .clk, .rst_n, .start_i(qr_start_q), .data_i(qr2_in), .data_o(qr2_out), .ready_o(qr2_ready)
  );

  logic qr_ready;
  assign qr_ready = qr1_ready & qr2_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S0;
      round_q    <= '0;
      qr_start_q <= 1'b0;
      ready_o    <= 1'b0;
      for (int i = 0; i < 16; i++) x_q[i] <= '0;
    end else begin
      qr_start_q <= 1'b0;
      ready_o    <= 1'b0;
      if (state_q == S0) begin
        if (start_i) begin
          for (int i = 0; i < 16; i++) x_q[i] <= data_i[(15-i)*32 +: 32];
          round_q    <= '0;
          state_q    <= S1;
          qr_start_q <= 1'b1;
        end
      end else if (qr_ready) begin
        for (int k = 0; k < 4; k++) begin
          x_q[q1[k]] <= qr1_out[(3-k)*32 +: 32];
          x_q[q2[k]] <= qr2_out[(3-k)*32 +: 32];
        end
        unique case (state_q)
          S1: begin state_q <= S2; qr_start_q <= 1'b1; end
          S2: begin state_q <= S3; qr_start_q <= 1'b1; end
          S3: begin state_q <= S4; qr_start_q <= 1'b1; end
          default: begin
            if (round_q == 8'(ROUNDS - 2)) begin
              state_q <= S0;
              ready_o <= 1'b1;
            end else begin
              round_q    <= round_q + 8'd2;
              state_q    <= S1;
              qr_start_q <= 1'b1;
            end
          end
        endcase
      end
    end
  end

  always_comb
    for (int i = 0; i < 16; i++) data_o[(15-i)*32 +: 32] = x_q[i];

  // Both units are always launched together, so they must finish together.
  assert property (@(posedge clk) disable iff (!rst_n) qr1_ready == qr2_ready)
    else $error("QUARTERROUND units out of step");

  // A start is only taken in S0; one given mid-operation would be lost.
  assert property (@(posedge clk) disable iff (!rst_n) start_i |-> state_q == S0)
    else $error("start_i while a block is in progress");

  initial assert (ROUNDS >= 2 && ROUNDS % 2 == 0 && ROUNDS < 256)
    else $error("ROUNDS must be even and between 2 and 254");

endmodule
