// Salsa20 encryption in counter mode.
//
// A block counter I_COUNTER numbers the keystream blocks. INIT_I clears it and
// START_I advances it; either one, registered for a cycle, starts the Salsa20
// expansion on {NONCE_I, I_COUNTER} and KEY_I. When READY_O rises, DATA_O is
// DATA_I XORed with the first DATA_W bits (bytes 0..DATA_W/8-1) of the 512-bit
// keystream block. Encryption and decryption are the same operation. OVFF_O
// reports, one cycle later, a START_I given while the counter holds its
// largest value (the counter then wraps to zero).
// The ports, widths, counter, start register and overflow register follow the
// paper's block diagram. This design's own choices are: the counter is clocked
// by the system clock and enabled by START_I (not clocked by START_I); the
// counter is written into the nonce-and-counter string least significant byte
// first, as in the Salsa20 specification, so word x8 holds its low half; and
// the XOR uses the leading DATA_W bits of the keystream.
//
// Usage: assert INIT_I for one cycle to encrypt block 0, then START_I for one
// cycle per following block, each only after READY_O of the previous one (a
// start during a block would advance the counter without being served). Hold KEY_I, NONCE_I and DATA_I until READY_O;
// DATA_O stays valid until any of them changes or a new block is started.
// Timing: READY_O rises 2 + 10*ROUNDS clock edges after INIT_I/START_I is
// sampled (202 for ROUNDS = 20).
module salsa20_encryption
  import salsa20_pkg::*;
#(
  parameter int unsigned COUNTER_W = 64,
  parameter int unsigned DATA_W    = 128,
  parameter int unsigned ROUNDS    = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init_i,
  input  logic              start_i,
  input  logic [63:0]       nonce_i,
  input  logic [127:0]      key_i,
  input  logic [DATA_W-1:0] data_i,
  output logic [DATA_W-1:0] data_o,
  output logic              ready_o,
  output logic              ovff_o,
  output logic [63:0]       counter_o
);

  logic [COUNTER_W-1:0] counter_q;
  logic                 go_q;
  logic [63:0]          counter64;
  logic [63:0]          counter_bytes;
  block_t               keystream;

  // Up-counter with synchronous clear.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       counter_q <= '0;
    else if (init_i)  counter_q <= '0;
    else if (start_i) counter_q <= counter_q + 1'b1;
  end

  // Registered start and overflow flags.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      go_q   <= 1'b0;
      ovff_o <= 1'b0;
    end else begin
      go_q   <= init_i | start_i;
      ovff_o <= (counter_q == '1) & start_i;
    end
  end

  assign counter64 = 64'(counter_q);
  assign counter_o = counter64;

  // Counter bytes least significant first (Salsa20 block index encoding).
  always_comb
    for (int k = 0; k < 8; k++) counter_bytes[(7-k)*8 +: 8] = counter64[k*8 +: 8];

  salsa20_expansion #(.ROUNDS(ROUNDS)) u_expansion (
    .clk, .rst_n, .start_i(go_q), .key_i, .data_i({nonce_i, counter_bytes}),
    .data_o(keystream), .ready_o
  );

  assign data_o = data_i ^ keystream[511 -: DATA_W];

  initial assert (COUNTER_W >= 1 && COUNTER_W <= 64 && DATA_W >= 8 && DATA_W <= 512 && DATA_W % 8 == 0)
    else $error("COUNTER_W must be 1..64 and DATA_W a whole number of bytes up to 512");

endmodule
