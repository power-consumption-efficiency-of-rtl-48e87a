// Two low-power ciphers for passive RFID tags, side by side.
//
// The AES-128 core (a 128-bit block cipher that encrypts or decrypts one block
// in 168 cycles) and the Salsa20 core (a stream cipher that makes one 512-bit
// keystream block in 202 cycles and XORs its first 128 bits with the data)
// are the two designs whose power the paper compares. Each keeps its own
// ports; they share only the clock and reset. The paper's test chips also held
// an undescribed test control block and a pad ring, which are not part of this
// RTL.
//
// SALSA_COUNTER_W is the width of the Salsa20 block counter (64 in the paper);
// a smaller value only makes the counter wrap sooner.
// Interface and timing: see aes_core and salsa20_encryption.
module rfid_crypto_top #(
  parameter int unsigned SALSA_COUNTER_W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  // AES-128
  input  logic         aes_start_i,
  input  logic         aes_decrypt_i,
  input  logic [127:0] aes_key_i,
  input  logic [127:0] aes_data_i,
  output logic [127:0] aes_data_o,
  output logic         aes_ready_o,
  output logic         aes_busy_o,
  // Salsa20
  input  logic         salsa_init_i,
  input  logic         salsa_start_i,
  input  logic [63:0]  salsa_nonce_i,
  input  logic [127:0] salsa_key_i,
  input  logic [127:0] salsa_data_i,
  output logic [127:0] salsa_data_o,
  output logic         salsa_ready_o,
  output logic         salsa_ovff_o,
  output logic [63:0]  salsa_counter_o
);

  aes_core u_aes (
    .clk, .rst_n, .start_i(aes_start_i), .decrypt_i(aes_decrypt_i), .key_i(aes_key_i),
    .data_i(aes_data_i), .data_o(aes_data_o), .ready_o(aes_ready_o), .busy_o(aes_busy_o)
  );

  salsa20_encryption #(.COUNTER_W(SALSA_COUNTER_W)) u_salsa20 (
    .clk, .rst_n, .init_i(salsa_init_i), .start_i(salsa_start_i), .nonce_i(salsa_nonce_i),
    .key_i(salsa_key_i), .data_i(salsa_data_i), .data_o(salsa_data_o),
    .ready_o(salsa_ready_o), .ovff_o(salsa_ovff_o), .counter_o(salsa_counter_o)
  );

endmodule
