// Full-size testbench for rfid_crypto_top with every parameter at its default
// (64-bit Salsa20 block counter): one AES-128 encryption and one decryption of
// the FIPS-197 Appendix C.1 vector, and Salsa20 blocks 0 and 1 of a stream
// (INIT_I, then START_I) against the reference keystream, with the latencies
// of 168 and 202 cycles.
module tb_rfid_crypto_top_full;
  import salsa20_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic aes_start = 0, aes_dec = 0, aes_ready, aes_busy;
  logic [127:0] aes_key = '0, aes_din = '0, aes_dout;
  logic s_init = 0, s_start = 0, s_ready, s_ovff;
  logic [63:0] s_nonce = '0, s_cnt;
  logic [127:0] s_key = '0, s_din = '0, s_dout;
  int checks = 0, failures = 0;

  rfid_crypto_top dut (
    .clk, .rst_n,
    .aes_start_i(aes_start), .aes_decrypt_i(aes_dec), .aes_key_i(aes_key), .aes_data_i(aes_din),
    .aes_data_o(aes_dout), .aes_ready_o(aes_ready), .aes_busy_o(aes_busy),
    .salsa_init_i(s_init), .salsa_start_i(s_start), .salsa_nonce_i(s_nonce), .salsa_key_i(s_key),
    .salsa_data_i(s_din), .salsa_data_o(s_dout), .salsa_ready_o(s_ready), .salsa_ovff_o(s_ovff),
    .salsa_counter_o(s_cnt));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic aes_op(input logic d, input logic [127:0] x, input logic [127:0] exp);
    int n;
    n = 0;
    aes_din = x; aes_dec = d; aes_start = 1;
    @(negedge clk); aes_start = 0;
    while (!aes_ready) begin @(negedge clk); n++; end
    checks += 2;
    if (aes_dout !== exp) begin failures++; $display("AES %s: %h", d ? "dec" : "enc", aes_dout); end
    if (n + 1 != 168) begin failures++; $display("AES latency %0d", n + 1); end
    @(negedge clk);
  endtask

  task automatic salsa_block(input bit use_init, input logic [63:0] idx);
    logic [511:0] ks;
    int n;
    n = 0;
    ks = keystream(s_key, s_nonce, idx, 20);
    if (use_init) s_init = 1; else s_start = 1;
    @(negedge clk); s_init = 0; s_start = 0;
    while (!s_ready) begin @(negedge clk); n++; end
    checks += 3;
    if (s_dout !== (s_din ^ ks[511 -: 128])) begin failures++; $display("Salsa20 block %0d wrong", idx); end
    if (n + 1 != 202) begin failures++; $display("Salsa20 latency %0d", n + 1); end
    if (s_ovff) begin failures++; $display("unexpected overflow"); end
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    aes_key = 128'h000102030405060708090a0b0c0d0e0f;
    aes_op(0, 128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    aes_op(1, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h00112233445566778899aabbccddeeff);
    s_key = 128'h0102030405060708090a0b0c0d0e0f10;
    s_nonce = 64'h6566676869_6a6b6c;
    s_din = 128'h00112233445566778899aabbccddeeff;
    salsa_block(1, 0);
    salsa_block(0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
