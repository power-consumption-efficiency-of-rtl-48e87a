// End-to-end testbench for rfid_crypto_top. Both ciphers run at the same time:
// the AES core encrypts and decrypts random blocks while the Salsa20 side
// encrypts a stream of blocks (INIT_I, then START_I per block) until its block
// counter, reduced here to 3 bits, wraps and raises OVFF_O. Results are
// compared with the reference models. Each mechanism is counted: AES
// encryption, AES decryption, Salsa20 INIT_I, START_I, counter overflow, and
// both cores busy in the same cycle; one that never happens is a failure.
module tb_rfid_crypto_top;
  import aes_ref_pkg::*;
  import salsa20_ref_pkg::*;

  localparam int CW = 3;
  logic clk = 0, rst_n = 0;
  logic aes_start = 0, aes_dec = 0, aes_ready, aes_busy;
  logic [127:0] aes_key = '0, aes_din = '0, aes_dout;
  logic s_init = 0, s_start = 0, s_ready, s_ovff;
  logic [63:0] s_nonce = '0, s_cnt;
  logic [127:0] s_key = '0, s_din = '0, s_dout;
  int checks = 0, failures = 0;
  int n_enc = 0, n_dec = 0, n_init = 0, n_start = 0, n_ovff = 0, n_both = 0;
  bit salsa_busy = 0, aes_done = 0, salsa_done = 0;

  rfid_crypto_top #(.SALSA_COUNTER_W(CW)) dut (
    .clk, .rst_n,
    .aes_start_i(aes_start), .aes_decrypt_i(aes_dec), .aes_key_i(aes_key), .aes_data_i(aes_din),
    .aes_data_o(aes_dout), .aes_ready_o(aes_ready), .aes_busy_o(aes_busy),
    .salsa_init_i(s_init), .salsa_start_i(s_start), .salsa_nonce_i(s_nonce), .salsa_key_i(s_key),
    .salsa_data_i(s_din), .salsa_data_o(s_dout), .salsa_ready_o(s_ready), .salsa_ovff_o(s_ovff),
    .salsa_counter_o(s_cnt));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (s_ovff) n_ovff++;
    if (aes_busy && salsa_busy) n_both++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // AES side: alternate encryption and decryption of random blocks.
  initial begin
    @(posedge rst_n);
    for (int t = 0; t < 12; t++) begin
      logic [127:0] exp;
      @(negedge clk);
      aes_key = {$urandom, $urandom, $urandom, $urandom};
      aes_din = {$urandom, $urandom, $urandom, $urandom};
      aes_dec = t[0];
      exp = aes_dec ? decrypt(aes_key, aes_din) : encrypt(aes_key, aes_din);
      aes_start = 1;
      @(negedge clk); aes_start = 0;
      while (!aes_ready) @(negedge clk);
      checks++;
      if (aes_dout !== exp) begin failures++; $display("AES op %0d wrong", t); end
      if (aes_dec) n_dec++; else n_enc++;
    end
    aes_done = 1;
  end

  // Salsa20 side: INIT_I, then START_I for 2^CW + 2 more blocks.
  initial begin
    logic [63:0] idx;
    @(posedge rst_n);
    s_key = {$urandom, $urandom, $urandom, $urandom};
    s_nonce = {$urandom, $urandom};
    idx = 0;
    for (int b = 0; b < (1 << CW) + 3; b++) begin
      logic [511:0] ks;
      @(negedge clk);
      s_din = {$urandom, $urandom, $urandom, $urandom};
      if (b == 0) begin s_init = 1; n_init++; idx = 0; end
      else begin s_start = 1; n_start++; idx = (idx + 1) % (1 << CW); end
      ks = keystream(s_key, s_nonce, idx, 20);
      salsa_busy = 1;
      @(negedge clk); s_init = 0; s_start = 0;
      while (!s_ready) @(negedge clk);
      salsa_busy = 0;
      checks++;
      if (s_dout !== (s_din ^ ks[511 -: 128])) begin failures++; $display("Salsa20 block %0d wrong", b); end
    end
    salsa_done = 1;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    wait (aes_done && salsa_done);
    $display("AES enc=%0d dec=%0d  Salsa20 init=%0d start=%0d overflow=%0d  both busy=%0d cycles",
             n_enc, n_dec, n_init, n_start, n_ovff, n_both);
    checks += 6;
    if (n_enc == 0)  begin failures++; $display("no AES encryption"); end
    if (n_dec == 0)  begin failures++; $display("no AES decryption"); end
    if (n_init == 0) begin failures++; $display("no Salsa20 INIT_I"); end
    if (n_start == 0) begin failures++; $display("no Salsa20 START_I"); end
    if (n_ovff != 1) begin failures++; $display("Salsa20 overflow seen %0d times, expected 1", n_ovff); end
    if (n_both == 0) begin failures++; $display("the cores never ran together"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
