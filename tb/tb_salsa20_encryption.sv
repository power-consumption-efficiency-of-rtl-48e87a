// Testbench for salsa20_encryption: INIT_I then a run of START_I blocks,
// ciphertext against the reference keystream for the expected block index,
// decryption by a second pass, the 202-edge latency, and counter overflow.
// COUNTER_W is reduced to 4 bits so that the wrap-around is reached. A second
// instance with DATA_W = 512 XORs a whole 512-bit block per keystream block.
module tb_salsa20_encryption;
  import salsa20_ref_pkg::*;

  localparam int CW = 4;
  logic clk = 0, rst_n = 0, init = 0, start = 0, ready, ovff;
  logic [63:0] nonce = '0, cnt;
  logic [127:0] key = '0, din = '0, dout;
  int checks = 0, failures = 0, ovff_seen = 0;

  salsa20_encryption #(.COUNTER_W(CW)) dut (
    .clk, .rst_n, .init_i(init), .start_i(start), .nonce_i(nonce), .key_i(key),
    .data_i(din), .data_o(dout), .ready_o(ready), .ovff_o(ovff), .counter_o(cnt));

  // Whole-block instance: 512-bit data, default 64-bit counter.
  logic w_init = 0, w_ready, w_ovff;
  logic [63:0] w_cnt;
  logic [511:0] w_din = '0, w_dout;
  salsa20_encryption #(.DATA_W(512)) dut512 (
    .clk, .rst_n, .init_i(w_init), .start_i(1'b0), .nonce_i(nonce), .key_i(key),
    .data_i(w_din), .data_o(w_dout), .ready_o(w_ready), .ovff_o(w_ovff), .counter_o(w_cnt));

  always #5 clk = ~clk;

  always @(posedge clk) if (ovff) ovff_seen++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One block: pulse INIT_I or START_I, wait for READY_O, compare.
  task automatic block(input bit use_init, input logic [63:0] idx);
    logic [511:0] ks;
    logic [127:0] ct;
    int n;
    n = 0;
    ks = keystream(key, nonce, idx, 20);
    if (use_init) init = 1; else start = 1;
    @(negedge clk); init = 0; start = 0;
    while (!ready) begin @(negedge clk); n++; end
    ct = dout;
    checks++;
    if (ct !== (din ^ ks[511 -: 128])) begin failures++; $display("block %0d: wrong ciphertext", idx); end
    checks++;
    if (n != 201) begin failures++; $display("READY_O after %0d edges, expected 202", n + 1); end
    checks++;
    if (cnt !== idx) begin failures++; $display("counter %0d, expected %0d", cnt, idx); end
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    key = {$urandom, $urandom, $urandom, $urandom};
    nonce = {$urandom, $urandom};
    din = {$urandom, $urandom, $urandom, $urandom};
    block(1, 0);
    for (int b = 1; b < (1 << CW); b++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      block(0, 64'(b));
    end
    checks++;
    if (ovff_seen != 0) begin failures++; $display("early overflow"); end
    // Wrap-around: START_I with the counter at its largest value.
    block(0, 0);
    checks++;
    if (ovff_seen != 1) begin failures++; $display("overflow flagged %0d times, expected 1", ovff_seen); end
    // Decryption is the same operation: feed the ciphertext back in.
    begin
      logic [127:0] pt;
      pt = din;
      block(1, 0);
      din = dout;
      block(1, 0);
      checks++;
      if (dout !== pt) begin failures++; $display("decryption did not restore the plaintext"); end
    end
    // 512-bit block: the whole keystream block is used.
    w_din = salsa20_ref_pkg::rand512();
    w_init = 1;
    @(negedge clk); w_init = 0;
    while (!w_ready) @(negedge clk);
    checks++;
    if (w_dout !== (w_din ^ keystream(key, nonce, 0, 20))) begin failures++; $display("512-bit block wrong"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
