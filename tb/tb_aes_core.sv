// Testbench for aes_core: FIPS-197 example vectors (Appendix B and C.1) in both
// directions, then random keys and blocks against the reference model,
// encryption followed by decryption, with the 168-cycle latency checked for
// every operation.
module tb_aes_core;
  import aes_ref_pkg::*;

  localparam int LATENCY = 168;
  logic clk = 0, rst_n = 0, start = 0, dec = 0, ready, busy;
  logic [127:0] key = '0, din = '0, dout;
  int checks = 0, failures = 0;

  aes_core dut (.clk, .rst_n, .start_i(start), .decrypt_i(dec), .key_i(key), .data_i(din),
                .data_o(dout), .ready_o(ready), .busy_o(busy));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic op(input logic d, input logic [127:0] k, input logic [127:0] x, input logic [127:0] exp);
    int n;
    n = 0;
    key = k; din = x; dec = d; start = 1;
    @(negedge clk); start = 0; din = ~x;
    while (!ready) begin @(negedge clk); n++; end
    checks++;
    if (dout !== exp) begin failures++; $display("%s key %h in %h: got %h expected %h", d ? "dec" : "enc", k, x, dout, exp); end
    checks++;
    if (n + 1 != LATENCY) begin failures++; $display("ready after %0d cycles, expected %0d", n + 1, LATENCY); end
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    op(0, 128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734, 128'h3925841d02dc09fbdc118597196a0b32);
    op(1, 128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3925841d02dc09fbdc118597196a0b32, 128'h3243f6a8885a308d313198a2e0370734);
    op(0, 128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    op(1, 128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h00112233445566778899aabbccddeeff);
    for (int t = 0; t < 10; t++) begin
      logic [127:0] k, p, c;
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      c = encrypt(k, p);
      op(0, k, p, c);
      op(1, k, c, p);
      checks++;
      if (decrypt(k, c) !== p) begin failures++; $display("reference model inconsistent"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
