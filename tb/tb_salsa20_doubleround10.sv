// Testbench for salsa20_doubleround10: random matrices against the reference
// double-rounds (reference hash minus the feed-forward), at the default
// 20 rounds, plus the 201-edge latency.
module tb_salsa20_doubleround10;
  import salsa20_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, ready;
  logic [511:0] din = '0, dout;
  int checks = 0, failures = 0;

  salsa20_doubleround10 dut (.clk, .rst_n, .start_i(start), .data_i(din), .data_o(dout), .ready_o(ready));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Words -> byte string, so the reference hash can be used; the double-round
  // output is then hash - input, word by word.
  function automatic logic [511:0] to_bytes(input logic [511:0] w);
    logic [511:0] b;
    for (int i = 0; i < 16; i++)
      for (int k = 0; k < 4; k++) b[511-32*i-8*k -: 8] = w[511-32*i-24+8*k -: 8];
    return b;
  endfunction

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      logic [511:0] h, exp;
      int n;
      n = 0;
      din = (t == 0) ? '0 : rand512();
      h = to_bytes(hash(to_bytes(din), 20));
      for (int i = 0; i < 16; i++) exp[32*i +: 32] = h[32*i +: 32] - din[32*i +: 32];
      start = 1; @(negedge clk); start = 0;
      while (!ready) begin @(negedge clk); n++; end
      checks++;
      if (dout !== exp) begin failures++; $display("mismatch on vector %0d", t); end
      checks++;
      if (n != 200) begin failures++; $display("ready after %0d edges, expected 201", n + 1); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
