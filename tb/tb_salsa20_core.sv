// Testbench for salsa20_core: the all-zero block (hash must be zero) and
// random 64-byte blocks against the reference Salsa20 hash, with the
// 201-edge latency.
module tb_salsa20_core;
  import salsa20_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, ready;
  logic [511:0] din = '0, dout;
  int checks = 0, failures = 0;

  salsa20_core dut (.clk, .rst_n, .start_i(start), .data_i(din), .data_o(dout), .ready_o(ready));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      logic [511:0] exp;
      int n;
      n = 0;
      din = (t == 0) ? '0 : rand512();
      exp = (t == 0) ? '0 : hash(din, 20);
      start = 1; @(negedge clk); start = 0;
      while (!ready) begin @(negedge clk); n++; end
      checks++;
      if (dout !== exp) begin failures++; $display("mismatch on vector %0d: %h", t, dout); end
      checks++;
      if (n != 200) begin failures++; $display("ready after %0d edges, expected 201", n + 1); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
