// Testbench for salsa20_quarterround: the specification's quarterround test
// vectors plus random words against the reference model, the 4-cycle
// latency from start_i to ready_o, and the gating of the sub-blocks: in any
// clock cycle at most one of the four output registers may change.
module tb_salsa20_quarterround;
  import salsa20_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, ready;
  logic [127:0] din = '0, dout;
  int checks = 0, failures = 0;

  salsa20_quarterround dut (.clk, .rst_n, .start_i(start), .data_i(din), .data_o(dout), .ready_o(ready));

  always #5 clk = ~clk;

  // Count output words that change at each edge.
  logic [127:0] prev_out = '0;
  int gate_checks = 0, gate_failures = 0;
  always @(posedge clk) begin
    int changed;
    changed = 0;
    #1;
    for (int w = 0; w < 4; w++) if (dout[32*w +: 32] !== prev_out[32*w +: 32]) changed++;
    gate_checks++;
    if (changed > 1) begin gate_failures++; $display("%0d output words changed in one cycle", changed); end
    prev_out = dout;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [127:0] v, input logic [127:0] exp);
    int n;
    n = 0;
    @(negedge clk); din = v; start = 1;
    @(negedge clk); start = 0;
    while (!ready) begin @(negedge clk); n++; end
    checks++;
    if (dout !== exp) begin failures++; $display("QR(%h) = %h, expected %h", v, dout, exp); end
    checks++;
    if (n != 3) begin failures++; $display("ready after %0d cycles, expected 4", n + 1); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    run({32'h00000001, 32'h0, 32'h0, 32'h0}, {32'h08008145, 32'h00000080, 32'h00010200, 32'h20500000});
    run({32'h0, 32'h00000001, 32'h0, 32'h0}, {32'h88000100, 32'h00000001, 32'h00000200, 32'h00402000});
    run({32'he7e8c006, 32'hc4f9417d, 32'h6479b4b2, 32'h68c67137},
        {32'he876d72b, 32'h9361dfd5, 32'hf1460244, 32'h948541a3});
    for (int i = 0; i < 200; i++) begin
      logic [127:0] v;
      v = {$urandom, $urandom, $urandom, $urandom};
      run(v, qr(v));
    end
    checks += gate_checks;
    failures += gate_failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
