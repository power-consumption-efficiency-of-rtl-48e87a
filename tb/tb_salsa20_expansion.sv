// Testbench for salsa20_expansion: the 16-byte-key expansion example of the
// Salsa20 specification (key bytes 1..16, input bytes 101..116) and random
// keys and inputs against the reference model.
module tb_salsa20_expansion;
  import salsa20_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, ready;
  logic [127:0] key = '0, din = '0;
  logic [511:0] dout;
  int checks = 0, failures = 0;

  salsa20_expansion dut (.clk, .rst_n, .start_i(start), .key_i(key), .data_i(din), .data_o(dout), .ready_o(ready));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [511:0] exp);
    start = 1; @(negedge clk); start = 0;
    while (!ready) @(negedge clk);
    checks++;
    if (dout !== exp) begin failures++; $display("key %h in %h: got %h expected %h", key, din, dout, exp); end
    @(negedge clk);
  endtask

  initial begin
    logic [511:0] spec;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      key[127-8*i -: 8] = 8'(i + 1);
      din[127-8*i -: 8] = 8'(i + 101);
    end
    spec = {8'd39,  8'd173, 8'd46,  8'd248, 8'd30,  8'd200, 8'd82,  8'd17,
            8'd48,  8'd67,  8'd254, 8'd239, 8'd37,  8'd18,  8'd13,  8'd247,
            8'd241, 8'd200, 8'd61,  8'd144, 8'd10,  8'd55,  8'd50,  8'd185,
            8'd6,   8'd47,  8'd246, 8'd253, 8'd143, 8'd86,  8'd187, 8'd225,
            8'd134, 8'd85,  8'd110, 8'd246, 8'd161, 8'd163, 8'd43,  8'd235,
            8'd231, 8'd94,  8'd171, 8'd51,  8'd145, 8'd214, 8'd112, 8'd29,
            8'd14,  8'd232, 8'd5,   8'd16,  8'd151, 8'd140, 8'd183, 8'd141,
            8'd171, 8'd9,   8'd122, 8'd181, 8'd104, 8'd182, 8'd177, 8'd193};
    run(spec);
    for (int t = 0; t < 8; t++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      din = {$urandom, $urandom, $urandom, $urandom};
      run(hash({"expa", key, "nd 1", din, "6-by", key, "te k"}, 20));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
