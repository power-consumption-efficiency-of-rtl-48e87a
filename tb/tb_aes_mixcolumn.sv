// Testbench for aes_mixcolumn: the controller updates one column per cycle
// for four cycles with done_o in the fourth, in both directions. The State
// register is modelled here.
module tb_aes_mixcolumn;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, dec = 0, we, done;
  logic [127:0] st = '0, st_next;
  int checks = 0, failures = 0;

  aes_mixcolumn dut (.clk, .rst_n, .en_i(en), .decrypt_i(dec), .state_i(st), .state_o(st_next),
                     .state_we_o(we), .done_o(done));

  always #5 clk = ~clk;
  always @(posedge clk) if (we) st <= st_next;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] ref_state(input logic [127:0] s, input logic d);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        logic [7:0] a [4];
        for (int k = 0; k < 4; k++) a[k] = s[127-32*c-8*k -: 8];
        o[127-32*c-8*r -: 8] = d ? mul(a[r], 8'h0e) ^ mul(a[(r+1)%4], 8'h0b) ^ mul(a[(r+2)%4], 8'h0d) ^ mul(a[(r+3)%4], 8'h09)
                                 : mul(a[r], 8'h02) ^ mul(a[(r+1)%4], 8'h03) ^ a[(r+2)%4] ^ a[(r+3)%4];
      end
    return o;
  endfunction

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      logic [127:0] exp;
      int n;
      n = 0;
      st = {$urandom, $urandom, $urandom, $urandom};
      dec = t[0];
      exp = ref_state(st, dec);
      en = 1;
      while (!done) begin @(negedge clk); n++; end
      @(negedge clk); en = 0;
      checks++;
      if (st !== exp) begin failures++; $display("dec=%0d state %h expected %h", dec, st, exp); end
      checks++;
      if (n != 3) begin failures++; $display("done in cycle %0d, expected 4", n + 1); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
