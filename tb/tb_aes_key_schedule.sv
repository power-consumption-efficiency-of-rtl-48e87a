// Testbench for aes_key_schedule: the FIPS-197 Appendix A.1 key, then random
// keys; every round key in the bank is compared with the reference expansion
// and the 30-cycle expansion time is checked. The S-box pair is modelled here.
module tb_aes_key_schedule;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done, ssel;
  logic [127:0] key = '0, rk;
  logic [15:0] sdata, snew;
  logic [3:0] rsel = '0;
  logic [7:0] s_tab [256];
  int checks = 0, failures = 0;

  aes_key_schedule dut (.clk, .rst_n, .start_i(start), .key_i(key), .busy_o(busy), .done_o(done),
                        .sbox_sel_o(ssel), .sbox_data_o(sdata), .sbox_new_i(snew), .rk_sel_i(rsel), .rk_o(rk));

  assign snew = {s_tab[sdata[15:8]], s_tab[sdata[7:0]]};

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [127:0] k);
    rk_t exp;
    int n;
    n = 0;
    exp = expand(k);
    key = k; start = 1;
    @(negedge clk); start = 0;
    while (!done) begin
      checks++;
      if (!ssel) begin failures++; $display("S-box pair not claimed while busy"); end
      @(negedge clk); n++;
    end
    @(negedge clk);
    checks++;
    if (n != 29) begin failures++; $display("done in cycle %0d, expected 30", n + 1); end
    checks++;
    if (busy) begin failures++; $display("still busy after done"); end
    for (int r = 0; r <= 10; r++) begin
      rsel = 4'(r); #1;
      checks++;
      if (rk !== exp[r]) begin failures++; $display("round key %0d = %h expected %h", r, rk, exp[r]); end
    end
  endtask

  initial begin
    for (int x = 0; x < 256; x++) s_tab[x] = sbox(8'(x));
    repeat (2) @(negedge clk); rst_n = 1;
    run(128'h2b7e151628aed2a6abf7158809cf4f3c);
    checks++;
    rsel = 4'd10; #1;
    if (rk !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin failures++; $display("FIPS k10 = %h", rk); end
    @(negedge clk);
    for (int t = 0; t < 20; t++) begin
      run({$urandom, $urandom, $urandom, $urandom});
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
