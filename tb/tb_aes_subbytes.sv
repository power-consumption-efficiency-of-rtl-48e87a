// Testbench for aes_subbytes: nine steps with done_o in the ninth; the State
// must end as ShiftRow(SubByte(State)) or InvShiftRow(InvSubByte(State)). The
// S-box pair is modelled here from reference tables.
module tb_aes_subbytes;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, dec = 0, we, done, sinv;
  logic [127:0] st = '0, st_next;
  logic [15:0] sdata, snew;
  logic [7:0] s_tab [256], si_tab [256];
  int checks = 0, failures = 0;

  aes_subbytes dut (.clk, .rst_n, .en_i(en), .decrypt_i(dec), .state_i(st), .state_o(st_next),
                    .state_we_o(we), .done_o(done), .sbox_data_o(sdata), .sbox_inv_o(sinv), .sbox_new_i(snew));

  assign snew = sinv ? {si_tab[sdata[15:8]], si_tab[sdata[7:0]]} : {s_tab[sdata[15:8]], s_tab[sdata[7:0]]};

  always #5 clk = ~clk;
  always @(posedge clk) if (we) st <= st_next;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] ref_op(input logic [127:0] s, input logic d);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        logic [7:0] b;
        b = d ? s[127 - 8*(4*((c + 4 - r) % 4) + r) -: 8] : s[127 - 8*(4*((c + r) % 4) + r) -: 8];
        o[127 - 8*(4*c + r) -: 8] = d ? si_tab[b] : s_tab[b];
      end
    return o;
  endfunction

  initial begin
    for (int x = 0; x < 256; x++) begin
      s_tab[x] = sbox(8'(x));
      si_tab[s_tab[x]] = 8'(x);
    end
    repeat (2) @(negedge clk); rst_n = 1;
    // FIPS-197 Appendix B, round 1: SubBytes then ShiftRows.
    st = 128'h193de3bea0f4e22b9ac68d2ae9f84808; dec = 0; en = 1;
    while (!done) @(negedge clk);
    @(negedge clk); en = 0;
    checks++;
    if (st !== 128'hd4bf5d30e0b452aeb84111f11e2798e5) begin failures++; $display("FIPS round 1: %h", st); end
    for (int t = 0; t < 50; t++) begin
      logic [127:0] exp;
      int n;
      n = 0;
      st = {$urandom, $urandom, $urandom, $urandom};
      dec = t[0];
      exp = ref_op(st, dec);
      en = 1;
      while (!done) begin @(negedge clk); n++; end
      @(negedge clk); en = 0;
      checks++;
      if (st !== exp) begin failures++; $display("dec=%0d state %h expected %h", dec, st, exp); end
      checks++;
      if (n != 8) begin failures++; $display("done in cycle %0d, expected 9", n + 1); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
