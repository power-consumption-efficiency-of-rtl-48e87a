// Testbench for aes_word_mixcolumn: the FIPS-197 Appendix B column example,
// random columns against the reference, and InvMixColumn undoing MixColumn.
module tb_aes_word_mixcolumn;
  import aes_ref_pkg::*;
  logic dec = 0;
  logic [31:0] din = 0, dout;
  int checks = 0, failures = 0;

  aes_word_mixcolumn dut (.decrypt_i(dec), .data_i(din), .data_o(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_mc(input logic [31:0] c, input logic d);
    logic [7:0] a [4];
    logic [31:0] o;
    a = '{c[31:24], c[23:16], c[15:8], c[7:0]};
    for (int r = 0; r < 4; r++)
      o[31-8*r -: 8] = d ? mul(a[r], 8'h0e) ^ mul(a[(r+1)%4], 8'h0b) ^ mul(a[(r+2)%4], 8'h0d) ^ mul(a[(r+3)%4], 8'h09)
                         : mul(a[r], 8'h02) ^ mul(a[(r+1)%4], 8'h03) ^ a[(r+2)%4] ^ a[(r+3)%4];
    return o;
  endfunction

  initial begin
    dec = 0; din = 32'hd4bf5d30; #1;
    checks++;
    if (dout !== 32'h046681e5) begin failures++; $display("FIPS column: %h", dout); end
    for (int t = 0; t < 1000; t++) begin
      logic [31:0] m;
      din = $urandom; dec = 0; #1;
      m = dout;
      checks++;
      if (m !== ref_mc(din, 0)) begin failures++; $display("mc(%h)=%h", din, m); end
      dec = 1; #1;
      checks++;
      if (dout !== ref_mc(din, 1)) begin failures++; $display("imc(%h)=%h", din, dout); end
      din = m; #1;
      checks++;
      if (dout !== ref_mc(m, 1)) begin failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
