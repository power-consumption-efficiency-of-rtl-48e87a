// Testbench for aes_sbox: all 256 inputs in both directions against an S-box
// computed here by brute force (inverse found by search in GF(2^8), then the
// affine transformation), plus a few FIPS-197 table entries.
module tb_aes_sbox;
  logic inv = 0;
  logic [7:0] din = '0, dout;
  int checks = 0, failures = 0;
  logic [7:0] ref_s [256];
  logic [7:0] ref_si [256];

  aes_sbox dut (.inv_i(inv), .data_i(din), .data_o(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p;
    p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  initial begin
    for (int x = 0; x < 256; x++) begin
      logic [7:0] v, s;
      v = 0;
      for (int y = 1; y < 256; y++) if (mul(8'(x), 8'(y)) == 8'h01) v = 8'(y);
      s = 8'h63;
      for (int i = 0; i < 8; i++)
        s[i] = s[i] ^ v[i] ^ v[(i+4)%8] ^ v[(i+5)%8] ^ v[(i+6)%8] ^ v[(i+7)%8];
      ref_s[x] = s;
      ref_si[s] = 8'(x);
    end
    // Spot checks of the reference itself against FIPS-197 Figure 7.
    checks += 3;
    if (ref_s[8'h00] != 8'h63 || ref_s[8'h53] != 8'hed || ref_s[8'hff] != 8'h16) begin
      failures++; $display("reference S-box wrong");
    end
    for (int x = 0; x < 256; x++) begin
      inv = 0; din = 8'(x); #1;
      checks++;
      if (dout !== ref_s[x]) begin failures++; $display("S(%h)=%h expected %h", x, dout, ref_s[x]); end
      inv = 1; #1;
      checks++;
      if (dout !== ref_si[x]) begin failures++; $display("Si(%h)=%h expected %h", x, dout, ref_si[x]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
