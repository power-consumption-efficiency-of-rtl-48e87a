// Testbench for aes_byte_col: random columns in both directions against
// GF(2^8) products computed by the reference model.
module tb_aes_byte_col;
  import aes_ref_pkg::*;
  logic dec = 0;
  logic [7:0] a0 = 0, a1 = 0, a2 = 0, a3 = 0, dout;
  int checks = 0, failures = 0;

  aes_byte_col dut (.decrypt_i(dec), .a0_i(a0), .a1_i(a1), .a2_i(a2), .a3_i(a3), .data_o(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [7:0] exp;
      {a0, a1, a2, a3} = $urandom;
      dec = t[0];
      exp = dec ? mul(a0, 8'h0e) ^ mul(a1, 8'h0b) ^ mul(a2, 8'h0d) ^ mul(a3, 8'h09)
                : mul(a0, 8'h02) ^ mul(a1, 8'h03) ^ a2 ^ a3;
      #1;
      checks++;
      if (dout !== exp) begin failures++; $display("dec=%0d %h %h %h %h -> %h expected %h", dec, a0, a1, a2, a3, dout, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
