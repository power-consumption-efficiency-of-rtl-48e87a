// Testbench for aes_sbox_share: each select routes its own two bytes through
// the two S-boxes, the key schedule side always gets the forward S-box, and
// the SubByte side gets the inverse when it asks for it.
module tb_aes_sbox_share;
  import aes_ref_pkg::*;
  logic sel = 0, inv = 0;
  logic [15:0] sb = 0, ks = 0, dout;
  int checks = 0, failures = 0;

  aes_sbox_share dut (.ks_sel_i(sel), .sb_data_i(sb), .sb_inv_i(inv), .ks_data_i(ks), .new_data_o(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      logic [15:0] exp, src;
      sb = 16'($urandom); ks = 16'($urandom);
      sel = t[0]; inv = t[1];
      src = sel ? ks : sb;
      exp = (!sel && inv) ? {isbox(src[15:8]), isbox(src[7:0])} : {sbox(src[15:8]), sbox(src[7:0])};
      #1;
      checks++;
      if (dout !== exp) begin failures++; $display("sel=%0d inv=%0d sb=%h ks=%h -> %h expected %h", sel, inv, sb, ks, dout, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
