// Behavioural Salsa20 reference used by the testbenches. It is written
// straight from the Salsa20 specification (loop over double-rounds, whole
// quarterround in one step) and shares no code with the RTL.
package salsa20_ref_pkg;

  function automatic logic [31:0] r(input logic [31:0] w, input int n);
    return 32'({w, w} >> (32 - n));
  endfunction

  // Quarterround on (y0,y1,y2,y3) as in the specification.
  function automatic logic [127:0] qr(input logic [127:0] y);
    logic [31:0] y0, y1, y2, y3;
    {y0, y1, y2, y3} = y;
    y1 = y1 ^ r(y0 + y3, 7);
    y2 = y2 ^ r(y1 + y0, 9);
    y3 = y3 ^ r(y2 + y1, 13);
    y0 = y0 ^ r(y3 + y2, 18);
    return {y0, y1, y2, y3};
  endfunction

  // Salsa20 hash of a 64-byte string (byte 0 most significant).
  function automatic logic [511:0] hash(input logic [511:0] b, input int rounds);
    logic [31:0] x [16], z [16];
    logic [511:0] o;
    for (int i = 0; i < 16; i++)
      x[i] = {b[511-32*i-24 -: 8], b[511-32*i-16 -: 8], b[511-32*i-8 -: 8], b[511-32*i -: 8]};
    z = x;
    for (int d = 0; d < rounds / 2; d++) begin
      {z[0], z[4], z[8], z[12]}   = qr({z[0], z[4], z[8], z[12]});
      {z[5], z[9], z[13], z[1]}   = qr({z[5], z[9], z[13], z[1]});
      {z[10], z[14], z[2], z[6]}  = qr({z[10], z[14], z[2], z[6]});
      {z[15], z[3], z[7], z[11]}  = qr({z[15], z[3], z[7], z[11]});
      {z[0], z[1], z[2], z[3]}    = qr({z[0], z[1], z[2], z[3]});
      {z[5], z[6], z[7], z[4]}    = qr({z[5], z[6], z[7], z[4]});
      {z[10], z[11], z[8], z[9]}  = qr({z[10], z[11], z[8], z[9]});
      {z[15], z[12], z[13], z[14]} = qr({z[15], z[12], z[13], z[14]});
    end
    for (int i = 0; i < 16; i++) begin
      logic [31:0] s;
      s = z[i] + x[i];
      o[511-32*i -: 32] = {s[7:0], s[15:8], s[23:16], s[31:24]};
    end
    return o;
  endfunction

  // Keystream block for a 16-byte key, 8-byte nonce and 64-bit block index.
  function automatic logic [511:0] keystream(input logic [127:0] k, input logic [63:0] n,
                                             input logic [63:0] idx, input int rounds);
    logic [63:0] ib;
    for (int j = 0; j < 8; j++) ib[63-8*j -: 8] = idx[8*j +: 8];
    return hash({"expa", k, "nd 1", n, ib, "6-by", k, "te k"}, rounds);
  endfunction

  function automatic logic [511:0] rand512();
    logic [511:0] v;
    for (int i = 0; i < 16; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

endpackage
