// Behavioural AES-128 reference used by the testbenches, written from FIPS-197
// (S-box by exponentiation in GF(2^8), standard cipher and inverse cipher). It
// shares no code with the RTL.
package aes_ref_pkg;

  function automatic logic [7:0] mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p;
    p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] x);
    logic [7:0] v, s;
    v = 8'h01;
    for (int i = 0; i < 254; i++) v = mul(v, x);   // x^254 = x^-1
    s = 8'h63;
    for (int i = 0; i < 8; i++)
      s[i] = s[i] ^ v[i] ^ v[(i+4)%8] ^ v[(i+5)%8] ^ v[(i+6)%8] ^ v[(i+7)%8];
    return s;
  endfunction

  function automatic logic [7:0] isbox(input logic [7:0] y);
    for (int x = 0; x < 256; x++) if (sbox(8'(x)) == y) return 8'(x);
    return 0;
  endfunction

  typedef logic [7:0] st_t [16];

  function automatic st_t to_st(input logic [127:0] b);
    st_t s;
    for (int i = 0; i < 16; i++) s[i] = b[127-8*i -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_st(input st_t s);
    logic [127:0] b;
    for (int i = 0; i < 16; i++) b[127-8*i -: 8] = s[i];
    return b;
  endfunction

  // All eleven round keys.
  typedef logic [127:0] rk_t [11];
  function automatic rk_t expand(input logic [127:0] key);
    logic [31:0] w [44];
    logic [7:0] rc;
    rk_t rk;
    rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t;
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])} ^ {rc, 24'h0};
        rc = mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic logic [127:0] encrypt(input logic [127:0] key, input logic [127:0] pt);
    rk_t rk;
    st_t s, t;
    rk = expand(key);
    s = to_st(pt ^ rk[0]);
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) s[i] = sbox(s[i]);
      for (int c = 0; c < 4; c++) for (int q = 0; q < 4; q++) t[4*c+q] = s[4*((c+q)%4)+q];
      s = t;
      if (r != 10)
        for (int c = 0; c < 4; c++) begin
          for (int q = 0; q < 4; q++)
            t[4*c+q] = mul(s[4*c+q], 2) ^ mul(s[4*c+(q+1)%4], 3) ^ s[4*c+(q+2)%4] ^ s[4*c+(q+3)%4];
        end
      if (r != 10) s = t;
      s = to_st(from_st(s) ^ rk[r]);
    end
    return from_st(s);
  endfunction

  function automatic logic [127:0] decrypt(input logic [127:0] key, input logic [127:0] ct);
    rk_t rk;
    st_t s, t;
    rk = expand(key);
    s = to_st(ct ^ rk[10]);
    for (int r = 9; r >= 0; r--) begin
      for (int c = 0; c < 4; c++) for (int q = 0; q < 4; q++) t[4*((c+q)%4)+q] = s[4*c+q];
      s = t;
      for (int i = 0; i < 16; i++) s[i] = isbox(s[i]);
      s = to_st(from_st(s) ^ rk[r]);
      if (r != 0) begin
        for (int c = 0; c < 4; c++)
          for (int q = 0; q < 4; q++)
            t[4*c+q] = mul(s[4*c+q], 8'h0e) ^ mul(s[4*c+(q+1)%4], 8'h0b)
                     ^ mul(s[4*c+(q+2)%4], 8'h0d) ^ mul(s[4*c+(q+3)%4], 8'h09);
        s = t;
      end
    end
    return from_st(s);
  endfunction

endpackage
