// AES S-box and inverse S-box with the inversion done in GF((2^4)^2).
//
// Forward:  S(x)    = Affine( Inv(x) )
// Inverse:  S^-1(x) = Inv( InvAffine(x) )
// Both directions share one multiplicative inverter. The inverter maps the
// byte into the composite field GF((2^4)^2), built from GF(2^4) with
// polynomial z^4 + z + 1 and the extension y^2 + y + LAMBDA, inverts it
// there as
//   (h*y + l)^-1 = (h*D^-1)*y + (h + l)*D^-1,  D = LAMBDA*h^2 + h*l + l^2,
// with only GF(2^4) arithmetic, and maps the result back. The isomorphism is
// x -> sum of x_i * beta^i for a root beta of the AES polynomial in the
// composite field. LAMBDA, beta and both 8x8 bit matrices are found by
// constant functions at elaboration, so the hardware is two XOR matrices, a
// few GF(2^4) multipliers and one GF(2^4) inverter.
// The paper states that the S-box inverts in GF((2^4)^2) and applies the
// affine transformation; the field polynomials, the search for the basis and
// the shared forward/inverse structure are this design's choices.
//
// Interface: purely combinational. inv_i = 1 selects the inverse S-box.
module aes_sbox (
  input  logic       inv_i,
  input  logic [7:0] data_i,
  output logic [7:0] data_o
);

  // ---- GF(2^4), polynomial z^4 + z + 1 ----
  function automatic logic [3:0] gf4_mul(input logic [3:0] a, input logic [3:0] b);
    logic [3:0] p, aa;
    p = '0;
    aa = a;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) p = p ^ aa;
      aa = {aa[2:0], 1'b0} ^ (aa[3] ? 4'h3 : 4'h0);
    end
    return p;
  endfunction

  // a^-1 = a^14 = a^8 * a^4 * a^2 (0 maps to 0).
  function automatic logic [3:0] gf4_inv(input logic [3:0] a);
    logic [3:0] a2, a4, a8;
    a2 = gf4_mul(a, a);
    a4 = gf4_mul(a2, a2);
    a8 = gf4_mul(a4, a4);
    return gf4_mul(gf4_mul(a8, a4), a2);
  endfunction

  // Smallest LAMBDA making y^2 + y + LAMBDA irreducible over GF(2^4).
  function automatic logic [3:0] find_lambda();
    for (int lam = 1; lam < 16; lam++) begin
      bit has_root;
      has_root = 1'b0;
      for (int z = 0; z < 16; z++)
        if ((gf4_mul(4'(z), 4'(z)) ^ 4'(z)) == 4'(lam)) has_root = 1'b1;
      if (!has_root) return 4'(lam);
    end
    return 4'h0;
  endfunction

  localparam logic [3:0] LAMBDA = find_lambda();

  // ---- GF((2^4)^2): element {h, l} = h*y + l, y^2 = y + LAMBDA ----
  function automatic logic [7:0] gf8c_mul(input logic [7:0] a, input logic [7:0] b);
    logic [3:0] hh;
    hh = gf4_mul(a[7:4], b[7:4]);
    return {hh ^ gf4_mul(a[7:4], b[3:0]) ^ gf4_mul(a[3:0], b[7:4]),
            gf4_mul(hh, LAMBDA) ^ gf4_mul(a[3:0], b[3:0])};
  endfunction

  function automatic logic [7:0] gf8c_inv(input logic [7:0] a);
    logic [3:0] h, l, d, di;
    h  = a[7:4];
    l  = a[3:0];
    d  = gf4_mul(gf4_mul(h, h), LAMBDA) ^ gf4_mul(h, l) ^ gf4_mul(l, l);
    di = gf4_inv(d);
    return {gf4_mul(h, di), gf4_mul(h ^ l, di)};
  endfunction

  // A root beta of x^8 + x^4 + x^3 + x + 1 in the composite field; the map
  // matrix has the powers beta^0..beta^7 as its columns (column i in bits
  // [8i+7:8i]).
  function automatic logic [63:0] find_map();
    for (int c = 2; c < 256; c++) begin
      logic [7:0] p [9];
      p[0] = 8'h01;
      for (int i = 1; i < 9; i++) p[i] = gf8c_mul(p[i-1], 8'(c));
      if ((p[8] ^ p[4] ^ p[3] ^ p[1] ^ p[0]) == 8'h00)
        return {p[7], p[6], p[5], p[4], p[3], p[2], p[1], p[0]};
    end
    return '0;
  endfunction

  function automatic logic [7:0] mat_apply(input logic [63:0] m, input logic [7:0] x);
    logic [7:0] y;
    y = '0;
    for (int i = 0; i < 8; i++) if (x[i]) y = y ^ m[8*i +: 8];
    return y;
  endfunction

  // Inverse map: column j is the AES byte whose image is the unit vector j.
  function automatic logic [63:0] find_unmap(input logic [63:0] m);
    logic [63:0] u;
    u = '0;
    for (int a = 1; a < 256; a++)
      for (int j = 0; j < 8; j++)
        if (mat_apply(m, 8'(a)) == 8'(1 << j)) u[8*j +: 8] = 8'(a);
    return u;
  endfunction

  localparam logic [63:0] MAP   = find_map();
  localparam logic [63:0] UNMAP = find_unmap(MAP);

  function automatic logic [7:0] rotl8(input logic [7:0] b, input int unsigned n);
    return (b << n) | (b >> (8 - n));
  endfunction

  logic [7:0] inv_in, inv_out, affine_out, inv_affine_out;

  // Inverse affine transformation on the input (inverse S-box only).
  assign inv_affine_out = rotl8(data_i, 1) ^ rotl8(data_i, 3) ^ rotl8(data_i, 6) ^ 8'h05;
  assign inv_in  = inv_i ? inv_affine_out : data_i;
  assign inv_out = mat_apply(UNMAP, gf8c_inv(mat_apply(MAP, inv_in)));
  // Affine transformation on the output (forward S-box only).
  assign affine_out = inv_out ^ rotl8(inv_out, 1) ^ rotl8(inv_out, 2) ^ rotl8(inv_out, 3)
                      ^ rotl8(inv_out, 4) ^ 8'h63;
  assign data_o = inv_i ? inv_out : affine_out;

endmodule
