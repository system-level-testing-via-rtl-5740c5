// aes_pkg: arithmetic of the AES block cipher (FIPS-197) used by the
// encryption core.
//
// The S-box is not stored as a typed-in table: sbox() computes it from its
// definition, the multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1
// followed by the affine map b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^
// rotl(b,4) ^ 0x63.  The core evaluates it once per table entry at
// elaboration, so the hardware is an ordinary 256 x 8 lookup.
package aes_pkg;

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, x;
    p = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ x;
      x = xtime(x);
    end
    return p;
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] b, input int n);
    return (b << n) | (b >> (8 - n));
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] x);
    logic [7:0] inv, sq;
    // x^254 = x^-1 in GF(2^8) (and 0 for x = 0)
    inv = 8'h01;
    sq  = x;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) inv = gmul(inv, sq);   // exponent 254 = 0b11111110
      sq = gmul(sq, sq);
    end
    return inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
  endfunction

  // MixColumns on one column, c[31:24] = row 0
  function automatic logic [31:0] mix_column(input logic [31:0] c);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = c;
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

endpackage
