// idea_ref_pkg: reference model of IDEA for the testbenches.
// Word-level (not bit-serial) functions written from the algorithm's
// definition: multiplication modulo 2^16+1 with 0 standing for 2^16, the
// encryption key schedule (128-bit key, rotated left by 25 bits per group of
// eight subkeys), the decryption subkeys (inverses and negations, swapped
// middle keys in rounds 2..8), one block encryption, and the bit stream that
// loads 52 subkeys into the core's key chain (multiplication subkeys
// decremented by one, last subkey first, each LSB first). It also stands in
// for the host software that prepares the subkeys.
package idea_ref_pkg;
  typedef logic [15:0] word_t;
  typedef word_t [3:0] block_t;
  typedef word_t       subkeys_t [52];

  function automatic word_t mul(word_t a, word_t b);
    longint unsigned x, y;
    x = (a == 0) ? 65536 : a;
    y = (b == 0) ? 65536 : b;
    return word_t'((x * y) % 65537);
  endfunction

  function automatic word_t mul_inv(word_t a);
    // a^(65537-2) mod 65537 by square and multiply
    word_t r = 1, base = a;
    int unsigned e = 65535;
    while (e != 0) begin
      if (e[0]) r = mul(r, base);
      base = mul(base, base);
      e >>= 1;
    end
    return r;
  endfunction

  function automatic subkeys_t enc_keys(logic [127:0] key);
    subkeys_t z;
    logic [127:0] k = key;
    for (int i = 0; i < 52; i++) begin
      z[i] = k[127 - 16*(i%8) -: 16];
      if (i % 8 == 7) k = {k[102:0], k[127:103]};
    end
    return z;
  endfunction

  function automatic subkeys_t dec_keys(subkeys_t z);
    subkeys_t d;
    for (int r = 1; r <= 9; r++) begin
      int s = 6*(9-r);     // index of Z1 of encryption round 10-r
      int o = 6*(r-1);
      d[o+0] = mul_inv(z[s+0]);
      if (r == 1 || r == 9) begin
        d[o+1] = -z[s+1];
        d[o+2] = -z[s+2];
      end else begin
        d[o+1] = -z[s+2];
        d[o+2] = -z[s+1];
      end
      d[o+3] = mul_inv(z[s+3]);
      if (r <= 8) begin
        d[o+4] = z[6*(8-r)+4];
        d[o+5] = z[6*(8-r)+5];
      end
    end
    return d;
  endfunction

  function automatic block_t encrypt(block_t x, subkeys_t z);
    word_t a, b, c, d, e, f, t0, t1;
    block_t y;
    a = x[0]; b = x[1]; c = x[2]; d = x[3];
    for (int r = 0; r < 8; r++) begin
      a = mul(a, z[6*r+0]);
      b = b + z[6*r+1];
      c = c + z[6*r+2];
      d = mul(d, z[6*r+3]);
      e = a ^ c; f = b ^ d;
      t0 = mul(e, z[6*r+4]);
      t1 = mul(f + t0, z[6*r+5]);
      t0 = t0 + t1;
      a = a ^ t1; d = d ^ t0;
      e = c ^ t1; f = b ^ t0;
      b = e; c = f;
    end
    y[0] = mul(a, z[48]);
    y[1] = c + z[49];
    y[2] = b + z[50];
    y[3] = mul(d, z[51]);
    return y;
  endfunction

  // true for the subkeys used by a multiplier (Z1, Z4, Z5, Z6; Z1, Z4 in
  // the output transformation)
  function automatic bit is_mul_key(int i);
    int k = i % 6;
    if (i >= 48) return (i == 48 || i == 51);
    return (k == 0 || k == 3 || k == 4 || k == 5);
  endfunction

  // bit n (0..831) of the key chain stream
  function automatic logic chain_bit(subkeys_t z, int n);
    int    idx = 51 - n / 16;
    word_t v   = is_mul_key(idx) ? word_t'(z[idx] - 16'd1) : z[idx];
    return v[n % 16];
  endfunction
endpackage
