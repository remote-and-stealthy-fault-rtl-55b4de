// aes_ref_pkg: software reference model of AES-128 for the testbenches.
// Written independently of the RTL arithmetic: the S-box comes from
// exponent/logarithm tables of the generator 0x03 instead of a^254, and the
// rounds operate on a byte array in textbook order. aes_encrypt_fault()
// additionally flips one state byte with `flip` at the input of round
// `fround` (1..10), which is how a single-byte fault model is reproduced.
package aes_ref_pkg;

  typedef logic [7:0] bytes16_t [16];

  function automatic logic [7:0] sb(logic [7:0] x);
    logic [7:0] expt [256];
    int         logt [256];
    logic [7:0] v, inv, r;
    v = 8'h01;
    for (int i = 0; i < 255; i++) begin
      expt[i] = v;
      logt[v] = i;
      v = v ^ {v[6:0], 1'b0} ^ (v[7] ? 8'h1b : 8'h00);  // v * 3
    end
    inv = (x == 0) ? 8'h00 : expt[(255 - logt[x]) % 255];
    r = 8'h63;
    for (int b = 0; b < 8; b++)
      r[b] = r[b] ^ inv[b] ^ inv[(b+4)%8] ^ inv[(b+5)%8] ^ inv[(b+6)%8] ^ inv[(b+7)%8];
    return r;
  endfunction

  function automatic logic [7:0] mul2(logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [127:0] aes_encrypt_fault(logic [127:0] pt, logic [127:0] key,
                                                      int fround, int fbyte, logic [7:0] flip);
    logic [7:0] s [16];
    logic [7:0] t [16];
    logic [7:0] k [16];
    logic [7:0] rc, tmp0;
    logic [127:0] out;
    for (int i = 0; i < 16; i++) begin
      s[i] = pt[127-8*i -: 8] ^ key[127-8*i -: 8];
      k[i] = key[127-8*i -: 8];
    end
    rc = 8'h01;
    for (int r = 1; r <= 10; r++) begin
      if (r == fround) s[fbyte] = s[fbyte] ^ flip;
      for (int i = 0; i < 16; i++) s[i] = sb(s[i]);
      for (int c = 0; c < 4; c++)
        for (int row = 0; row < 4; row++) t[4*c+row] = s[4*((c+row)%4)+row];
      if (r != 10) begin
        for (int c = 0; c < 4; c++) begin
          tmp0 = t[4*c] ^ t[4*c+1] ^ t[4*c+2] ^ t[4*c+3];
          s[4*c]   = t[4*c]   ^ tmp0 ^ mul2(t[4*c]   ^ t[4*c+1]);
          s[4*c+1] = t[4*c+1] ^ tmp0 ^ mul2(t[4*c+1] ^ t[4*c+2]);
          s[4*c+2] = t[4*c+2] ^ tmp0 ^ mul2(t[4*c+2] ^ t[4*c+3]);
          s[4*c+3] = t[4*c+3] ^ tmp0 ^ mul2(t[4*c+3] ^ t[4*c]);
        end
      end else begin
        for (int i = 0; i < 16; i++) s[i] = t[i];
      end
      // key expansion
      k[0] = k[0] ^ sb(k[13]) ^ rc;
      k[1] = k[1] ^ sb(k[14]);
      k[2] = k[2] ^ sb(k[15]);
      k[3] = k[3] ^ sb(k[12]);
      for (int i = 4; i < 16; i++) k[i] = k[i] ^ k[i-4];
      rc = mul2(rc);
      for (int i = 0; i < 16; i++) s[i] = s[i] ^ k[i];
    end
    for (int i = 0; i < 16; i++) out[127-8*i -: 8] = s[i];
    return out;
  endfunction

  function automatic logic [127:0] aes_encrypt(logic [127:0] pt, logic [127:0] key);
    return aes_encrypt_fault(pt, key, 0, 0, 8'h00);
  endfunction

endpackage
