// aes_pkg: AES-128 arithmetic shared by the victim core, the AES power wasters
// and the fault classifier.
//
// The S-box is not typed in as a table: gen_sbox() builds it at elaboration
// from its definition (multiplicative inverse in GF(2^8) modulo
// x^8+x^4+x^3+x+1, followed by the affine map b ^ rotl(b,1..4) ^ 0x63), and
// synthesis turns the constant into a 256x8 ROM. Byte order follows the AES
// standard: byte 0 of a 128-bit block is bits [127:120], and the state is
// filled column by column (byte i sits in row i%4, column i/4).
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;

  // GF(2^8) multiplication, shift-and-add.
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = '0;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = {x[6:0], 1'b0} ^ (x[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // Inverse as a^254 (0 maps to 0).
  function automatic byte_t gf_inv(byte_t a);
    byte_t r = 8'h01;
    byte_t sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, sq);  // exponent 254 = 0b11111110
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  function automatic byte_t rotl8(byte_t b, int n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  function automatic logic [2047:0] gen_sbox();
    logic [2047:0] t;
    byte_t inv;
    for (int v = 0; v < 256; v++) begin
      inv = gf_inv(byte_t'(v));
      t[8*v +: 8] = inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
    end
    return t;
  endfunction

  localparam logic [2047:0] SBOX_TABLE = gen_sbox();

  function automatic byte_t sbox(byte_t a);
    return SBOX_TABLE[8*a +: 8];
  endfunction

  // Byte i of a block (i = 0 is the most significant byte).
  function automatic byte_t get_byte(block_t b, int i);
    return b[127-8*i -: 8];
  endfunction

  function automatic word_t mix_column(word_t c);
    byte_t a0, a1, a2, a3;
    {a0, a1, a2, a3} = c;
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  // ShiftRows: output byte (row r, column c) takes input (r, (c+r)%4).
  function automatic block_t shift_rows(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = s[127-8*(4*((c+r)%4)+r) -: 8];
    return o;
  endfunction

  function automatic block_t mix_columns(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      o[127-32*c -: 32] = mix_column(s[127-32*c -: 32]);
    return o;
  endfunction

  // Ciphertext bytes that one faulty byte in state column `col` at the input
  // of round 9 reaches: MixColumns of round 9 spreads it over the column, the
  // ShiftRows of round 10 moves row r to column (col-r)%4. For col 0 this is
  // bytes 0, 7, 10 and 13. Returned as a mask, bit i = ciphertext byte i.
  function automatic logic [15:0] diag_mask(int col);
    logic [15:0] m = '0;
    for (int r = 0; r < 4; r++)
      m[4*((col - r + 4) % 4) + r] = 1'b1;
    return m;
  endfunction

endpackage
