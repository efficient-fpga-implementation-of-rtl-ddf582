// ccm_ref_pkg: reference models for the testbenches, written independently
// of the RTL. The S-box is found by searching for each byte's inverse
// (rather than by exponentiation), AES works byte by byte on a 4x4 state as
// in FIPS-197, and CCM formatting, CBC-MAC and counter encryption follow
// NIST SP 800-38C directly on byte queues.
package ccm_ref_pkg;

  typedef byte unsigned u8;
  typedef u8 bytes_t[$];

  function automatic u8 ref_xt(u8 a);
    return u8'((a << 1) ^ ((a & 8'h80) != 0 ? 8'h1b : 8'h00));
  endfunction

  function automatic u8 ref_mul(u8 a, u8 b);
    u8 p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = ref_xt(a);
    end
    return p;
  endfunction

  function automatic u8 ref_sbox(u8 x);
    u8 inv = 0;
    u8 b;
    u8 s;
    if (x != 0)
      for (int c = 1; c < 256; c++)
        if (ref_mul(x, u8'(c)) == 1) inv = u8'(c);
    b = inv;
    s = 8'h63;
    for (int i = 0; i < 5; i++) begin
      s ^= b;
      b = u8'({b[6:0], b[7]});
    end
    return s;
  endfunction

  // Round keys w[0..43] of AES-128.
  function automatic void ref_expand(input logic [127:0] key, output logic [31:0] w [44]);
    u8 rc = 1;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {ref_sbox(t[31:24]) ^ rc, ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
        rc = ref_xt(rc);
      end
      w[i] = w[i-4] ^ t;
    end
  endfunction

  function automatic logic [127:0] ref_round_key(logic [127:0] key, int r);
    logic [31:0] w [44];
    ref_expand(key, w);
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic logic [31:0] ref_mixcol(logic [31:0] c);
    u8 a[4];
    u8 o[4];
    for (int i = 0; i < 4; i++) a[i] = c[31-8*i -: 8];
    o[0] = ref_mul(a[0], 2) ^ ref_mul(a[1], 3) ^ a[2] ^ a[3];
    o[1] = a[0] ^ ref_mul(a[1], 2) ^ ref_mul(a[2], 3) ^ a[3];
    o[2] = a[0] ^ a[1] ^ ref_mul(a[2], 2) ^ ref_mul(a[3], 3);
    o[3] = ref_mul(a[0], 3) ^ a[1] ^ a[2] ^ ref_mul(a[3], 2);
    return {o[0], o[1], o[2], o[3]};
  endfunction

  function automatic logic [127:0] ref_aes(logic [127:0] key, logic [127:0] pt);
    logic [31:0] w [44];
    u8 s [4][4];   // s[row][col]
    u8 t [4][4];
    ref_expand(key, w);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        s[r][c] = pt[127-32*c-8*r -: 8] ^ w[c][31-8*r -: 8];
    for (int rnd = 1; rnd <= 10; rnd++) begin
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) s[r][c] = ref_sbox(s[r][c]);
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) t[r][c] = s[r][(c+r)%4];
      s = t;
      if (rnd != 10)
        for (int c = 0; c < 4; c++) begin
          logic [31:0] m = ref_mixcol({s[0][c], s[1][c], s[2][c], s[3][c]});
          for (int r = 0; r < 4; r++) s[r][c] = m[31-8*r -: 8];
        end
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++) s[r][c] ^= w[4*rnd+c][31-8*r -: 8];
    end
    return {s[0][0], s[1][0], s[2][0], s[3][0], s[0][1], s[1][1], s[2][1], s[3][1],
            s[0][2], s[1][2], s[2][2], s[3][2], s[0][3], s[1][3], s[2][3], s[3][3]};
  endfunction

  // Formatted blocks B0, associated data blocks, payload blocks (SP 800-38C A.2).
  function automatic void ref_format(input bytes_t nonce, input bytes_t adata,
                                     input bytes_t payload, input int tlen,
                                     output logic [127:0] blocks[$]);
    int q = 15 - nonce.size();
    bytes_t b;
    u8 flags = u8'(((adata.size() > 0) ? 64 : 0) + 8 * ((tlen - 2) / 2) + (q - 1));
    b.push_back(flags);
    foreach (nonce[i]) b.push_back(nonce[i]);
    for (int i = q - 1; i >= 0; i--) b.push_back(u8'(payload.size() >> (8*i)));
    if (adata.size() > 0) begin
      b.push_back(u8'(adata.size() >> 8));
      b.push_back(u8'(adata.size()));
      foreach (adata[i]) b.push_back(adata[i]);
      while (b.size() % 16 != 0) b.push_back(0);
    end
    foreach (payload[i]) b.push_back(payload[i]);
    while (b.size() % 16 != 0) b.push_back(0);
    blocks = {};
    for (int k = 0; k < b.size() / 16; k++) begin
      logic [127:0] blk;
      for (int j = 0; j < 16; j++) blk[127-8*j -: 8] = b[16*k+j];
      blocks.push_back(blk);
    end
  endfunction

  function automatic logic [127:0] ref_ctr_block(bytes_t nonce, int i);
    logic [127:0] a = '0;
    int q = 15 - nonce.size();
    a[127:120] = u8'(q - 1);
    foreach (nonce[k]) a[119-8*k -: 8] = nonce[k];
    for (int k = 0; k < q; k++) a[8*k +: 8] = u8'(i >> (8*k));
    return a;
  endfunction

  // CCM generation-encryption: ciphertext bytes and the tag (tlen bytes,
  // left-aligned in a 128-bit word, the rest zero).
  function automatic void ref_ccm(input logic [127:0] key, input bytes_t nonce,
                                  input bytes_t adata, input bytes_t payload,
                                  input int tlen, output bytes_t ct,
                                  output logic [127:0] tag);
    logic [127:0] blocks[$];
    logic [127:0] y;
    logic [127:0] s;
    ref_format(nonce, adata, payload, tlen, blocks);
    y = '0;
    foreach (blocks[i]) y = ref_aes(key, blocks[i] ^ y);
    ct = {};
    for (int i = 0; i < payload.size(); i++) begin
      if (i % 16 == 0) s = ref_aes(key, ref_ctr_block(nonce, i / 16 + 1));
      ct.push_back(payload[i] ^ s[127-8*(i%16) -: 8]);
    end
    s = ref_aes(key, ref_ctr_block(nonce, 0));
    tag = y ^ s;
    for (int i = tlen; i < 16; i++) tag[127-8*i -: 8] = 0;
  endfunction

endpackage
