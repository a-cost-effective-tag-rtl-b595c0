// tag_ref_pkg: bit-level reference models used by the testbenches.
//
// They are written independently of the RTL: AES works on a byte array with
// an S-box found by searching for the multiplicative inverse, and the tag
// generator swaps and rotates one bit at a time, exactly as the algorithm is
// stated (block pair, wrapped segment exchange, left rotate, XOR).
package tag_ref_pkg;

  // ---------------- AES-128 ----------------
  function automatic byte unsigned gf_mul(byte unsigned a, byte unsigned b);
    int unsigned p = 0, x = a;
    for (int k = 0; k < 8; k++) begin
      if ((b >> k) & 1) p ^= x;
      x = x << 1;
      if (x & 'h100) x ^= 'h11b;
    end
    return byte'(p);
  endfunction

  function automatic byte unsigned ref_sbox(byte unsigned a);
    byte unsigned inv = 0, s;
    for (int y = 1; y < 256; y++) if (gf_mul(a, byte'(y)) == 1) inv = byte'(y);
    s = 8'h63;
    for (int k = 0; k < 5; k++) s ^= byte'((inv << k) | (inv >> (8 - k)));
    return s;
  endfunction

  byte unsigned sb[256];
  bit           sb_built = 1'b0;

  function automatic logic [127:0] ref_aes128(logic [127:0] key, logic [127:0] pt);
    byte unsigned st[16], tmp[16], w[176];
    byte unsigned rc = 1, t0, t1, t2, t3, u;
    logic [127:0] out;
    if (!sb_built) begin
      for (int a = 0; a < 256; a++) sb[a] = ref_sbox(byte'(a));
      sb_built = 1'b1;
    end
    for (int b = 0; b < 16; b++) begin
      w[b]  = key[127 - 8*b -: 8];
      st[b] = pt[127 - 8*b -: 8];
    end
    for (int i = 4; i < 44; i++) begin
      t0 = w[4*(i-1)]; t1 = w[4*(i-1)+1]; t2 = w[4*(i-1)+2]; t3 = w[4*(i-1)+3];
      if (i % 4 == 0) begin
        u = t0;
        t0 = sb[t1] ^ rc; t1 = sb[t2]; t2 = sb[t3]; t3 = sb[u];
        rc = gf_mul(rc, 2);
      end
      w[4*i]   = w[4*(i-4)]   ^ t0;
      w[4*i+1] = w[4*(i-4)+1] ^ t1;
      w[4*i+2] = w[4*(i-4)+2] ^ t2;
      w[4*i+3] = w[4*(i-4)+3] ^ t3;
    end
    for (int b = 0; b < 16; b++) st[b] ^= w[b];
    for (int r = 1; r <= 10; r++) begin
      for (int b = 0; b < 16; b++) st[b] = sb[st[b]];
      for (int c = 0; c < 4; c++)
        for (int row = 0; row < 4; row++) tmp[4*c + row] = st[4*((c + row) % 4) + row];
      st = tmp;
      if (r != 10)
        for (int c = 0; c < 4; c++) begin
          t0 = st[4*c]; t1 = st[4*c+1]; t2 = st[4*c+2]; t3 = st[4*c+3];
          st[4*c]   = gf_mul(t0,2) ^ gf_mul(t1,3) ^ t2 ^ t3;
          st[4*c+1] = t0 ^ gf_mul(t1,2) ^ gf_mul(t2,3) ^ t3;
          st[4*c+2] = t0 ^ t1 ^ gf_mul(t2,2) ^ gf_mul(t3,3);
          st[4*c+3] = gf_mul(t0,3) ^ t1 ^ t2 ^ gf_mul(t3,2);
        end
      for (int b = 0; b < 16; b++) st[b] ^= w[16*r + b];
    end
    for (int b = 0; b < 16; b++) out[127 - 8*b -: 8] = st[b];
    return out;
  endfunction

  // ---------------- tag generator ----------------
  function automatic int clog2(int v);
    int r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  function automatic int getbits(logic [127:0] v, int off, int w);
    int r = 0;
    for (int k = 0; k < w; k++) r |= int'(v[off + k]) << k;
    return r;
  endfunction

  typedef struct {
    int i, j, size, pa, pb;
  } round_ctrl_t;

  function automatic round_ctrl_t ref_round(logic [127:0] nonce, int n, int m, int alpha, int k);
    int q  = n / m;
    int qb = (q > 1) ? clog2(q) : 1;
    int pb = clog2(m);
    int sb = (alpha > 1) ? clog2(alpha) : 1;
    int rb = 2*qb + sb + 2*pb;
    int off = k * rb;
    round_ctrl_t c;
    c.i    = getbits(nonce, off, qb);
    c.j    = (c.i + 1 + getbits(nonce, off + qb, qb) % (q - 1)) % q;
    c.size = getbits(nonce, off + 2*qb, sb) + 1;
    c.pa   = getbits(nonce, off + 2*qb + sb, pb);
    c.pb   = getbits(nonce, off + 2*qb + sb + pb, pb);
    return c;
  endfunction

  function automatic int ref_shift(logic [127:0] nonce, int n, int m, int alpha, int beta, int b);
    int q  = n / m;
    int qb = (q > 1) ? clog2(q) : 1;
    int pb = clog2(m);
    int sb = (alpha > 1) ? clog2(alpha) : 1;
    int rb = 2*qb + sb + 2*pb;
    return getbits(nonce, beta*rb + b*pb, pb);
  endfunction

  // Segment swap on bit arrays, one bit pair at a time.
  function automatic void ref_seg_swap(ref bit blk[16][128], input int m, input round_ctrl_t c);
    bit t;
    for (int s = 0; s < c.size; s++) begin
      t = blk[c.i][(c.pa + s) % m];
      blk[c.i][(c.pa + s) % m] = blk[c.j][(c.pb + s) % m];
      blk[c.j][(c.pb + s) % m] = t;
    end
  endfunction

  // Shuffled line, B(1) in the most significant block, as a 256-bit vector.
  function automatic logic [255:0] ref_shuffle(logic [255:0] line, logic [127:0] nonce,
                                               int n, int m, int alpha, int beta);
    bit blk[16][128];
    logic [255:0] o = '0;
    int q = n / m;
    for (int b = 0; b < q; b++)
      for (int p = 0; p < m; p++) blk[b][p] = line[(q-1-b)*m + p];
    for (int k = 0; k < beta; k++) ref_seg_swap(blk, m, ref_round(nonce, n, m, alpha, k));
    for (int b = 0; b < q; b++)
      for (int p = 0; p < m; p++) o[(q-1-b)*m + p] = blk[b][p];
    return o;
  endfunction

  function automatic logic [127:0] ref_tag(logic [255:0] line, logic [127:0] nonce,
                                           int n, int m, int alpha, int beta);
    logic [255:0] sh = ref_shuffle(line, nonce, n, m, alpha, beta);
    logic [127:0] tag = '0;
    int q = n / m, s;
    for (int b = 0; b < q; b++) begin
      s = ref_shift(nonce, n, m, alpha, beta, b);
      // rotate left by s: output bit p comes from input bit p - s
      for (int p = 0; p < m; p++) tag[p] ^= sh[(q-1-b)*m + ((p - s + m) % m)];
    end
    return tag;
  endfunction
endpackage
