// tb_ref_pkg: reference models used by the testbenches.
//
// Written independently of the RTL: AES-128 works on a 4x4 byte matrix with
// an S-box found by searching for multiplicative inverses, the W7 model
// keeps each register as an array of bits, and the wavelet model runs the
// integer lifting steps over whole arrays with explicit mirror indexing.
package tb_ref_pkg;

  typedef bit [7:0] u8;
  typedef u8 mat_t [4][4];   // [row][col]

  // ------------------------------------------------------------------ AES
  function automatic u8 mul2(u8 a);
    return (a << 1) ^ ((a & 8'h80) != 0 ? 8'h1b : 8'h00);
  endfunction

  function automatic u8 gf_mul(u8 a, u8 b);
    u8 p = 0;
    while (b != 0) begin
      if (b[0]) p ^= a;
      a = mul2(a);
      b = b >> 1;
    end
    return p;
  endfunction

  function automatic u8 rotl8(u8 v, int s);
    return (v << s) | (v >> (8 - s));
  endfunction

  function automatic u8 ref_sbox(u8 x);
    u8 inv = 0;
    for (int c = 1; c < 256; c++)
      if (gf_mul(x, u8'(c)) == 1) inv = u8'(c);
    return inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
  endfunction

  u8 sb [256];
  bit sb_ready = 0;

  function automatic void init_sbox();
    if (!sb_ready) begin
      for (int i = 0; i < 256; i++) sb[i] = ref_sbox(u8'(i));
      sb_ready = 1;
    end
  endfunction

  function automatic mat_t to_mat(bit [127:0] v);
    mat_t m;
    for (int i = 0; i < 16; i++) m[i % 4][i / 4] = v[127 - 8*i -: 8];
    return m;
  endfunction

  function automatic bit [127:0] from_mat(mat_t m);
    bit [127:0] v;
    for (int i = 0; i < 16; i++) v[127 - 8*i -: 8] = m[i % 4][i / 4];
    return v;
  endfunction

  // all eleven round keys as 44 words
  function automatic void key_words(bit [127:0] key, output bit [31:0] w [44]);
    u8 rc = 1;
    bit [31:0] t;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sb[t[31:24]] ^ rc, sb[t[23:16]], sb[t[15:8]], sb[t[7:0]]};
        rc = mul2(rc);
      end
      w[i] = w[i-4] ^ t;
    end
  endfunction

  function automatic bit [127:0] round_key(bit [127:0] key, int r);
    bit [31:0] w [44];
    init_sbox();
    key_words(key, w);
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic bit [127:0] aes_enc(bit [127:0] key, bit [127:0] pt);
    bit [31:0] w [44];
    mat_t s, t;
    init_sbox();
    key_words(key, w);
    s = to_mat(pt ^ {w[0], w[1], w[2], w[3]});
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) t[i][j] = sb[s[i][(j + i) % 4]];
      if (r != 10)
        for (int j = 0; j < 4; j++)
          for (int i = 0; i < 4; i++)
            s[i][j] = gf_mul(t[i][j], 2) ^ gf_mul(t[(i+1)%4][j], 3) ^ t[(i+2)%4][j] ^ t[(i+3)%4][j];
      else
        s = t;
      s = to_mat(from_mat(s) ^ {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]});
    end
    return from_mat(s);
  endfunction

  // ------------------------------------------------------------------- W7
  // One cell as plain bit arrays; taps of cell k follow the generator.
  class w7_ref_cell;
    bit a [38];
    bit b [43];
    bit c [47];
    int ca, cb, cc, oa, ob, oc;

    function new(int k);
      ca = 11 + 2*k; cb = 13 + 2*k; cc = 15 + 2*k;
      oa = 37 - k;   ob = 42 - k;   oc = 46 - k;
    endfunction

    function void load(bit [127:0] key);
      for (int j = 0; j < 38; j++) a[j] = key[j];
      for (int j = 0; j < 43; j++) b[j] = key[38 + j];
      for (int j = 0; j < 47; j++) c[j] = key[81 + j];
    endfunction

    function bit step();
      bit m, fa, fb, fc;
      int votes = int'(a[ca]) + int'(b[cb]) + int'(c[cc]);
      m = (votes >= 2);
      fa = a[37] ^ a[5] ^ a[4] ^ a[0];
      fb = b[42] ^ b[41] ^ b[37] ^ b[36];
      fc = c[46] ^ c[41];
      if (a[ca] == m) begin for (int j = 37; j > 0; j--) a[j] = a[j-1]; a[0] = fa; end
      if (b[cb] == m) begin for (int j = 42; j > 0; j--) b[j] = b[j-1]; b[0] = fb; end
      if (c[cc] == m) begin for (int j = 46; j > 0; j--) c[j] = c[j-1]; c[0] = fc; end
      return a[oa] ^ b[ob] ^ c[oc];
    endfunction
  endclass

  class w7_ref;
    w7_ref_cell cells [8];
    function new();
      for (int k = 0; k < 8; k++) cells[k] = new(k);
    endfunction
    function void load(bit [127:0] key, int warmup = 0);
      for (int k = 0; k < 8; k++) cells[k].load(key);
      for (int n = 0; n < warmup; n++) void'(next_byte());
    endfunction
    function u8 next_byte();
      u8 v;
      for (int k = 0; k < 8; k++) v[k] = cells[k].step();
      return v;
    endfunction
    function bit [127:0] next_key();
      bit [127:0] k;
      for (int i = 0; i < 16; i++) k[127 - 8*i -: 8] = next_byte();
      return k;
    endfunction
  endclass

  // -------------------------------------------------------------- wavelet
  localparam int CA = -406, CB = -14, CC = 226, CD = -114, CK = 294, CKI = 223;

  function automatic int rmul(int coef, int v);
    return (coef * v + 128) >>> 8;
  endfunction

  function automatic int mirror(int i, int n);
    if (i < 0) return -i;
    if (i >= n) return 2*(n-1) - i;
    return i;
  endfunction

  // forward: natural order in, subband order out (low half first)
  function automatic void fwd_1d(ref int v [], input int n);
    int x [] = new[n];
    for (int i = 0; i < n; i++) x[i] = v[i];
    for (int i = 1; i < n; i += 2) x[i] += rmul(CA, x[i-1] + x[mirror(i+1, n)]);
    for (int i = 0; i < n; i += 2) x[i] += rmul(CB, x[mirror(i-1, n)] + x[i+1]);
    for (int i = 1; i < n; i += 2) x[i] += rmul(CC, x[i-1] + x[mirror(i+1, n)]);
    for (int i = 0; i < n; i += 2) x[i] += rmul(CD, x[mirror(i-1, n)] + x[i+1]);
    for (int i = 0; i < n/2; i++) begin
      v[i]       = rmul(CKI, x[2*i]);
      v[n/2 + i] = rmul(CK,  x[2*i+1]);
    end
  endfunction

  function automatic void inv_1d(ref int v [], input int n);
    int x [] = new[n];
    for (int i = 0; i < n/2; i++) begin
      x[2*i]   = rmul(CK,  v[i]);
      x[2*i+1] = rmul(CKI, v[n/2 + i]);
    end
    for (int i = 0; i < n; i += 2) x[i] -= rmul(CD, x[mirror(i-1, n)] + x[i+1]);
    for (int i = 1; i < n; i += 2) x[i] -= rmul(CC, x[i-1] + x[mirror(i+1, n)]);
    for (int i = 0; i < n; i += 2) x[i] -= rmul(CB, x[mirror(i-1, n)] + x[i+1]);
    for (int i = 1; i < n; i += 2) x[i] -= rmul(CA, x[i-1] + x[mirror(i+1, n)]);
    for (int i = 0; i < n; i++) v[i] = x[i];
  endfunction

  // 2D on a row-major n*n image: forward = columns then rows
  function automatic void fwd_2d(ref int img [], input int n);
    int l [] = new[n];
    for (int c = 0; c < n; c++) begin
      for (int r = 0; r < n; r++) l[r] = img[r*n + c];
      fwd_1d(l, n);
      for (int r = 0; r < n; r++) img[r*n + c] = l[r];
    end
    for (int r = 0; r < n; r++) begin
      for (int c = 0; c < n; c++) l[c] = img[r*n + c];
      fwd_1d(l, n);
      for (int c = 0; c < n; c++) img[r*n + c] = l[c];
    end
  endfunction

  // inverse = rows then columns, result clamped to 0..255
  function automatic void inv_2d(ref int img [], input int n);
    int l [] = new[n];
    for (int r = 0; r < n; r++) begin
      for (int c = 0; c < n; c++) l[c] = img[r*n + c];
      inv_1d(l, n);
      for (int c = 0; c < n; c++) img[r*n + c] = l[c];
    end
    for (int c = 0; c < n; c++) begin
      for (int r = 0; r < n; r++) l[r] = img[r*n + c];
      inv_1d(l, n);
      for (int r = 0; r < n; r++) img[r*n + c] = l[r];
    end
    for (int i = 0; i < n*n; i++) img[i] = img[i] < 0 ? 0 : (img[i] > 255 ? 255 : img[i]);
  endfunction

  // smooth test image with some texture, 8-bit
  function automatic int test_pixel(int r, int c, int n, int seed);
    int v = 128 + ((r * 96) / n) - ((c * 64) / n) + (((r ^ c ^ seed) & 15) - 8);
    if (((r / 8) + (c / 8)) % 2 == 0) v += 20;
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

endpackage
