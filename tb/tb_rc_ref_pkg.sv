// tb_rc_ref_pkg: untimed reference models of RC5 and RC6 for the testbenches.
//
// Everything works on 64-bit containers with the word size w passed at run
// time, and is written straight from the cipher definitions (key expansion,
// RC5 and RC6 encryption and decryption), independently of the RTL's
// cycle-by-cycle structure. The models are themselves anchored to published
// known-answer vectors in the testbenches.
package tb_rc_ref_pkg;

  typedef longint unsigned word_t;
  typedef word_t  words_t[];
  typedef byte unsigned bytes_t[];

  function automatic word_t wmask(int w);
    return (w == 64) ? '1 : ((64'd1 << w) - 1);
  endfunction

  function automatic word_t rotl(word_t x, word_t n, int w);
    int s;
    s = int'(n % word_t'(w));
    x = x & wmask(w);
    if (s == 0) return x;
    return ((x << s) | (x >> (w - s))) & wmask(w);
  endfunction

  function automatic word_t rotr(word_t x, word_t n, int w);
    int s;
    s = int'(n % word_t'(w));
    return rotl(x, word_t'((w - s) % w), w);
  endfunction

  function automatic int lg(int w);
    int k;
    k = 0;
    while ((1 << k) < w) k++;
    return k;
  endfunction

  // Magic constants from their definition (nearest odd integer).
  function automatic word_t pw(int w);
    case (w)
      16: return 64'hB7E1;
      32: return 64'hB7E15163;
      default: return 64'hB7E151628AED2A6B;
    endcase
  endfunction

  function automatic word_t qw(int w);
    case (w)
      16: return 64'h9E37;
      32: return 64'h9E3779B9;
      default: return 64'h9E3779B97F4A7C15;
    endcase
  endfunction

  // Key expansion into t round keys from the key bytes k.
  function automatic words_t key_expand(int w, int t, bytes_t k);
    words_t s, l;
    int u, c, n, i, j;
    word_t a, b;
    u = w / 8;
    c = (k.size() == 0) ? 1 : (k.size() + u - 1) / u;
    s = new[t];
    l = new[c];
    foreach (l[x]) l[x] = 0;
    for (int x = k.size() - 1; x >= 0; x--)
      l[x / u] = ((l[x / u] << 8) + k[x]) & wmask(w);
    s[0] = pw(w);
    for (int x = 1; x < t; x++) s[x] = (s[x-1] + qw(w)) & wmask(w);
    a = 0; b = 0; i = 0; j = 0;
    n = 3 * ((t > c) ? t : c);
    for (int x = 0; x < n; x++) begin
      a = rotl((s[i] + a + b) & wmask(w), 3, w);
      s[i] = a;
      b = rotl((l[j] + a + b) & wmask(w), (a + b) & wmask(w), w);
      l[j] = b;
      i = (i + 1) % t;
      j = (j + 1) % c;
    end
    return s;
  endfunction

  function automatic void rc5_enc(int w, int r, words_t s, inout word_t a, inout word_t b);
    a = (a + s[0]) & wmask(w);
    b = (b + s[1]) & wmask(w);
    for (int i = 1; i <= r; i++) begin
      a = (rotl(a ^ b, b, w) + s[2*i]) & wmask(w);
      b = (rotl(b ^ a, a, w) + s[2*i+1]) & wmask(w);
    end
  endfunction

  function automatic void rc5_dec(int w, int r, words_t s, inout word_t a, inout word_t b);
    for (int i = r; i >= 1; i--) begin
      b = rotr((b - s[2*i+1]) & wmask(w), a, w) ^ a;
      a = rotr((a - s[2*i]) & wmask(w), b, w) ^ b;
    end
    b = (b - s[1]) & wmask(w);
    a = (a - s[0]) & wmask(w);
  endfunction

  function automatic word_t rc6_f(int w, word_t x);
    return rotl((x * ((2 * x + 1) & wmask(w))) & wmask(w), lg(w), w);
  endfunction

  function automatic void rc6_enc(int w, int r, words_t s, inout word_t a, inout word_t b,
                                  inout word_t c, inout word_t d);
    word_t t, u, tmp;
    b = (b + s[0]) & wmask(w);
    d = (d + s[1]) & wmask(w);
    for (int i = 1; i <= r; i++) begin
      t = rc6_f(w, b);
      u = rc6_f(w, d);
      a = (rotl(a ^ t, u, w) + s[2*i]) & wmask(w);
      c = (rotl(c ^ u, t, w) + s[2*i+1]) & wmask(w);
      tmp = a; a = b; b = c; c = d; d = tmp;
    end
    a = (a + s[2*r+2]) & wmask(w);
    c = (c + s[2*r+3]) & wmask(w);
  endfunction

  function automatic void rc6_dec(int w, int r, words_t s, inout word_t a, inout word_t b,
                                  inout word_t c, inout word_t d);
    word_t t, u, tmp;
    c = (c - s[2*r+3]) & wmask(w);
    a = (a - s[2*r+2]) & wmask(w);
    for (int i = r; i >= 1; i--) begin
      tmp = d; d = c; c = b; b = a; a = tmp;
      u = rc6_f(w, d);
      t = rc6_f(w, b);
      c = rotr((c - s[2*i+1]) & wmask(w), t, w) ^ u;
      a = rotr((a - s[2*i]) & wmask(w), u, w) ^ t;
    end
    d = (d - s[1]) & wmask(w);
    b = (b - s[0]) & wmask(w);
  endfunction

  // Little-endian word from four bytes as printed in test-vector listings.
  function automatic word_t le32(logic [31:0] printed);
    return {32'd0, printed[7:0], printed[15:8], printed[23:16], printed[31:24]};
  endfunction

endpackage
