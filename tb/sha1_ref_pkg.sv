// Reference model for the testbenches: SHA-1, HMAC-SHA1 and PBKDF2 written
// directly from their standard definitions over byte queues, sharing no code
// with the RTL. Used to compute expected digests and PMKs.
package sha1_ref_pkg;

  typedef byte unsigned bq_t[$];

  function automatic logic [31:0] rl(input logic [31:0] x, input int n);
    return (x << n) | (x >> (32 - n));
  endfunction

  // One compression of a 512-bit block (first byte in bits [511:504]).
  function automatic logic [159:0] compress(input logic [159:0] h, input logic [511:0] blk);
    logic [31:0] w [80];
    logic [31:0] a, b, c, d, e, f, k, tmp;
    for (int t = 0; t < 16; t++) w[t] = blk[511 - 32*t -: 32];
    for (int t = 16; t < 80; t++) w[t] = rl(w[t-3] ^ w[t-8] ^ w[t-14] ^ w[t-16], 1);
    {a, b, c, d, e} = h;
    for (int t = 0; t < 80; t++) begin
      case (t / 20)
        0: begin f = (b & c) | (~b & d);          k = 32'h5A827999; end
        1: begin f = b ^ c ^ d;                   k = 32'h6ED9EBA1; end
        2: begin f = (b & c) | (b & d) | (c & d); k = 32'h8F1BBCDC; end
        default: begin f = b ^ c ^ d;             k = 32'hCA62C1D6; end
      endcase
      tmp = rl(a, 5) + f + e + k + w[t];
      e = d; d = c; c = rl(b, 30); b = a; a = tmp;
    end
    return {h[159:128] + a, h[127:96] + b, h[95:64] + c, h[63:32] + d, h[31:0] + e};
  endfunction

  function automatic logic [159:0] sha1(input bq_t msg);
    bq_t m;
    logic [159:0] h;
    logic [511:0] blk;
    longint unsigned bits;
    m = msg;
    bits = 64'(msg.size()) * 8;
    m.push_back(8'h80);
    while ((m.size() % 64) != 56) m.push_back(8'h00);
    for (int i = 7; i >= 0; i--) m.push_back(bits[8*i +: 8]);
    h = {32'h67452301, 32'hEFCDAB89, 32'h98BADCFE, 32'h10325476, 32'hC3D2E1F0};
    for (int off = 0; off < m.size(); off += 64) begin
      for (int i = 0; i < 64; i++) blk[511 - 8*i -: 8] = m[off + i];
      h = compress(h, blk);
    end
    return h;
  endfunction

  function automatic bq_t str2q(input string s);
    bq_t q;
    for (int i = 0; i < s.len(); i++) q.push_back(s[i]);
    return q;
  endfunction

  // Key is at most 64 bytes, so it is used zero-padded to the block size.
  function automatic logic [159:0] hmac(input bq_t key, input bq_t msg);
    bq_t ik, ok;
    logic [159:0] ih;
    for (int i = 0; i < 64; i++) begin
      byte unsigned kb;
      kb = (i < key.size()) ? key[i] : 8'h00;
      ik.push_back(kb ^ 8'h36);
      ok.push_back(kb ^ 8'h5c);
    end
    ik = {ik, msg};
    ih = sha1(ik);
    for (int i = 19; i >= 0; i--) ok.push_back(ih[8*i +: 8]);
    return sha1(ok);
  endfunction

  function automatic bq_t h2q(input logic [159:0] h);
    bq_t q;
    for (int i = 19; i >= 0; i--) q.push_back(h[8*i +: 8]);
    return q;
  endfunction

  function automatic logic [255:0] pbkdf2(input bq_t pass, input bq_t ssid,
                                          input int iter, input int ctr_bytes);
    logic [159:0] t [2];
    for (int blk = 1; blk <= 2; blk++) begin
      bq_t s;
      logic [159:0] u;
      s = ssid;
      for (int i = ctr_bytes - 1; i >= 0; i--) s.push_back((blk >> (8*i)) & 8'hff);
      u = hmac(pass, s);
      t[blk-1] = u;
      for (int j = 1; j < iter; j++) begin
        u = hmac(pass, h2q(u));
        t[blk-1] ^= u;
      end
    end
    return {t[0], t[1][159:64]};
  endfunction

  // Left-aligned vector forms used by the RTL ports.
  function automatic logic [511:0] q2key(input bq_t q);
    logic [511:0] v = '0;
    for (int i = 0; i < q.size() && i < 64; i++) v[511 - 8*i -: 8] = q[i];
    return v;
  endfunction

  function automatic logic [255:0] q2ssid(input bq_t q);
    logic [255:0] v = '0;
    for (int i = 0; i < q.size() && i < 32; i++) v[255 - 8*i -: 8] = q[i];
    return v;
  endfunction

  // Random printable string of length lo..hi.
  function automatic bq_t rand_str(input int lo, input int hi);
    bq_t q;
    int n;
    n = lo + int'($urandom_range(hi - lo));
    for (int i = 0; i < n; i++) q.push_back(8'(32 + $urandom_range(94)));
    return q;
  endfunction

endpackage
