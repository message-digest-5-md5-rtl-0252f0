// md5_ref_pkg: reference model for the testbenches. A plain sequential MD5
// of a byte string (any length, several blocks) written from the standard
// (RFC 1321) independently of the RTL: the round constants are computed
// from the sine function at run time, rounds use the four functions in
// their textbook form. Also: the position of a string in the device's search
// order and helpers to pack strings the way the RTL carries them.
package md5_ref_pkg;

  function automatic logic [31:0] rl(logic [31:0] x, int n);
    return (x << n) | (x >> (32 - n));
  endfunction

  // MD5 digest of s; the first digest byte in bits 127:120.
  function automatic logic [127:0] md5(string s);
    byte unsigned msg[$];
    logic [31:0] kk [64];
    int          rr [64];
    int          sh [16] = '{7, 12, 17, 22, 5, 9, 14, 20, 4, 11, 16, 23, 6, 10, 15, 21};
    logic [31:0] h0 = 32'h67452301, h1 = 32'hefcdab89, h2 = 32'h98badcfe, h3 = 32'h10325476;
    logic [63:0] bitlen;
    logic [127:0] dig;
    for (int i = 0; i < 64; i++) begin
      real v = $sin(real'(i + 1));
      if (v < 0) v = -v;
      kk[i] = 32'(longint'($floor(v * 4294967296.0)));
      rr[i] = sh[(i / 16) * 4 + (i % 4)];
    end
    for (int i = 0; i < s.len(); i++) msg.push_back(s[i]);
    bitlen = 64'(s.len()) * 8;
    msg.push_back(8'h80);
    while ((msg.size() % 64) != 56) msg.push_back(8'h00);
    for (int i = 0; i < 8; i++) msg.push_back(bitlen[8*i +: 8]);
    for (int blk = 0; blk < msg.size() / 64; blk++) begin
      logic [31:0] w [16];
      logic [31:0] a = h0, b = h1, c = h2, d = h3, f, t;
      int g;
      for (int j = 0; j < 16; j++)
        w[j] = {msg[blk*64 + 4*j + 3], msg[blk*64 + 4*j + 2], msg[blk*64 + 4*j + 1], msg[blk*64 + 4*j]};
      for (int i = 0; i < 64; i++) begin
        if (i < 16)      begin f = (b & c) | ((~b) & d); g = i;               end
        else if (i < 32) begin f = (d & b) | ((~d) & c); g = (5*i + 1) % 16;  end
        else if (i < 48) begin f = b ^ c ^ d;            g = (3*i + 5) % 16;  end
        else             begin f = c ^ (b | (~d));       g = (7*i) % 16;      end
        t = d; d = c; c = b;
        b = b + rl(a + f + kk[i] + w[g], rr[i]);
        a = t;
      end
      h0 += a; h1 += b; h2 += c; h3 += d;
    end
    dig = {h3, h2, h1, h0};   // h0 low byte first when read as bytes
    for (int i = 0; i < 16; i++) md5[127 - 8*i -: 8] = dig[8*i +: 8];
  endfunction

  // Position (1-based) of s in the search order: shortest first, 95
  // printable characters 32..126, last character fastest.
  function automatic longint unsigned rank(string s);
    longint unsigned n = 0, p = 1, v = 0;
    for (int l = 1; l < s.len(); l++) begin p *= 95; n += p; end
    for (int i = 0; i < s.len(); i++) v = v * 95 + longint'(s[i]) - 32;
    return n + v + 1;
  endfunction

  // String packed as the RTL carries it: character k in bits 8k+7:8k.
  function automatic logic [63:0] pack(string s);
    pack = '0;
    for (int i = 0; i < s.len() && i < 8; i++) pack[8*i +: 8] = s[i];
  endfunction

  function automatic string unpack(logic [63:0] w);
    string s = "";
    for (int i = 0; i < 8; i++) if (w[8*i +: 8] != 0) s = {s, string'(w[8*i +: 8])};
    return s;
  endfunction

  // A random printable string of 1..maxlen characters.
  function automatic string rand_string(int maxlen);
    string s = "";
    int l = 1 + int'($urandom_range(maxlen - 1));
    for (int i = 0; i < l; i++) s = {s, string'(8'(32 + $urandom_range(94)))};
    return s;
  endfunction

endpackage
