// md5_pkg: types, constants and per-round functions of the MD5 compression
// function, shared by the padding unit and the hashing pipeline stages.
//
// One 512-bit message block is processed in 64 rounds. Each round combines
// the state words B, C, D with one of four bitwise functions (rounds 0-15,
// 16-31, 32-47 and 48-63), adds A, a round constant K and one message word,
// rotates the sum left and adds B to give the new B; the other words move
// along (A <- D, C <- B, D <- C). After round 63 the initial state is added
// and the digest is read out little-endian from A, B, C, D.
//
// The four functions are the ones the design's description gives. The round
// constants, rotation amounts, message-word order and the initial state are
// those of the MD5 standard (RFC 1321), which the description relies on
// without listing: K[i] = floor(|sin(i + 1)| * 2^32), i = 0..63.
package md5_pkg;

  typedef logic [31:0] word_t;

  // A 512-bit message block as sixteen 32-bit words, word 0 in bits 31:0.
  typedef logic [15:0][31:0] block_t;

  // Chaining state of the compression function.
  typedef struct packed {
    word_t a;
    word_t b;
    word_t c;
    word_t d;
  } state_t;

  // Initial state (RFC 1321).
  localparam state_t MD5_IV = '{a: 32'h67452301, b: 32'hefcdab89,
                                c: 32'h98badcfe, d: 32'h10325476};

  // K[i] = floor(|sin(i + 1)| * 2^32), entry i in element i.
  localparam word_t K_TABLE [64] = '{
    32'hd76aa478, 32'he8c7b756, 32'h242070db, 32'hc1bdceee,
    32'hf57c0faf, 32'h4787c62a, 32'ha8304613, 32'hfd469501,
    32'h698098d8, 32'h8b44f7af, 32'hffff5bb1, 32'h895cd7be,
    32'h6b901122, 32'hfd987193, 32'ha679438e, 32'h49b40821,
    32'hf61e2562, 32'hc040b340, 32'h265e5a51, 32'he9b6c7aa,
    32'hd62f105d, 32'h02441453, 32'hd8a1e681, 32'he7d3fbc8,
    32'h21e1cde6, 32'hc33707d6, 32'hf4d50d87, 32'h455a14ed,
    32'ha9e3e905, 32'hfcefa3f8, 32'h676f02d9, 32'h8d2a4c8a,
    32'hfffa3942, 32'h8771f681, 32'h6d9d6122, 32'hfde5380c,
    32'ha4beea44, 32'h4bdecfa9, 32'hf6bb4b60, 32'hbebfbc70,
    32'h289b7ec6, 32'heaa127fa, 32'hd4ef3085, 32'h04881d05,
    32'hd9d4d039, 32'he6db99e5, 32'h1fa27cf8, 32'hc4ac5665,
    32'hf4292244, 32'h432aff97, 32'hab9423a7, 32'hfc93a039,
    32'h655b59c3, 32'h8f0ccc92, 32'hffeff47d, 32'h85845dd1,
    32'h6fa87e4f, 32'hfe2ce6e0, 32'ha3014314, 32'h4e0811a1,
    32'hf7537e82, 32'hbd3af235, 32'h2ad7d2bb, 32'heb86d391
  };

  // Left-rotation amount of round r: four amounts per group of 16 rounds.
  function automatic int unsigned shift_amount(int unsigned r);
    int unsigned s [4][4] = '{'{7, 12, 17, 22}, '{5, 9, 14, 20},
                             '{4, 11, 16, 23}, '{6, 10, 15, 21}};
    return s[(r / 16) % 4][r % 4];
  endfunction

  // Index of the message word used in round r.
  function automatic int unsigned msg_index(int unsigned r);
    case (r / 16)
      0:       return r % 16;
      1:       return (5 * r + 1) % 16;
      2:       return (3 * r + 5) % 16;
      default: return (7 * r) % 16;
    endcase
  endfunction

  // The combinatorial function of round r, equations (1)-(4).
  function automatic word_t round_fn(int unsigned r, word_t b, word_t c, word_t d);
    case (r / 16)
      0:       return (b & c) | (~b & d);
      1:       return (b & d) | (c & ~d);
      2:       return b ^ c ^ d;
      default: return c ^ (b | ~d);
    endcase
  endfunction

  function automatic word_t rotl(word_t x, int unsigned s);
    return (x << s) | (x >> (32 - s));
  endfunction

  // Swap the four bytes of a word (little-endian read-out of the digest).
  function automatic word_t bswap(word_t x);
    return {x[7:0], x[15:8], x[23:16], x[31:24]};
  endfunction

  // 128-bit digest in printed order: the first digest byte in bits 127:120.
  function automatic logic [127:0] digest_of(state_t s);
    return {bswap(s.a + MD5_IV.a), bswap(s.b + MD5_IV.b),
            bswap(s.c + MD5_IV.c), bswap(s.d + MD5_IV.d)};
  endfunction

endpackage
