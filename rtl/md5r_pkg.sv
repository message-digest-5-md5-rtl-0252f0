// md5r_pkg: constants and types of the hash reversal device that sit above
// the MD5 algorithm itself: the brute-force character set, the candidate
// string format, the serial command codes and the string incrementer.
//
// A candidate string holds 1 to MAX_CHARS printable ASCII characters
// (codes 32 ' ' to 126 '~'). Character k of the string sits in bits
// 8k+7:8k of a 64-bit word, so the first character is in the low byte, the
// order in which MD5 reads message bytes; unused bytes are zero. The length
// is carried as a 3-bit field holding length - 1.
//
// Strings are searched shortest first and, within one length, as an odometer
// over the character set whose last character changes fastest, so the first
// string found for a hash is the shortest and lowest one that produces it.
package md5r_pkg;

  localparam int unsigned MAX_CHARS = 8;
  localparam logic [7:0]  CHAR_FIRST = 8'd32;   // ' '
  localparam logic [7:0]  CHAR_LAST  = 8'd126;  // '~'

  typedef logic [63:0] word64_t;
  typedef logic [2:0]  wordlen_t;  // string length - 1

  // 8-bit codes exchanged with the PC.
  typedef enum logic [7:0] {
    CMD_HASH_IN     = 8'h01,  // PC: the next 16 bytes are the hash to reverse
    CMD_REQ_COUNT   = 8'h02,  // PC: send the number of combinations tried
    RSP_COUNT       = 8'h03,  // device: the next 16 bytes are that number
    RSP_SOLVED      = 8'h06,  // device: solved, the next 16 bytes are the string
    RSP_NOT_SOLVED  = 8'h07,  // device: not solved yet
    CMD_REQ_STATUS  = 8'h08,  // PC: send the solved status
    CMD_REQ_HASH    = 8'h0A   // PC: send back the stored hash
  } code_e;

  // A candidate string and whether it exists (false past the last string).
  typedef struct packed {
    logic     ok;
    wordlen_t len;
    word64_t  chars;
  } cand_t;

  // The string after s in search order: the last character is incremented
  // with carry towards the first; a carry out of the first character makes
  // the string one character longer, all spaces. Past max_len '~' (max_len
  // at most MAX_CHARS) the result has ok = 0.
  function automatic cand_t next_string(cand_t s, int unsigned max_len);
    cand_t n = s;
    logic carry = 1'b1;
    for (int k = MAX_CHARS - 1; k >= 0; k--) begin
      if (carry && (k <= int'(s.len))) begin
        if (s.chars[8*k +: 8] == CHAR_LAST) begin
          n.chars[8*k +: 8] = CHAR_FIRST;
        end else begin
          n.chars[8*k +: 8] = s.chars[8*k +: 8] + 8'd1;
          carry = 1'b0;
        end
      end
    end
    if (carry) begin
      if (int'(s.len) + 1 >= int'(max_len)) begin
        n.ok = 1'b0;
      end else begin
        n.len = s.len + wordlen_t'(1);
        n.chars[8*(int'(s.len) + 1) +: 8] = CHAR_FIRST;
      end
    end
    if (!s.ok) n.ok = 1'b0;
    return n;
  endfunction

  // The first string of the search: a single space.
  localparam cand_t FIRST_STRING = '{ok: 1'b1, len: '0, chars: 64'(CHAR_FIRST)};

endpackage
