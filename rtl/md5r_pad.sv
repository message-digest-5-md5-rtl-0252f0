// md5r_pad: padding unit of a solver worker. Turns a candidate string of 1
// to 8 characters into the single padded 512-bit MD5 message block that
// holds it, as sixteen 32-bit words.
//
// MD5 padding appends a 1 bit (byte 0x80) after the message, zeros up to
// 448 bits and the message length in bits as a 64-bit little-endian number
// in the last 64 bits. A string of at most 8 characters always fits one
// block, so only words 0-2 (characters and the 0x80 byte) and word 14 (the
// bit length, 8 to 64) are ever non-zero.
//
// Interface: wordin holds character k in bits 8k+7:8k, wordlen holds the
// length - 1. One string is accepted every clock; the block, the string and
// its valid flag come out one clock later, registered, so that the string
// stays aligned with its block as it enters hashing stage 0.
// The padding rule and the 64-bit to 16 x 32-bit shape follow the design
// description; the length - 1 encoding of wordlen and registering the string
// with the block are this design's choices. valid is
// cleared by the synchronous reset; the data registers need no reset.
module md5r_pad
  import md5_pkg::*;
  import md5r_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     valid_in,
  input  word64_t  wordin,
  input  wordlen_t wordlen,
  output logic     valid_out,
  output block_t   m,
  output word64_t  word_out,
  output wordlen_t wordlen_out
);

  block_t      m_next;
  logic [3:0]  len;      // string length, 1..8
  logic [95:0] bytes;    // message bytes 0..11

  assign len = {1'b0, wordlen} + 4'd1;

  always_comb begin
    for (int k = 0; k < 12; k++) begin
      if (4'(k) < len)       bytes[8*k +: 8] = (k < 8) ? wordin[8*(k % 8) +: 8] : 8'h00;
      else if (4'(k) == len) bytes[8*k +: 8] = 8'h80;
      else                   bytes[8*k +: 8] = 8'h00;
    end
    m_next     = '0;
    m_next[0]  = bytes[31:0];
    m_next[1]  = bytes[63:32];
    m_next[2]  = bytes[95:64];
    m_next[14] = word_t'({len, 3'b000});
  end

  always_ff @(posedge clk) begin
    if (rst) valid_out <= 1'b0;
    else     valid_out <= valid_in;
    m           <= m_next;
    word_out    <= wordin;
    wordlen_out <= wordlen;
  end

endmodule
