// hadcwsn_pkg: types and constants shared by the LZW compressor blocks.
//
// The compressor turns a stream of 8-bit words into 9-bit LZW codes. Codes
// 0..255 stand for the single byte of the same value; codes 256..511 name
// dictionary entries, numbered in the order they were added. The 8-bit input
// and 9-bit output widths, the 256 new entries and the 264-byte page are the
// published design's numbers. The dictionary works on strings of at most four
// bytes held in one 32-bit word (the width of the STRING_IN bus between the
// state machine and the dictionary); the length field beside it is this
// design's own addition, needed to tell "\x00a" from "a".
package hadcwsn_pkg;

  localparam int unsigned BYTE_W     = 8;
  localparam int unsigned CODE_W     = 9;
  localparam int unsigned MAX_LEN    = 4;                 // bytes per string
  localparam int unsigned STR_W      = MAX_LEN * BYTE_W;  // 32-bit STRING_IN
  localparam int unsigned LEN_W      = 3;                 // holds 0..4
  localparam int unsigned FIRST_CODE = 1 << BYTE_W;       // first entry code, 256

  typedef logic [BYTE_W-1:0] byte_t;
  typedef logic [CODE_W-1:0] code_t;

  // A string of up to MAX_LEN bytes. The newest byte sits in bits [7:0]; older
  // bytes move up by one byte per append. Bytes above len are zero.
  typedef struct packed {
    logic [LEN_W-1:0] len;
    logic [STR_W-1:0] data;
  } lzw_string_t;

  // Appends byte b to string s. Only meaningful while s.len < MAX_LEN.
  function automatic lzw_string_t str_append(lzw_string_t s, byte_t b);
    lzw_string_t r;
    r.len  = s.len + LEN_W'(1);
    r.data = {s.data[STR_W-BYTE_W-1:0], b};
    return r;
  endfunction

  // The one-byte string holding b.
  function automatic lzw_string_t str_single(byte_t b);
    lzw_string_t r;
    r.len  = LEN_W'(1);
    r.data = STR_W'(b);
    return r;
  endfunction

endpackage
