// lzw_dictionary: the string table of the LZW compressor, a content-
// addressable memory with search-or-insert.
//
// Each entry holds a string of two to four bytes. The state machine presents
// the candidate string (current string plus the new byte) on string_in with
// enable high. The search is combinational: if an entry holds the same string,
// encoded is high in that same cycle and dic_encoded carries its code
// (FIRST_CODE + entry index, so 256, 257, ... in order of insertion). If no
// entry matches, encoded is low and the string is written as the next entry at
// the clock edge, unless the table is full (full_encode high), in which case
// nothing is added and the table keeps its contents until the next flush.
// flush (or reset) empties the table at the clock edge; a search in a flush
// cycle inserts nothing. Entries at or above the fill count are never matched,
// so the storage array itself needs no reset.
//
// The search-or-insert behaviour, the codes from 256 upward, the 256-entry
// default (44 on the small CPLD build) and the clearing on flush follow the
// published design. Storing whole strings of up to four bytes (the 32-bit
// STRING_IN), the separate length port, the one-cycle combinational search and
// the meaning of FULL_ENCODE as "table full" are this design's own reading.
module lzw_dictionary
  import hadcwsn_pkg::*;
#(
  parameter int unsigned ENTRIES = 256   // new entries; codes 256..256+ENTRIES-1
) (
  input  logic             clk,
  input  logic             rst,          // synchronous, active high (RESET)
  input  logic             enable,       // search string_in, insert on a miss (ENABLE)
  input  logic             flush,        // empty the table (FLUSH)
  input  logic [STR_W-1:0] string_in,    // candidate string, newest byte low (STRING_IN)
  input  logic [LEN_W-1:0] string_len,   // its length, 2..MAX_LEN
  output logic             encoded,      // string_in found (ENCODED)
  output code_t            dic_encoded,  // code of the match (DIC_ENCODED)
  output logic             full_encode   // no free entry left (FULL_ENCODE)
);

  localparam int unsigned IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;
  localparam int unsigned CNT_W = $clog2(ENTRIES + 1);

  initial begin
    assert (ENTRIES >= 1 && ENTRIES <= (1 << CODE_W) - FIRST_CODE)
      else $fatal(1, "ENTRIES must be 1..%0d to fit %0d-bit codes",
                  (1 << CODE_W) - FIRST_CODE, CODE_W);
  end

  lzw_string_t      entry [ENTRIES];
  logic [CNT_W-1:0] fill;               // entries in use

  lzw_string_t      key;
  logic [IDX_W-1:0] hit_idx;

  assign key         = '{len: string_len, data: string_in};
  assign full_encode = (fill == CNT_W'(ENTRIES));

  // Entries are unique (a string is only added after it missed), so at most
  // one entry matches; the loop simply reports the lowest one.
  always_comb begin
    encoded = 1'b0;
    hit_idx = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (!encoded && (CNT_W'(i) < fill) && (entry[i] == key)) begin
        encoded = 1'b1;
        hit_idx = IDX_W'(i);
      end
    end
  end

  assign dic_encoded = code_t'(FIRST_CODE) + code_t'(hit_idx);

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      fill <= '0;
    end else if (enable && !encoded && !full_encode) begin
      entry[fill[IDX_W-1:0]] <= key;
      fill                   <= fill + CNT_W'(1);
    end
  end

  // A search only ever asks for strings the table can hold.
  always_ff @(posedge clk) begin
    if (!rst && enable)
      assert (string_len >= LEN_W'(2) && string_len <= LEN_W'(MAX_LEN))
        else $error("lzw_dictionary: search with string length %0d", string_len);
  end

endmodule
