// lzw_state_machine: the control half of the LZW compressor.
//
// It holds the current string (the longest prefix of the input seen so far
// that the dictionary knows) and that string's code. Each cycle with enable
// high it takes one byte from data_in:
//   * with no string held, the byte becomes the string and its code is the
//     byte value itself;
//   * otherwise the string extended by the byte is searched in the dictionary
//     (dic_enable). On a hit the extended string and the dictionary's code
//     become current. On a miss the code of the current string is emitted, the
//     dictionary adds the extended string by itself, and the byte starts a new
//     string. A string already MAX_LEN bytes long is not searched: its code is
//     emitted and the byte starts a new string, nothing is added.
// After PAGE_BYTES bytes the machine spends one cycle in FLUSH: it emits the
// code of the last string together with done_out and clears the dictionary
// (dic_flush). A byte offered in that cycle is already the first byte of the
// next page, so the input never has to wait: one byte per clock, and one page
// takes PAGE_BYTES + 1 cycles.
//
// data_out is registered; it is valid in the cycle data_ready_out is high and
// holds its value until the next code. done_out is high with the last code of
// a page. carry is high while a string is held whose code has not yet been
// emitted. Reset is synchronous and active high.
//
// The one byte per cycle, 9-bit output latched by a ready signal, done signal,
// the 264-byte page and the signal names follow the published design; the
// meaning of carry, the FLUSH cycle that also accepts a byte and the limit of
// four bytes per string are this design's own choices.
module lzw_state_machine
  import hadcwsn_pkg::*;
#(
  parameter int unsigned PAGE_BYTES = 264   // bytes between dictionary resets
) (
  input  logic             clk,
  input  logic             rst,            // RESET
  input  logic             enable,         // data_in holds a byte (ENABLE)
  input  byte_t            data_in,        // DATA_IN[7:0]
  output code_t            data_out,       // DATA_OUT[8:0]
  output logic             data_ready_out, // DATA_READY_OUT
  output logic             done_out,       // DONE_OUT
  output logic             carry,          // CARRY: a string is pending
  // dictionary side
  output logic             dic_reset,      // RESET to the dictionary
  output logic             dic_enable,     // ENABLE: search / insert
  output logic             dic_flush,      // FLUSH
  output logic [STR_W-1:0] dic_string,     // STRING_IN[31:0]
  output logic [LEN_W-1:0] dic_len,
  input  logic             dic_encoded,    // ENCODED: search hit
  input  code_t            dic_code,       // DIC_ENCODED[8:0]
  input  logic             dic_full        // FULL_ENCODE (not needed here)
);

  localparam int unsigned CNT_W = $clog2(PAGE_BYTES + 1);

  initial begin
    assert (PAGE_BYTES >= 2) else $fatal(1, "PAGE_BYTES must be at least 2");
  end

  typedef enum logic [1:0] {S_EMPTY, S_HOLD, S_FLUSH} state_t;

  state_t           state, state_n;
  lzw_string_t      cur, cur_n, cand;
  code_t            cur_code, cur_code_n;
  logic [CNT_W-1:0] count, count_n;     // bytes taken in this page
  logic             emit;
  logic             can_grow;

  assign cand       = str_append(cur, data_in);
  assign can_grow   = (state == S_HOLD) && (cur.len < LEN_W'(MAX_LEN));
  assign dic_reset  = rst;
  assign dic_enable = enable && can_grow;
  assign dic_flush  = (state == S_FLUSH);
  assign dic_string = cand.data;
  assign dic_len    = cand.len;
  assign carry      = (state != S_EMPTY);

  always_comb begin
    state_n    = state;
    cur_n      = cur;
    cur_code_n = cur_code;
    count_n    = count;
    emit       = 1'b0;
    unique case (state)
      S_EMPTY: begin
        if (enable) begin
          cur_n      = str_single(data_in);
          cur_code_n = code_t'(data_in);
          count_n    = CNT_W'(1);
          state_n    = S_HOLD;
        end
      end
      S_HOLD: begin
        if (enable) begin
          if (can_grow && dic_encoded) begin
            cur_n      = cand;
            cur_code_n = dic_code;
          end else begin
            emit       = 1'b1;
            cur_n      = str_single(data_in);
            cur_code_n = code_t'(data_in);
          end
          count_n = count + CNT_W'(1);
          if (count_n == CNT_W'(PAGE_BYTES)) state_n = S_FLUSH;
        end
      end
      S_FLUSH: begin
        emit = 1'b1;
        if (enable) begin
          cur_n      = str_single(data_in);
          cur_code_n = code_t'(data_in);
          count_n    = CNT_W'(1);
          state_n    = S_HOLD;
        end else begin
          count_n    = '0;
          state_n    = S_EMPTY;
        end
      end
      default: state_n = S_EMPTY;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state          <= S_EMPTY;
      cur            <= '0;
      cur_code       <= '0;
      count          <= '0;
      data_out       <= '0;
      data_ready_out <= 1'b0;
      done_out       <= 1'b0;
    end else begin
      state          <= state_n;
      cur            <= cur_n;
      cur_code       <= cur_code_n;
      count          <= count_n;
      data_ready_out <= emit;
      done_out       <= (state == S_FLUSH);
      if (emit) data_out <= cur_code;
    end
  end

  // dic_full only tells the dictionary's own state; a full table simply
  // answers every new string with a miss, which is handled above.
  logic unused_full;
  assign unused_full = dic_full;

endmodule
