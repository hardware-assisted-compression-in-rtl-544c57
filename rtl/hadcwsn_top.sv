// hadcwsn_top: hardware LZW compressor for sensor-network data pages.
//
// A sensor node hands its collected readings to this block one byte per
// clock and gets back 9-bit LZW codes. The block is the state machine
// (lzw_state_machine) wired to the string dictionary (lzw_dictionary) over the
// STRING_IN / RESET / ENABLE / FULL_ENCODE / ENCODED / FLUSH / DIC_ENCODED
// connections of the published top-level diagram. The dictionary is emptied
// after every PAGE_BYTES input bytes (one 264-byte flash page), so every page
// decodes on its own even if another page is lost.
//
// An optional front stage (pair_transform) reorders the bytes of pairs of
// two-byte readings so that their high bytes sit together. transform_en
// selects it; change transform_en only between pages, when carry is low and
// no transformed bytes are still on their way. With the transform on, every
// byte reaches the LZW stage one group (READINGS * BYTES_PER_READING = 4
// cycles) later, so a page takes PAGE_BYTES + 5 cycles instead of + 1.
//
// Interface: offer a byte on data_in with enable high; one byte is taken every
// cycle enable is high, there is no back-pressure. A code is valid on data_out
// in the cycle data_ready_out is high; done_out is high with the last code of a
// page. Throughput is one byte per cycle; a page takes PAGE_BYTES + 1 cycles
// from its first byte to its last code. Reset is synchronous, active high.
//
// The state machine / dictionary split, the port names, the widths, the
// 256-entry dictionary and the 264-byte page follow the published design; the
// transform as a selectable hardware stage is this design's own arrangement.
module hadcwsn_top
  import hadcwsn_pkg::*;
#(
  parameter int unsigned ENTRIES           = 256,
  parameter int unsigned PAGE_BYTES        = 264,
  parameter int unsigned READINGS          = 2,
  parameter int unsigned BYTES_PER_READING = 2
) (
  input  logic  clk,
  input  logic  reset,          // RESET
  input  logic  enable,         // ENABLE
  input  byte_t data_in,        // DATA_IN[7:0]
  input  logic  transform_en,   // 1: reorder reading bytes first
  output code_t data_out,       // DATA_OUT[8:0]
  output logic  data_ready_out, // DATA_READY_OUT
  output logic  done_out,       // DONE_OUT
  output logic  carry           // CARRY
);

  byte_t            tr_byte;
  logic             tr_valid;
  logic             sm_enable;
  byte_t            sm_data;

  logic             dic_reset, dic_enable, dic_flush;
  logic [STR_W-1:0] dic_string;
  logic [LEN_W-1:0] dic_len;
  logic             dic_hit, dic_full;
  code_t            dic_code;

  pair_transform #(
    .READINGS         (READINGS),
    .BYTES_PER_READING(BYTES_PER_READING)
  ) u_transform (
    .clk      (clk),
    .rst      (reset),
    .in_valid (enable && transform_en),
    .in_byte  (data_in),
    .out_valid(tr_valid),
    .out_byte (tr_byte)
  );

  assign sm_enable = transform_en ? tr_valid : enable;
  assign sm_data   = transform_en ? tr_byte  : data_in;

  lzw_state_machine #(
    .PAGE_BYTES(PAGE_BYTES)
  ) u_state_machine (
    .clk           (clk),
    .rst           (reset),
    .enable        (sm_enable),
    .data_in       (sm_data),
    .data_out      (data_out),
    .data_ready_out(data_ready_out),
    .done_out      (done_out),
    .carry         (carry),
    .dic_reset     (dic_reset),
    .dic_enable    (dic_enable),
    .dic_flush     (dic_flush),
    .dic_string    (dic_string),
    .dic_len       (dic_len),
    .dic_encoded   (dic_hit),
    .dic_code      (dic_code),
    .dic_full      (dic_full)
  );

  lzw_dictionary #(
    .ENTRIES(ENTRIES)
  ) u_dictionary (
    .clk        (clk),
    .rst        (dic_reset),
    .enable     (dic_enable),
    .flush      (dic_flush),
    .string_in  (dic_string),
    .string_len (dic_len),
    .encoded    (dic_hit),
    .dic_encoded(dic_code),
    .full_encode(dic_full)
  );

endmodule
