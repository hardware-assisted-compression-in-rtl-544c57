// pair_transform: the reading transform that groups the most significant
// bytes of neighbouring sensor readings.
//
// Consecutive readings change little, so their high bytes repeat. The block
// takes READINGS readings of BYTES_PER_READING bytes each (most significant
// byte first) and sends the same bytes out byte-position by byte-position:
// for two two-byte readings H0 L0 H1 L1 it sends H0 H1 L0 L1, which gives the
// LZW stage runs of equal bytes to work with. It is a transpose of a small
// READINGS x BYTES_PER_READING byte matrix.
//
// Timing: bytes arrive with in_valid, at most one per cycle and with any gaps.
// When the last byte of a group arrives the whole group is copied into an
// output buffer, and the next GROUP cycles send it one byte per cycle with
// out_valid, while the next group is collected. Latency from the last byte of
// a group to its first output byte is one cycle. Input that does not fill a
// whole group stays in the collect buffer until it does; a 264-byte page is a
// whole number of groups. Reset is synchronous and active high.
//
// The reordering follows the published figure of two-byte readings in pairs;
// the streaming double buffer and its handshake are this design's own.
module pair_transform
  import hadcwsn_pkg::*;
#(
  parameter int unsigned READINGS          = 2,
  parameter int unsigned BYTES_PER_READING = 2
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  byte_t in_byte,
  output logic  out_valid,
  output byte_t out_byte
);

  localparam int unsigned GROUP = READINGS * BYTES_PER_READING;
  localparam int unsigned IDX_W = $clog2(GROUP + 1);
  localparam int unsigned POS_W = (GROUP > 1) ? $clog2(GROUP) : 1;

  byte_t            collect [GROUP];
  byte_t            outbuf  [GROUP];
  logic [IDX_W-1:0] n_in;     // bytes collected in this group
  logic [IDX_W-1:0] n_out;    // bytes of outbuf still to send

  // outbuf works as a shift register: position 0 is always the next byte.
  assign out_valid = (n_out != '0);
  assign out_byte  = outbuf[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      n_in  <= '0;
      n_out <= '0;
      for (int unsigned i = 0; i < GROUP; i++) outbuf[i] <= '0;
    end else begin
      if (out_valid) begin
        n_out <= n_out - IDX_W'(1);
        for (int unsigned i = 0; i + 1 < GROUP; i++) outbuf[i] <= outbuf[i + 1];
      end
      if (in_valid) begin
        if (n_in == IDX_W'(GROUP - 1)) begin
          // Group complete: store it transposed. Input position r*B+b goes to
          // output position b*R+r.
          for (int unsigned r = 0; r < READINGS; r++)
            for (int unsigned b = 0; b < BYTES_PER_READING; b++)
              if (r * BYTES_PER_READING + b == GROUP - 1)
                outbuf[b * READINGS + r] <= in_byte;
              else
                outbuf[b * READINGS + r] <= collect[r * BYTES_PER_READING + b];
          n_in  <= '0;
          n_out <= IDX_W'(GROUP);
        end else begin
          collect[n_in[POS_W-1:0]] <= in_byte;
          n_in                     <= n_in + IDX_W'(1);
        end
      end
    end
  end

  // A new group may only replace the output buffer once it has been sent.
  always_ff @(posedge clk) begin
    if (!rst && in_valid && n_in == IDX_W'(GROUP - 1))
      assert (n_out <= IDX_W'(1))
        else $error("pair_transform: group overwritten before it was sent");
  end

endmodule
