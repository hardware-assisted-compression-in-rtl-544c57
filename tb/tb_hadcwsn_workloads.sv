// tb_hadcwsn_workloads: the four evaluated data sets on both dictionary sizes.
//
// The published evaluation compresses one 264-byte flash page (132 two-byte
// readings, one per second, indoors) of temperature and of light readings,
// each as recorded ("normal") and after the reading transform, with a
// 256-entry dictionary (the FPGA build) and a 44-entry one (the CPLD build).
// The recorded readings are not available, so this testbench generates
// stand-ins: slowly drifting 10-bit readings, temperature with small steps
// and light with larger ones. Each page goes through both compressor
// instances; the codes are checked against the software reference and decoded
// back, and the output size (9 bits per code) is printed. The page latency is
// checked as well: 265 cycles (269 with the transform), within the "approximately 270 cycles" for one
// page given for the original.
module tb_hadcwsn_workloads;
  import hadcwsn_pkg::*;
  import tb_lzw_ref_pkg::*;

  localparam int unsigned PAGE_BYTES = 264;
  localparam int unsigned N_CFG      = 2;
  localparam int unsigned ENTRIES_OF [N_CFG] = '{256, 44};

  logic  clk = 1'b0;
  logic  reset, enable, transform_en;
  byte_t data_in;
  code_t data_out [N_CFG];
  logic  data_ready_out [N_CFG];
  logic  done_out [N_CFG];
  logic  carry [N_CFG];

  int checks = 0, failures = 0;
  longint cycle = 0;

  hadcwsn_top #(.ENTRIES(256)) dut_fpga (
    .clk, .reset, .enable, .data_in, .transform_en,
    .data_out(data_out[0]), .data_ready_out(data_ready_out[0]),
    .done_out(done_out[0]), .carry(carry[0]));
  hadcwsn_top #(.ENTRIES(44)) dut_cpld (
    .clk, .reset, .enable, .data_in, .transform_en,
    .data_out(data_out[1]), .data_ready_out(data_ready_out[1]),
    .done_out(done_out[1]), .carry(carry[1]));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  codes_q_t cur_page [N_CFG];
  codes_q_t got_page [N_CFG];
  longint   done_at  [N_CFG];
  always @(posedge clk) begin
    for (int c = 0; c < N_CFG; c++) begin
      if (!reset && data_ready_out[c]) cur_page[c].push_back(int'(data_out[c]));
      if (!reset && done_out[c]) begin
        got_page[c] = cur_page[c];
        cur_page[c].delete();
        done_at[c] = cycle;
      end
    end
  end

  // 132 readings of a 10-bit sensor, most significant byte first.
  function automatic bytes_q_t readings(int unsigned seed, int unsigned start, int unsigned step);
    bytes_q_t p;
    int v = int'(start);
    void'($urandom(seed));
    for (int i = 0; i < 132; i++) begin
      v = v + int'($urandom % (2 * step + 1)) - int'(step);
      if (v < 0) v = 0;
      if (v > 1023) v = 1023;
      p.push_back(byte'(v >> 8));
      p.push_back(byte'(v));
    end
    return p;
  endfunction

  task automatic run(string name, bytes_q_t page, bit tr);
    longint start;
    bytes_q_t lzw_in = tr ? transform_pairs(page) : page;
    @(negedge clk);
    transform_en = tr;
    @(negedge clk);
    start = cycle + 1;
    foreach (page[i]) begin
      @(negedge clk); enable = 1'b1; data_in = page[i];
    end
    @(negedge clk); enable = 1'b0;
    repeat (6) @(negedge clk);
    for (int c = 0; c < N_CFG; c++) begin
      codes_q_t exp = lzw_encode(lzw_in, ENTRIES_OF[c], MAX_LEN, PAGE_BYTES);
      bytes_q_t dec = lzw_decode_page(got_page[c], ENTRIES_OF[c], MAX_LEN);
      check(got_page[c] == exp, $sformatf("%s, %0d entries: codes differ from reference", name, ENTRIES_OF[c]));
      check(dec == lzw_in, $sformatf("%s, %0d entries: not lossless", name, ENTRIES_OF[c]));
      // With the transform on, each byte reaches the LZW stage four cycles later
      // (one group of two two-byte readings).
      check(done_at[c] - start == longint'(PAGE_BYTES + 1 + (tr ? 4 : 0)),
            $sformatf("%s: page took %0d cycles", name, done_at[c] - start));
      $display("%-24s %3d entries: %0d bytes in, %0d codes, %0d bytes out",
               name, ENTRIES_OF[c], page.size(), got_page[c].size(), (got_page[c].size() * 9 + 7) / 8);
    end
  endtask

  initial begin
    bytes_q_t temp, light;
    reset = 1'b1; enable = 1'b0; transform_en = 1'b0; data_in = '0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    temp  = readings(3, 620, 1);
    light = readings(8, 310, 6);
    run("Temperature Normal",      temp,  1'b0);
    run("Temperature Transformed", temp,  1'b1);
    run("Light Normal",            light, 1'b0);
    run("Light Transformed",       light, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
