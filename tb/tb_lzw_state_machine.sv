// tb_lzw_state_machine: self-checking test of the LZW control state machine.
//
// The state machine runs with short pages (PAGE_BYTES = 16) against a
// behavioural dictionary written here (an associative array that answers a
// search at once and adds a missed string at the clock edge, at most
// DICT_ENTRIES strings, emptied by flush). Its codes are compared with the
// software reference encoder page by page. The testbench also checks the
// Table 5 example of the published design (input aaaabaac -> 0 256 0 1 256 2),
// the flush timing (done_out exactly PAGE_BYTES + 1 cycles after the first
// byte of a gapless page), that data_out holds between codes, and carry.
module tb_lzw_state_machine;
  import hadcwsn_pkg::*;
  import tb_lzw_ref_pkg::*;

  localparam int unsigned PAGE_BYTES   = 16;
  localparam int unsigned DICT_ENTRIES = 6;

  logic             clk = 1'b0;
  logic             rst, enable;
  byte_t            data_in;
  code_t            data_out;
  logic             data_ready_out, done_out, carry;
  logic             dic_reset, dic_enable, dic_flush;
  logic [STR_W-1:0] dic_string;
  logic [LEN_W-1:0] dic_len;
  logic             dic_encoded, dic_full;
  code_t            dic_code;

  int checks = 0, failures = 0;
  longint cycle = 0;

  lzw_state_machine #(.PAGE_BYTES(PAGE_BYTES)) dut (
    .clk, .rst, .enable, .data_in, .data_out, .data_ready_out, .done_out, .carry,
    .dic_reset, .dic_enable, .dic_flush, .dic_string, .dic_len,
    .dic_encoded, .dic_code, .dic_full
  );

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

  // ---- behavioural dictionary ----
  int unsigned dict[longint unsigned];
  int unsigned dict_n = 0;
  longint unsigned key;
  assign key      = {29'd0, dic_len, dic_string};
  assign dic_full = (dict_n == DICT_ENTRIES);
  always_comb begin
    dic_encoded = dict.exists(key);
    dic_code    = dic_encoded ? code_t'(dict[key]) : '0;
  end
  always @(posedge clk) begin
    if (dic_reset || dic_flush) begin
      dict.delete();
      dict_n <= 0;
    end else if (dic_enable && !dic_encoded && !dic_full) begin
      dict[key] = 256 + dict_n;
      dict_n <= dict_n + 1;
    end
  end

  // ---- output monitor ----
  codes_q_t cur_page, got_pages[$];
  longint   done_cycle[$];
  code_t    last_out;
  always @(posedge clk) begin
    if (!rst) begin
      if (data_ready_out) cur_page.push_back(int'(data_out));
      else if (cycle > 3) check(data_out == last_out, "data_out changed without data_ready_out");
      if (done_out) begin
        got_pages.push_back(cur_page); cur_page.delete(); done_cycle.push_back(cycle);
      end
    end
    last_out <= data_out;
  end

  bytes_q_t all_bytes;
  longint   first_cycle;

  task automatic send(byte unsigned b);
    @(negedge clk); enable = 1'b1; data_in = b; all_bytes.push_back(b);
  endtask

  initial begin
    rst = 1'b1; enable = 1'b0; data_in = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(!carry, "carry high after reset");
    // Table 5 example, padded to a full page with 'c' (=2).
    first_cycle = cycle + 1;
    send(0); send(0); send(0); send(0); send(1); send(0); send(0); send(2);
    #1 check(carry, "carry low while a string is pending");
    for (int i = 8; i < PAGE_BYTES; i++) send(2);
    @(negedge clk); enable = 1'b0;
    repeat (4) @(negedge clk);
    check(!carry, "carry high after the page was flushed");
    // Random pages over a small alphabet, back to back and with gaps.
    for (int p = 0; p < 40; p++) begin
      for (int i = 0; i < PAGE_BYTES; i++) begin
        if (p % 3 == 2 && ($urandom % 3) == 0) begin @(negedge clk); enable = 1'b0; end
        send(byte'((p % 5 == 4) ? $urandom : ($urandom % 3)));
      end
    end
    @(negedge clk); enable = 1'b0;
    repeat (5) @(negedge clk);

    // Table 5: the first six codes.
    if (got_pages.size() > 0) begin
      automatic int unsigned t5[6] = '{0, 256, 0, 1, 256, 2};
      check(got_pages[0].size() >= 6, "Table 5 example: too few codes");
      for (int i = 0; i < 6 && i < got_pages[0].size(); i++)
        check(got_pages[0][i] == t5[i], $sformatf("Table 5 example code %0d: got %0d, expected %0d",
                                                  i, got_pages[0][i], t5[i]));
      check(done_cycle[0] - first_cycle == longint'(PAGE_BYTES + 1), "flush latency");
    end
    begin
      automatic codes_q_t exp_all = lzw_encode(all_bytes, DICT_ENTRIES, MAX_LEN, PAGE_BYTES);
      automatic codes_q_t got_all;
      foreach (got_pages[k]) foreach (got_pages[k][j]) got_all.push_back(got_pages[k][j]);
      check(got_pages.size() == all_bytes.size() / PAGE_BYTES, "number of pages");
      check(got_all == exp_all, $sformatf("codes differ from reference: %0d vs %0d codes",
                                          got_all.size(), exp_all.size()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
