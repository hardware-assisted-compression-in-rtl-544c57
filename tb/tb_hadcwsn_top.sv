// tb_hadcwsn_top: end-to-end test of the compressor at its default size
// (256 dictionary entries, 264-byte pages).
//
// Pages of sensor-like readings, constant bytes and random bytes are fed in,
// some back to back, some with idle cycles, with the reading transform off and
// on. The codes of each page (delimited by done_out) are compared with a
// software LZW encoder and decoded back to the input bytes. The testbench also
// checks the page latency (PAGE_BYTES + 1 cycles from the first byte to the
// done flag when bytes come every cycle) and counts each mechanism: dictionary
// hit, insertion, table full, four-byte string cut, flush with a byte taken in
// the flush cycle, idle input, transform mode and mode switch. A mechanism
// that never happened counts as a failure.
module tb_hadcwsn_top;
  import hadcwsn_pkg::*;
  import tb_lzw_ref_pkg::*;

  localparam int unsigned ENTRIES    = 256;
  localparam int unsigned PAGE_BYTES = 264;

  logic  clk = 1'b0;
  logic  reset, enable, transform_en;
  byte_t data_in;
  code_t data_out;
  logic  data_ready_out, done_out, carry;

  int checks = 0, failures = 0;
  longint cycle = 0;

  hadcwsn_top dut (.*);

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
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- output monitor: gathers codes into pages ----
  codes_q_t cur_page;
  codes_q_t got_pages[$];
  longint   done_cycle[$];
  always @(posedge clk) begin
    if (!reset && data_ready_out) cur_page.push_back(int'(data_out));
    if (!reset && done_out) begin
      check(data_ready_out, "done_out without a code");
      got_pages.push_back(cur_page);
      done_cycle.push_back(cycle);
      cur_page.delete();
    end
  end

  // ---- mechanism counters (observed inside the design) ----
  int n_hit = 0, n_insert = 0, n_full = 0, n_cut = 0, n_flush_take = 0;
  int n_idle = 0, n_transform = 0, n_switch = 0;
  logic last_mode = 1'b0;
  always @(posedge clk) if (!reset) begin
    if (dut.u_dictionary.enable && dut.u_dictionary.encoded) n_hit++;
    if (dut.u_dictionary.enable && !dut.u_dictionary.encoded && !dut.u_dictionary.full_encode) n_insert++;
    if (dut.u_dictionary.enable && !dut.u_dictionary.encoded && dut.u_dictionary.full_encode) n_full++;
    if (dut.u_state_machine.enable && dut.u_state_machine.state == dut.u_state_machine.S_HOLD
        && dut.u_state_machine.cur.len == 3'(MAX_LEN)) n_cut++;
    if (dut.u_state_machine.state == dut.u_state_machine.S_FLUSH && dut.u_state_machine.enable)
      n_flush_take++;
    if (!enable && carry) n_idle++;
    if (transform_en && enable) n_transform++;
    if (transform_en != last_mode) n_switch++;
    last_mode <= transform_en;
  end

  // ---- stimulus ----
  bytes_q_t exp_pages[$];   // bytes as the LZW stage sees them, per page
  longint   start_cycle[$]; // cycle of the first byte of pages fed without gaps
  int       page_gapless[$];

  function automatic bytes_q_t sensor_page(int unsigned seed, int unsigned base);
    bytes_q_t p;
    int unsigned v = base;
    void'($urandom(seed));
    for (int unsigned i = 0; i < PAGE_BYTES / 2; i++) begin
      v = v + ($urandom % 5) - 2;
      p.push_back(byte'(v >> 8));
      p.push_back(byte'(v));
    end
    return p;
  endfunction

  function automatic bytes_q_t const_page(byte unsigned b);
    bytes_q_t p;
    for (int unsigned i = 0; i < PAGE_BYTES; i++) p.push_back(b);
    return p;
  endfunction

  function automatic bytes_q_t random_page(int unsigned seed);
    bytes_q_t p;
    void'($urandom(seed));
    for (int unsigned i = 0; i < PAGE_BYTES; i++) p.push_back(byte'($urandom));
    return p;
  endfunction

  // Feeds one page; gaps > 0 inserts idle cycles now and then.
  task automatic feed(bytes_q_t p, int unsigned gaps);
    exp_pages.push_back(transform_en ? transform_pairs(p) : p);
    page_gapless.push_back(int'(gaps == 0 && !transform_en));
    start_cycle.push_back(cycle + 1);
    foreach (p[i]) begin
      if (gaps > 0 && ($urandom % gaps) == 0) begin
        @(negedge clk); enable = 1'b0;
      end
      @(negedge clk);
      enable  = 1'b1;
      data_in = p[i];
    end
    @(negedge clk);
    enable = 1'b0;
  endtask

  task automatic wait_idle();
    repeat (8) @(negedge clk);
  endtask

  initial begin
    reset = 1'b1; enable = 1'b0; transform_en = 1'b0; data_in = '0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    // feed() starts each page with the byte driven after the next negedge, so
    // start_cycle + 1 is the posedge that takes the first byte.
    fork
      begin
        // Pages 0..2 back to back: the first byte of the next page arrives in
        // the flush cycle of the previous one.
        automatic bytes_q_t p0 = sensor_page(11, 32'h0233);
        automatic bytes_q_t p1 = const_page(8'h41);
        automatic bytes_q_t p2 = random_page(7);
        exp_pages.push_back(p0); page_gapless.push_back(1); start_cycle.push_back(cycle + 1);
        exp_pages.push_back(p1); page_gapless.push_back(0); start_cycle.push_back(0);
        exp_pages.push_back(p2); page_gapless.push_back(0); start_cycle.push_back(0);
        foreach (p0[i]) begin @(negedge clk); enable = 1'b1; data_in = p0[i]; end
        foreach (p1[i]) begin @(negedge clk); enable = 1'b1; data_in = p1[i]; end
        foreach (p2[i]) begin @(negedge clk); enable = 1'b1; data_in = p2[i]; end
        @(negedge clk); enable = 1'b0;
      end
    join
    wait_idle();
    feed(sensor_page(23, 32'h01f0), 3);   // with idle cycles
    wait_idle();
    transform_en = 1'b1;                   // mode switch between pages
    wait_idle();
    feed(sensor_page(31, 32'h0300), 0);
    wait_idle();
    feed(random_page(99), 0);
    wait_idle();
    feed(sensor_page(5, 32'h00ff), 4);
    wait_idle();
    transform_en = 1'b0;
    wait_idle();
    feed(sensor_page(41, 32'h0280), 0);
    repeat (20) @(negedge clk);

    // ---- compare ----
    check(got_pages.size() == exp_pages.size(),
          $sformatf("%0d pages out, %0d expected", got_pages.size(), exp_pages.size()));
    for (int k = 0; k < exp_pages.size() && k < got_pages.size(); k++) begin
      automatic codes_q_t exp = lzw_encode(exp_pages[k], ENTRIES, MAX_LEN, PAGE_BYTES);
      automatic bytes_q_t dec = lzw_decode_page(got_pages[k], ENTRIES, MAX_LEN);
      check(got_pages[k] == exp, $sformatf("page %0d: codes differ from reference (%0d vs %0d codes)",
                                           k, got_pages[k].size(), exp.size()));
      check(dec == exp_pages[k], $sformatf("page %0d: decoded bytes differ from input", k));
      $display("page %0d: %0d bytes -> %0d codes (%0d bytes of 9-bit codes)",
               k, exp_pages[k].size(), got_pages[k].size(), (got_pages[k].size() * 9 + 7) / 8);
      if (page_gapless[k] != 0) begin
        check(done_cycle[k] - start_cycle[k] == longint'(PAGE_BYTES + 1),
              $sformatf("page %0d: %0d cycles from first byte to done, expected %0d",
                        k, done_cycle[k] - start_cycle[k], PAGE_BYTES + 1));
        check(done_cycle[k] - start_cycle[k] <= 270, "page slower than about 270 cycles");
      end
    end
    // Back-to-back pages: the next page's done comes exactly PAGE_BYTES later.
    if (done_cycle.size() >= 3) begin
      check(done_cycle[1] - done_cycle[0] == longint'(PAGE_BYTES), "page 1 not back to back");
      check(done_cycle[2] - done_cycle[1] == longint'(PAGE_BYTES), "page 2 not back to back");
    end

    $display("mechanisms: hit=%0d insert=%0d full=%0d cut4=%0d flush_take=%0d idle=%0d transform=%0d switch=%0d",
             n_hit, n_insert, n_full, n_cut, n_flush_take, n_idle, n_transform, n_switch);
    check(n_hit > 0, "no dictionary hit");
    check(n_insert > 0, "no dictionary insertion");
    check(n_full > 0, "dictionary never full");
    check(n_cut > 0, "no four-byte string cut");
    check(n_flush_take > 0, "no byte taken in a flush cycle");
    check(n_idle > 0, "no idle input cycle");
    check(n_transform > 0, "transform never used");
    check(n_switch >= 2, "mode never switched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
