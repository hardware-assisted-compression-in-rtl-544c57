// tb_lzw_dictionary: self-checking test of the string dictionary.
//
// A small table (ENTRIES = 8) is driven directly. The testbench keeps its own
// list of stored strings and checks, for every search: the hit flag, the code
// of a hit (256 + order of insertion), that a miss adds the string at the next
// clock edge, that nothing is added once the table is full (full_encode), that
// strings of equal bytes but different length are told apart, that a search
// without enable adds nothing, and that flush and reset empty the table.
module tb_lzw_dictionary;
  import hadcwsn_pkg::*;

  localparam int unsigned ENTRIES = 8;

  logic             clk = 1'b0;
  logic             rst, enable, flush;
  logic [STR_W-1:0] string_in;
  logic [LEN_W-1:0] string_len;
  logic             encoded, full_encode;
  code_t            dic_encoded;

  int checks = 0, failures = 0;

  lzw_dictionary #(.ENTRIES(ENTRIES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Model: stored strings in insertion order.
  logic [STR_W+LEN_W-1:0] model[$];

  // One search with enable: checks the combinational answer, then clocks.
  task automatic search(logic [STR_W-1:0] s, int unsigned len, bit en = 1'b1);
    int idx = -1;
    @(negedge clk);
    string_in = s; string_len = LEN_W'(len); enable = en; flush = 1'b0;
    foreach (model[i]) if (model[i] == {LEN_W'(len), s}) idx = i;
    #1;
    check(encoded == (idx >= 0), $sformatf("hit flag for %h/%0d: got %0b", s, len, encoded));
    if (idx >= 0)
      check(dic_encoded == code_t'(256 + idx),
            $sformatf("code for %h/%0d: got %0d, expected %0d", s, len, dic_encoded, 256 + idx));
    check(full_encode == (model.size() == ENTRIES), "full flag");
    if (en && idx < 0 && model.size() < ENTRIES) model.push_back({LEN_W'(len), s});
    @(posedge clk);
    #1 enable = 1'b0;
  endtask

  int n_full_miss = 0;

  initial begin
    rst = 1'b1; enable = 1'b0; flush = 1'b0; string_in = '0; string_len = 3'd2;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // Table 5 of the compression example: aa, aaa, ab, ba, aac (a=0,b=1,c=2).
    search(32'h0000_0000, 2);   // aa  -> new 256
    search(32'h0000_0000, 2);   // aa  -> hit 256
    search(32'h0000_0000, 3);   // aaa -> new 257 (same bytes, longer)
    search(32'h0000_0001, 2);   // ab  -> new 258
    search(32'h0000_0100, 2);   // ba  -> new 259
    search(32'h0000_0000, 3);   // aaa -> hit 257
    search(32'h0000_0002, 3);   // aac -> new 260
    search(32'h0000_0001, 2);   // ab  -> hit 258
    search(32'hdead_beef, 4, 1'b0);  // no enable: not added
    search(32'hdead_beef, 4);        // now added: 261
    search(32'hdead_beef, 4);        // hit 261
    // Fill up, then overflow.
    for (int i = 0; i < 6; i++) begin
      if (model.size() == ENTRIES) n_full_miss++;
      search(32'h0055_0000 + 32'(i), 3);
    end
    check(full_encode, "table should be full");
    check(n_full_miss > 0, "no search into a full table");
    search(32'h0000_0102, 2);        // full: miss, not added
    search(32'h0000_0102, 2);        // still a miss
    // Flush empties the table.
    @(negedge clk); flush = 1'b1; @(negedge clk); flush = 1'b0;
    model.delete();
    check(!full_encode, "flush did not empty the table");
    search(32'h0000_0000, 2);        // miss again, now 256
    search(32'h0000_0000, 2);        // hit 256
    // Reset empties it too.
    @(negedge clk); rst = 1'b1; @(negedge clk); rst = 1'b0;
    model.delete();
    search(32'h0000_0000, 2);        // miss, becomes 256
    // Random traffic over a small alphabet.
    for (int i = 0; i < 300; i++) begin
      if (i % 60 == 0) begin
        @(negedge clk); flush = 1'b1; @(negedge clk); flush = 1'b0; model.delete();
      end
      search(32'($urandom % 3) | (32'($urandom % 3) << 8) | (32'($urandom % 2) << 16),
             2 + ($urandom % 3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
