// tb_pair_transform: self-checking test of the reading transform.
//
// Streams of bytes are sent at full rate and with random idle cycles. Every
// group of four input bytes H0 L0 H1 L1 must come out as H0 H1 L0 L1, in
// order, one cycle after the group's last byte when the input has no gaps.
// The same transpose is also checked for three three-byte readings.
module tb_pair_transform;
  import hadcwsn_pkg::*;
  import tb_lzw_ref_pkg::*;

  logic  clk = 1'b0;
  logic  rst, in_valid;
  byte_t in_byte;
  logic  out_valid, out_valid3;
  byte_t out_byte, out_byte3;

  int checks = 0, failures = 0;

  pair_transform dut (.clk, .rst, .in_valid, .in_byte, .out_valid, .out_byte);
  pair_transform #(.READINGS(3), .BYTES_PER_READING(3)) dut3 (
    .clk, .rst, .in_valid, .in_byte, .out_valid(out_valid3), .out_byte(out_byte3));

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

  bytes_q_t sent, got, got3;
  int last_in_cycle = -1, first_out_cycle = -1, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && out_valid) begin
      got.push_back(out_byte);
      if (first_out_cycle < 0) first_out_cycle = cyc;
    end
    if (!rst && out_valid3) got3.push_back(out_byte3);
    if (!rst && in_valid && sent.size() == 4 && last_in_cycle < 0) last_in_cycle = cyc;
  end

  initial begin
    rst = 1'b1; in_valid = 1'b0; in_byte = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // Full rate: 144 bytes (a multiple of 4 and of 9).
    for (int i = 0; i < 144; i++) begin
      @(negedge clk); in_valid = 1'b1; in_byte = byte'($urandom); sent.push_back(in_byte);
    end
    // With gaps: another 72 bytes.
    for (int i = 0; i < 72; i++) begin
      if (($urandom % 2) != 0) begin @(negedge clk); in_valid = 1'b0; end
      @(negedge clk); in_valid = 1'b1; in_byte = byte'($urandom); sent.push_back(in_byte);
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (12) @(negedge clk);

    begin
      automatic bytes_q_t exp = transform_pairs(sent);
      automatic bytes_q_t exp3;
      check(got.size() == exp.size(), $sformatf("%0d bytes out, %0d expected", got.size(), exp.size()));
      for (int i = 0; i < exp.size() && i < got.size(); i++)
        check(got[i] == exp[i], $sformatf("byte %0d: got %h, expected %h", i, got[i], exp[i]));
      // 3x3: input r*3+b goes to output b*3+r.
      for (int g = 0; g + 9 <= sent.size(); g += 9)
        for (int b = 0; b < 3; b++)
          for (int r = 0; r < 3; r++) exp3.push_back(sent[g + r * 3 + b]);
      check(got3 == exp3, "3x3 transpose differs");
      check(first_out_cycle == last_in_cycle + 1,
            $sformatf("first output at cycle %0d, last byte of the group at %0d",
                      first_out_cycle, last_in_cycle));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
