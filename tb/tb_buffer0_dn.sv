// tb_buffer0_dn: self-checking test of downstream buffer0 (16-bit words in
// at the system clock, nibbles out at the MII clock, commit/rewind on the
// write side). Checks: 16'h1234 leaves as nibbles 1,2,3,4; uncommitted words
// are invisible to the reader; rewound words never appear; `free_words`
// falls as words are written and recovers as they are read.
module tb_buffer0_dn;
  logic wclk = 0, rclk = 0, rst = 1;
  logic we = 0, commit = 0, rewind = 0, rd, nvalid;
  logic [15:0] din = 0, free_words;
  logic [3:0] nib;
  int checks = 0, failures = 0;
  logic [3:0] q[$];
  bit rd_enable = 0;
  int got = 0;

  always #6.43 wclk = ~wclk;
  always #20   rclk = ~rclk;

  buffer0_dn #(.AW(5)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  assign rd = rd_enable && nvalid;
  always @(posedge rclk) begin
    if (!rst && rd) begin
      got++;
      if (q.size() == 0) check(0, "nibble from empty model");
      else begin
        automatic logic [3:0] e = q.pop_front();
        check(nib == e, $sformatf("nibble %h expected %h", nib, e));
      end
    end
  end

  task automatic put(logic [15:0] w, bit keep);
    @(negedge wclk); we = 1; din = w;
    if (keep) for (int i = 3; i >= 0; i--) q.push_back(w[4*i +: 4]);
    @(negedge wclk); we = 0;
  endtask

  task automatic pulse_commit();
    @(negedge wclk); commit = 1; @(negedge wclk); commit = 0;
  endtask

  initial begin
    repeat (4) @(negedge rclk);
    rst = 0;
    repeat (2) @(negedge rclk);
    check(free_words == 32 && !nvalid, "empty after reset");
    put(16'h1234, 1);
    put(16'h5678, 1);
    repeat (10) @(negedge rclk);
    check(!nvalid, "uncommitted words invisible");
    check(free_words == 30, $sformatf("free %0d expected 30", free_words));
    pulse_commit();
    repeat (6) @(negedge rclk);
    check(nvalid && nib == 4'h1, "first nibble 1");
    rd_enable = 1;
    repeat (12) @(negedge rclk);
    check(got == 8 && q.size() == 0, "nibbles 1..8 in order");
    // a rewound packet
    put(16'hDEAD, 0);
    put(16'hBEEF, 0);
    @(negedge wclk); rewind = 1; @(negedge wclk); rewind = 0;
    put(16'hCAFE, 1);
    // commit in the same clock as the last write
    @(negedge wclk); we = 1; din = 16'h0F1E; commit = 1;
    for (int i = 3; i >= 0; i--) q.push_back(din[4*i +: 4]);
    @(negedge wclk); we = 0; commit = 0;
    repeat (20) @(negedge rclk);
    check(q.size() == 0 && got == 16, $sformatf("rewound words skipped (%0d nibbles)", got));
    repeat (4) @(negedge wclk);
    check(free_words == 32, $sformatf("free %0d after draining", free_words));
    // bulk: 40 words with the reader running
    for (int i = 0; i < 40; i++) begin
      while (free_words < 2) @(negedge wclk);
      put(16'($urandom), 1);
      if (i % 8 == 7) pulse_commit();
    end
    repeat (300) @(negedge rclk);
    check(q.size() == 0, "bulk drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge rclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
