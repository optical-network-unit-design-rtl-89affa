// tb_bridge: self-checking test of the bridge between buffer0 and the
// reorder buffer. Behavioural queues stand in for buffer1 (lengths) and
// buffer0 (words, available with random gaps); the buffer side is randomly
// full. Checks: each popped length moves exactly ceil(length/2) words, in
// order; nothing is read from an empty buffer0 or written into a full
// buffer; the next length is taken only after the current packet is done.
module tb_bridge;
  logic clk = 0, rst = 1;
  logic len_valid, len_rd, b0_valid, b0_rd, buf_full = 0, buf_we;
  logic [15:0] len;
  int checks = 0, failures = 0;
  logic [15:0] lens[$], words[$], moved[$];
  int avail = 0;     // words of buffer0 visible to the bridge
  int moved_in_pkt = 0, pkt_words = 0, pkts_done = 0, pkts_total;

  always #6.43 clk = ~clk;

  bridge dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  assign len_valid = lens.size() > 0;
  assign len       = len_valid ? lens[0] : 16'd0;
  assign b0_valid  = avail > 0;

  always @(posedge clk) begin
    if (!rst) begin
      if (b0_rd) check(b0_valid, "read while buffer0 empty");
      if (buf_we) check(!buf_full, "write while buffer full");
      check(b0_rd == buf_we, "read and write strobes differ");
      if (len_rd) begin
        check(moved_in_pkt == pkt_words, "new length before packet done");
        pkt_words    = (lens[0] + 1) / 2;
        moved_in_pkt = 0;
        void'(lens.pop_front());
      end
      if (b0_rd) begin
        moved.push_back(words.pop_front());
        avail--;
        moved_in_pkt++;
        if (moved_in_pkt == pkt_words) pkts_done++;
      end
      if (avail < words.size() && ($urandom % 3 != 0)) avail++;
      buf_full <= ($urandom % 5) == 0;
    end
  end

  initial begin
    int total;
    int sizes[6] = '{60, 1500, 1, 7, 268, 64};
    total = 0;
    pkts_total = 6;
    foreach (sizes[i]) begin
      lens.push_back(16'(sizes[i]));
      for (int w = 0; w < (sizes[i] + 1) / 2; w++) words.push_back(16'($urandom));
      total += (sizes[i] + 1) / 2;
    end
    begin
      automatic logic [15:0] ref_words[$] = words;
      repeat (3) @(negedge clk);
      rst = 0;
      wait (pkts_done == pkts_total);
      repeat (10) @(negedge clk);
      check(moved.size() == total, $sformatf("%0d words moved, expected %0d", moved.size(), total));
      check(words.size() == 0, "buffer0 empty at the end");
      foreach (ref_words[i]) if (i < moved.size()) check(moved[i] == ref_words[i], "word order");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
