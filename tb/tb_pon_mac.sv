// tb_pon_mac: self-checking test of the main downstream PON MAC.
// Aligned frames (PSYNC, 16'h55E2, length, 6-byte address, data) are fed
// with idle PSYNC words between them. A behavioural buffer0 applies the
// write, commit and rewind strobes. Checks: packets addressed to this ONU
// are committed whole (address included) with their length passed on;
// packets for another address are rewound and counted as dropped; a packet
// that does not fit the buffer (buf_free) or meets a full length FIFO is
// skipped; `hunt` is high only between packets.
module tb_pon_mac;
  logic clk = 0, rst = 1;
  logic [47:0] my_mac = 48'h0001_0003_0007;
  logic din_valid = 0, hunt, wr_en, wr_commit, wr_rewind, len_we, len_full = 0;
  logic [15:0] din = 0, wr_data, buf_free = 16'd1024, len, pkt_ok, pkt_drop;
  int checks = 0, failures = 0;
  logic [15:0] pending[$], committed[$], expect_words[$], expect_lens[$], got_lens[$];

  always #6.43 clk = ~clk;

  pon_mac dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (!rst) begin
      if (wr_rewind) pending.delete();
      else begin
        if (wr_en) pending.push_back(wr_data);
        if (wr_commit) begin
          foreach (pending[i]) committed.push_back(pending[i]);
          pending.delete();
        end
      end
      if (len_we) got_lens.push_back(len);
      check(!(wr_commit && wr_rewind), "commit and rewind together");
    end
  end

  task automatic word(logic [15:0] w);
    @(negedge clk); din_valid = 1; din = w;
  endtask

  // send a frame of `nbytes` data bytes to address `mac`; `accept` = expected
  task automatic frame(logic [47:0] mac, int nbytes, bit accept);
    logic [15:0] d[$];
    int nw = (nbytes + 1) / 2;
    d.push_back(mac[47:32]); d.push_back(mac[31:16]); d.push_back(mac[15:0]);
    for (int i = 3; i < nw; i++) d.push_back(16'($urandom));
    repeat (3) word(16'h5555);
    check(hunt, "hunting between packets");
    word(16'h55E2);
    word(16'(nbytes));
    foreach (d[i]) begin
      word(d[i]);
      if (i == 0) check(!hunt, "not hunting inside a packet");
    end
    if (accept) begin
      foreach (d[i]) expect_words.push_back(d[i]);
      expect_lens.push_back(16'(nbytes));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (5) word(16'h1234);                  // noise before any frame
    frame(48'h0001_0003_0007, 134, 1);         // the figure-4.11 packet
    frame(48'h0001_0003_0008, 100, 0);         // other ONU
    frame(48'h0001_0003_0007, 6, 1);           // address only
    frame(48'h0002_0003_0007, 60, 0);          // first word differs
    buf_free = 16'd20;
    frame(48'h0001_0003_0007, 60, 0);          // 30 words > 20 free
    buf_free = 16'd1024;
    len_full = 1;
    frame(48'h0001_0003_0007, 60, 0);          // length FIFO full
    len_full = 0;
    frame(48'h0001_0003_0007, 1500, 1);
    repeat (3) word(16'h5555);
    @(negedge clk); din_valid = 0;
    repeat (3) @(negedge clk);
    check(committed.size() == expect_words.size(),
          $sformatf("%0d words committed, expected %0d", committed.size(), expect_words.size()));
    foreach (expect_words[i]) if (i < committed.size())
      check(committed[i] == expect_words[i], $sformatf("committed word %0d", i));
    check(got_lens.size() == expect_lens.size(), "number of lengths");
    foreach (expect_lens[i]) if (i < got_lens.size())
      check(got_lens[i] == expect_lens[i], $sformatf("length %0d", i));
    check(pkt_ok == 3, $sformatf("pkt_ok %0d expected 3", pkt_ok));
    check(pkt_drop == 4, $sformatf("pkt_drop %0d expected 4", pkt_drop));
    check(pending.size() == 0, "nothing left uncommitted");
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
