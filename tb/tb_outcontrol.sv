// tb_outcontrol: self-checking test of the MII transmit control.
// A behavioural buffer0 supplies nibbles; lengths are offered as from the
// length FIFO. Checks: TX_EN is high for exactly 2 x length nibbles of a
// packet and TXD carries the buffer's nibbles in order; a second length that
// arrives while a packet is leaving is added, so both leave in one TX_EN
// burst; an odd length is rounded up to a whole word.
module tb_outcontrol;
  logic clk = 0, rst = 1;
  logic len_valid = 0, len_rd, nvalid, nrd, tx_en;
  logic [15:0] len = 0;
  logic [3:0] nib, txd;
  logic [18:0] pending;
  int checks = 0, failures = 0;
  logic [3:0] src[$], sent[$];
  int head = 0, bursts = 0, burst_len = 0;
  int bursts_q[$];
  logic tx_en_d = 0;

  always #20 clk = ~clk;

  outcontrol dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  assign nvalid = head < src.size();
  assign nib    = nvalid ? src[head] : 4'h0;

  always @(posedge clk) begin
    if (!rst) begin
      if (nrd) begin
        check(nvalid, "read from empty buffer");
        head <= head + 1;
      end
      if (tx_en) begin sent.push_back(txd); burst_len++; end
      if (tx_en_d && !tx_en) begin bursts_q.push_back(burst_len); burst_len = 0; end
      tx_en_d <= tx_en;
    end
  end

  task automatic offer(int nbytes);
    @(negedge clk); len_valid = 1; len = 16'(nbytes);
    @(negedge clk); len_valid = 0;
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) src.push_back(4'($urandom));
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    check(!tx_en, "idle after reset");
    offer(60);
    repeat (140) @(negedge clk);
    check(bursts_q.size() == 1 && bursts_q[0] == 120, "60 bytes = 120 nibbles in one burst");
    offer(100);
    repeat (50) @(negedge clk);
    offer(40);                      // arrives while the first is leaving
    repeat (400) @(negedge clk);
    check(bursts_q.size() == 2 && bursts_q[1] == 280, "lengths added: one burst of 280 nibbles");
    offer(7);                       // odd: rounded up to 8 bytes
    repeat (40) @(negedge clk);
    check(bursts_q.size() == 3 && bursts_q[2] == 16, "odd length rounded to a whole word");
    check(sent.size() == 416, $sformatf("%0d nibbles sent", sent.size()));
    foreach (sent[i]) check(sent[i] == src[i], $sformatf("nibble %0d", i));
    check(pending == 0, "nothing pending");
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
