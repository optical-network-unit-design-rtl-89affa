// tb_buffer0_up: self-checking test of upstream buffer0 (nibbles in at the
// MII clock, 16-bit words out at the system clock). Uses a small memory
// (64 nibbles, reserve 16) to reach the almost-full threshold quickly.
// Checks: nibbles 1,2,3,4 read back as 16'h4321; order over many words;
// almost_full raised once free space drops below the reserve and released
// after draining.
module tb_buffer0_up;
  logic wclk = 0, rclk = 0, rst = 1;
  logic we = 0, rd, almost_full, dvalid;
  logic [3:0]  din = 0;
  logic [15:0] dout;
  int checks = 0, failures = 0;
  logic [15:0] q[$];
  bit rd_enable = 0;

  always #20   wclk = ~wclk;
  always #6.43 rclk = ~rclk;

  buffer0_up #(.NIB_AW(6), .RESERVE_NIB(16)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  assign rd = rd_enable && dvalid;
  always @(posedge rclk) begin
    if (rd) begin
      if (q.size() == 0) check(0, "read from empty model");
      else begin
        automatic logic [15:0] exp = q.pop_front();
        check(dout == exp, $sformatf("word %h expected %h", dout, exp));
      end
    end
  end

  task automatic put_word(logic [3:0] a, logic [3:0] b, logic [3:0] c, logic [3:0] d);
    // a is written first and must come out in the low nibble
    q.push_back({d, c, b, a});
    @(negedge wclk); we = 1; din = a;
    @(negedge wclk); din = b;
    @(negedge wclk); din = c;
    @(negedge wclk); din = d;
    @(negedge wclk); we = 0;
  endtask

  initial begin
    repeat (4) @(negedge wclk);
    rst = 0;
    repeat (2) @(negedge wclk);
    check(!almost_full && !dvalid, "empty after reset");
    put_word(4'h1, 4'h2, 4'h3, 4'h4);
    repeat (6) @(posedge rclk);
    check(dvalid && dout == 16'h4321, $sformatf("first word %h, expected 4321", dout));
    rd_enable = 1;
    repeat (4) @(posedge rclk);
    rd_enable = 0;
    // fill: 64 nibbles of memory; one of 13 words moves into the output
    // register, so 12 words = 48 nibbles stay and 16 are free -> not yet
    for (int i = 0; i < 13; i++)
      put_word(4'($urandom), 4'($urandom), 4'($urandom), 4'($urandom));
    repeat (4) @(negedge wclk);
    check(!almost_full, "not almost full with 16 free nibbles");
    put_word(4'($urandom), 4'($urandom), 4'($urandom), 4'($urandom));
    repeat (4) @(negedge wclk);
    check(almost_full, "almost full with 12 free nibbles");
    rd_enable = 1;
    repeat (60) @(posedge rclk);
    repeat (4) @(negedge wclk);
    check(!almost_full, "almost full released after drain");
    check(q.size() == 0, "all words read");
    // streaming with random read stalls
    fork
      for (int i = 0; i < 60; i++) begin
        while (almost_full) @(negedge wclk);
        put_word(4'($urandom), 4'($urandom), 4'($urandom), 4'($urandom));
      end
      repeat (6000) begin @(posedge rclk); rd_enable = ($urandom % 3) != 0; end
    join
    rd_enable = 1;
    repeat (100) @(posedge rclk);
    check(q.size() == 0, "stream drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge rclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
