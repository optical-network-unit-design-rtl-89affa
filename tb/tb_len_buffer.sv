// tb_len_buffer: self-checking test of the dual-clock length FIFO.
// A 25 MHz-like writer and a 77.76 MHz-like reader exchange random words.
// Checks: data order, `full` rises within one entry of the capacity
// (16 memory entries + the output register) when the reader stalls, no data
// is lost after a full episode, and the reader sees a word a bounded number
// of read clocks after it is written.
module tb_len_buffer;
  logic wclk = 0, rclk = 0, rst = 1;
  logic we = 0, rd, full, dvalid;
  logic [15:0] din = 0, dout;
  int checks = 0, failures = 0;
  logic [15:0] q[$];

  always #20 wclk = ~wclk;
  always #6.43 rclk = ~rclk;

  len_buffer dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reader: pops when `rd_enable`, compares with the model queue
  bit rd_enable = 0;
  always @(posedge rclk) begin
    if (dvalid && rd) begin
      logic [15:0] exp;
      if (q.size() == 0) check(0, "read from empty model");
      else begin
        exp = q.pop_front();
        check(dout == exp, $sformatf("data %h expected %h", dout, exp));
      end
    end
  end
  assign rd = rd_enable && dvalid;

  task automatic write1(logic [15:0] v);
    @(negedge wclk);
    we = 1; din = v;
    @(negedge wclk);
    we = 0;
  endtask

  initial begin
    int n, lat;
    repeat (4) @(negedge wclk);
    rst = 0;
    repeat (2) @(negedge wclk);
    check(!full && !dvalid, "empty after reset");

    // latency of one word
    @(negedge wclk); we = 1; din = 16'h05EA; q.push_back(16'h05EA);
    @(negedge wclk); we = 0;
    lat = 0;
    while (!dvalid && lat < 20) begin @(posedge rclk); lat++; end
    check(dvalid && lat <= 6, $sformatf("first word visible after %0d read clocks", lat));
    rd_enable = 1;
    repeat (4) @(posedge rclk);
    rd_enable = 0;

    // fill while the reader stalls
    n = 0;
    while (!full && n < 40) begin
      automatic logic [15:0] v = 16'($urandom);
      @(negedge wclk);
      if (!full) begin we = 1; din = v; q.push_back(v); n++; end
      @(negedge wclk); we = 0;
      repeat (3) @(negedge wclk);   // let the pointers settle
    end
    check(full, "full reached");
    check(n == 16 || n == 17, $sformatf("capacity %0d", n));
    // a write while full is ignored
    @(negedge wclk); we = 1; din = 16'hDEAD; @(negedge wclk); we = 0;
    rd_enable = 1;
    repeat (200) @(posedge rclk);
    check(q.size() == 0, "all entries read back");
    check(!dvalid, "empty after drain");

    // streaming with random reader stalls
    fork
      for (int i = 0; i < 100; i++) begin
        automatic logic [15:0] v = 16'($urandom);
        @(negedge wclk);
        while (full) @(negedge wclk);
        we = 1; din = v; q.push_back(v);
        @(negedge wclk); we = 0;
      end
      repeat (3000) begin @(posedge rclk); rd_enable = ($urandom % 4) != 0; end
    join
    rd_enable = 1;
    repeat (200) @(posedge rclk);
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
