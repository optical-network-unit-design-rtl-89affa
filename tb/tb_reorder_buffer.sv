// tb_reorder_buffer: self-checking test of the upstream reorder buffer.
// Words written as 16'h4321 must read back as 16'h1234 (nibble order
// reversed), in FIFO order; `full` rises at capacity (8 memory words plus the
// output register with AW=3) and writes while full are dropped.
module tb_reorder_buffer;
  logic clk = 0, rst = 1;
  logic we = 0, rd = 0, full, dvalid;
  logic [15:0] din = 0, dout;
  int checks = 0, failures = 0;
  logic [15:0] q[$];

  always #6.43 clk = ~clk;

  reorder_buffer #(.AW(3)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] rev(logic [15:0] w);
    return {w[3:0], w[7:4], w[11:8], w[15:12]};
  endfunction

  initial begin
    int n;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    we = 1; din = 16'h4321;
    @(negedge clk);
    we = 0;
    @(negedge clk);
    check(dvalid && dout == 16'h1234, $sformatf("4321 became %h", dout));
    rd = 1; @(negedge clk); rd = 0;
    check(!dvalid, "empty after pop");
    // fill to full
    n = 0;
    while (!full && n < 20) begin
      automatic logic [15:0] v = 16'($urandom);
      we = 1; din = v; q.push_back(rev(v)); n++;
      @(negedge clk);
    end
    we = 0;
    check(n == 9, $sformatf("capacity %0d, expected 9", n));
    we = 1; din = 16'hBEEF; @(negedge clk); we = 0;
    for (int i = 0; i < 9; i++) begin
      check(dvalid && dout == q[0], $sformatf("read %0d: %h expected %h", i, dout, q[0]));
      void'(q.pop_front());
      rd = 1; @(negedge clk); rd = 0;
    end
    check(!dvalid, "write while full was dropped");
    // back-to-back write and read, one word per clock
    for (int i = 0; i < 50; i++) begin
      automatic logic [15:0] v = 16'($urandom);
      we = 1; din = v; q.push_back(rev(v));
      rd = dvalid;
      if (dvalid) begin
        check(dout == q[0], "stream order");
        void'(q.pop_front());
      end
      @(negedge clk);
    end
    we = 0; rd = 0;
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
