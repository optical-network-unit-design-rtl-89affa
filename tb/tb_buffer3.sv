// tb_buffer3: self-checking test of buffer3 (slot store and slot counter).
// Writes three 140-word slots with slot_in on each last word, checks the
// slot count seen by the DBA (0,1,2,3), reads one slot out with slot_out and
// checks the data and the count falling back, and a simultaneous slot_in and
// slot_out leaving the count unchanged.
module tb_buffer3;
  logic clk = 0, rst = 1;
  logic we = 0, rd = 0, slot_in = 0, slot_out = 0, full, dvalid;
  logic [15:0] din = 0, dout;
  logic [7:0] slot_count;
  int checks = 0, failures = 0;
  logic [15:0] q[$];

  always #6.43 clk = ~clk;

  buffer3 dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write_slot();
    for (int i = 0; i < 140; i++) begin
      automatic logic [15:0] v = 16'($urandom);
      we = 1; din = v; slot_in = (i == 139); q.push_back(v);
      @(negedge clk);
    end
    we = 0; slot_in = 0;
  endtask

  task automatic read_slot(bit with_slot_in);
    for (int i = 0; i < 140; i++) begin
      check(dvalid && dout == q[0], $sformatf("slot word %0d: %h expected %h", i, dout, q[0]));
      void'(q.pop_front());
      rd = 1; slot_out = (i == 139); slot_in = with_slot_in && (i == 139);
      @(negedge clk);
    end
    rd = 0; slot_out = 0; slot_in = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(slot_count == 0 && !dvalid, "empty after reset");
    for (int s = 1; s <= 3; s++) begin
      write_slot();
      check(slot_count == 8'(s), $sformatf("slot count %0d expected %0d", slot_count, s));
    end
    read_slot(0);
    check(slot_count == 2, $sformatf("slot count %0d after a read, expected 2", slot_count));
    read_slot(1);
    check(slot_count == 2, $sformatf("slot count %0d after read+write pulse, expected 2", slot_count));
    read_slot(0);
    check(slot_count == 1, "slot count 1");
    check(!dvalid, "empty at the end");
    // capacity: 1024 + 1 words
    for (int i = 0; i < 1100 && !full; i++) begin
      we = 1; din = 16'(i); @(negedge clk);
    end
    we = 0;
    check(full, "full reached");
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
