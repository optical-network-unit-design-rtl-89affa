// tb_dba_control: self-checking test of DBAcontrol.
// A behavioural buffer3 (queue of words plus the slot count) feeds the
// block. Checks: a grant with a stored slot sends exactly 140 words on
// consecutive clocks, in order, starting two clocks after the grant; slot_out
// pulses once per slot; grants with no slot, or during a slot, are counted in
// lost_grants and send nothing.
module tb_dba_control;
  logic clk = 0, rst = 1;
  logic dba_pulse = 0, b3_valid, b3_rd, slot_out, pon_out_valid, busy;
  logic [7:0] slot_count = 0;
  logic [15:0] b3_data, pon_out, lost_grants;
  int checks = 0, failures = 0;
  logic [15:0] q[$], sent[$];
  int head = 0;     // read position in q, advanced with a nonblocking update
  int outs = 0, slot_outs = 0, cyc = 0, first_out = -1, last_out = -1;

  always #6.43 clk = ~clk;

  dba_control dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  assign b3_valid = head < q.size();
  assign b3_data  = b3_valid ? q[head] : 16'h0;

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (b3_rd) begin
        check(b3_valid, "read from empty buffer3");
        sent.push_back(q[head]);
        head <= head + 1;
      end
      if (pon_out_valid) begin
        outs++;
        if (first_out < 0) first_out = cyc;
        last_out = cyc;
        if (sent.size() == 0) check(0, "output without read");
        else check(pon_out == sent.pop_front(), "output word order");
      end
      if (slot_out) begin slot_outs++; slot_count <= slot_count - 1'b1; end
    end
  end

  task automatic grant();
    @(negedge clk); dba_pulse = 1; @(negedge clk); dba_pulse = 0;
  endtask

  initial begin
    int g;
    repeat (3) @(negedge clk);
    rst = 0;
    // a grant without a slot is lost
    grant();
    repeat (5) @(negedge clk);
    check(lost_grants == 1 && outs == 0, "grant without slot ignored");
    // store two slots
    for (int i = 0; i < 280; i++) q.push_back(16'($urandom));
    slot_count = 2;
    g = cyc;
    grant();
    repeat (150) @(negedge clk);
    check(outs == 140, $sformatf("%0d words for one grant, expected 140", outs));
    check(last_out - first_out + 1 == 140, "140 consecutive clocks");
    // the grant is sampled at edge g+2; the first word is on the output two edges later
    check(first_out - g == 4, $sformatf("first word %0d clocks after g", first_out - g));
    check(slot_outs == 1 && slot_count == 1, "slot_out once");
    // second slot; a grant during it is lost
    grant();
    repeat (20) @(negedge clk);
    grant();
    repeat (150) @(negedge clk);
    check(outs == 280, $sformatf("%0d words after two slots", outs));
    check(lost_grants == 2, $sformatf("lost grants %0d expected 2", lost_grants));
    check(slot_outs == 2 && slot_count == 0, "second slot_out");
    check(head == q.size(), "buffer3 drained");
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
