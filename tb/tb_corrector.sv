// tb_corrector: self-checking test of the downstream bit aligner.
// For every bit offset 0..15 (and 18, i.e. more than one word) a frame of
// PSYNC words, 16'h55E2 and random payload is sent as a continuous bit
// stream delayed by that many bits. Checks: the aligner locks at offset
// mod 16, the delimiter word leaves as 16'h55E2 and the following words equal
// the payload. A last frame carries the delimiter pattern inside its
// payload, 8 bits off the frame's alignment: while `hunt` is low the offset
// must stay and the payload must pass unchanged.
module tb_corrector;
  logic clk = 0, rst = 1;
  logic din_valid = 0, hunt = 1, dout_valid, locked;
  logic [15:0] din = 0, dout;
  logic [3:0] shift;
  int checks = 0, failures = 0;
  logic [15:0] outs[$];

  always #6.43 clk = ~clk;

  corrector dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (!rst && dout_valid) outs.push_back(dout);

  // build a bit stream: `off` leading bits of 1/0 noise, then words
  task automatic run(int off);
    logic        bits[$];
    logic [15:0] frame[$], payload[$];
    int found;
    for (int i = 0; i < 6; i++) frame.push_back(16'h5555);
    frame.push_back(16'h55E2);
    for (int i = 0; i < 10; i++) begin
      automatic logic [15:0] v = 16'($urandom) & 16'h0F0F;   // no E2 pattern
      payload.push_back(v); frame.push_back(v);
    end
    for (int i = 0; i < 4; i++) frame.push_back(16'h5555);
    for (int i = 0; i < off; i++) bits.push_back(1'(i % 2));   // lost PSYNC bits
    foreach (frame[i]) for (int b = 15; b >= 0; b--) bits.push_back(frame[i][b]);
    while (bits.size() % 16 != 0) bits.push_back(1'b0);
    outs.delete();
    hunt = 1;
    while (bits.size() > 0) begin
      logic [15:0] w;
      for (int b = 15; b >= 0; b--) w[b] = bits.pop_front();
      @(negedge clk);
      din_valid = 1; din = w;
      // the PON MAC would drop hunt once it has the delimiter
      if (outs.size() > 0 && outs[$] == 16'h55E2) hunt = 0;
    end
    @(negedge clk); din_valid = 0;
    repeat (3) @(negedge clk);
    check(locked, "locked");
    check(shift == 4'(off % 16), $sformatf("offset %0d: shift %0d", off, shift));
    found = -1;
    foreach (outs[i]) if (found < 0 && outs[i] == 16'h55E2) found = i;
    check(found >= 0, $sformatf("offset %0d: delimiter word found", off));
    if (found >= 0)
      foreach (payload[i])
        check(found + 1 + i < outs.size() && outs[found + 1 + i] == payload[i],
              $sformatf("offset %0d: payload word %0d", off, i));
    hunt = 1;
  endtask

  // payload containing 16'h55E2 across a word boundary, sent with hunt low
  task automatic run_gate(int off);
    logic        bits[$];
    logic [15:0] frame[$], payload[$];
    int found;
    for (int i = 0; i < 6; i++) frame.push_back(16'h5555);
    frame.push_back(16'h55E2);
    payload = '{16'h0101, 16'h0055, 16'hE200, 16'h0A0B, 16'h0055, 16'hE201, 16'h0C0D};
    foreach (payload[i]) frame.push_back(payload[i]);
    for (int i = 0; i < 4; i++) frame.push_back(16'h5555);
    for (int i = 0; i < off; i++) bits.push_back(1'(i % 2));
    foreach (frame[i]) for (int b = 15; b >= 0; b--) bits.push_back(frame[i][b]);
    while (bits.size() % 16 != 0) bits.push_back(1'b0);
    outs.delete();
    hunt = 1;
    while (bits.size() > 0) begin
      logic [15:0] w;
      for (int b = 15; b >= 0; b--) w[b] = bits.pop_front();
      @(negedge clk);
      din_valid = 1; din = w;
      if (outs.size() > 0 && outs[$] == 16'h55E2) hunt = 0;
    end
    @(negedge clk); din_valid = 0;
    repeat (3) @(negedge clk);
    check(shift == 4'(off % 16), $sformatf("gate: shift %0d after payload with delimiter pattern", shift));
    found = -1;
    foreach (outs[i]) if (found < 0 && outs[i] == 16'h55E2) found = i;
    check(found >= 0, "gate: delimiter word found");
    if (found >= 0)
      foreach (payload[i])
        check(found + 1 + i < outs.size() && outs[found + 1 + i] == payload[i],
              $sformatf("gate: payload word %0d", i));
    hunt = 1;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(!locked && !dout_valid, "nothing before lock");
    for (int off = 0; off < 16; off++) run(off);
    run(18);
    run_gate(3);
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
