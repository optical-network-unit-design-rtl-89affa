// tb_framer: self-checking test of the framer.
// Behavioural queues stand in for buffer2 (lengths) and the reorder buffer
// (words); buffer3 is randomly full in the first phase. The expected slot
// stream is computed here from the slot rules: per slot four 16'h5555 words,
// {8'hE2, ONU-ID}, a length word (16'h010C, or 16'h8000 | remaining bytes in
// the last slot), 134 data words, idle 16'hAAAA after the packet's end.
// Checks: every word written to buffer3, slot_done on each 140th word, the
// number of slots per packet (a 1500-byte packet takes six), and in a second
// phase without stalls one word per clock (840 clocks for six slots).
module tb_framer;
  import onu_pkg::*;
  logic clk = 0, rst = 1;
  logic [7:0] onu_id = 8'h0A;
  logic len_valid, len_rd, buf_valid, buf_rd, b3_full = 0, b3_we, slot_done;
  logic [15:0] len, buf_data, b3_data;
  int checks = 0, failures = 0;
  logic [15:0] lens[$], words[$], expect_q[$];
  int avail = 0, written = 0, slots = 0, last_slots = 0;
  bit stall_en = 1;
  int first_t = -1, last_t = 0, cyc = 0;

  always #6.43 clk = ~clk;

  framer dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  assign len_valid = lens.size() > 0;
  assign len       = len_valid ? lens[0] : 16'd0;
  assign buf_valid = avail > 0;
  assign buf_data  = buf_valid ? words[0] : 16'h0;

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (b3_we) begin
        check(!b3_full, "write while buffer3 full");
        if (first_t < 0) first_t = cyc;
        last_t = cyc;
        if (expect_q.size() == 0) check(0, "unexpected word");
        else begin
          automatic logic [15:0] e = expect_q.pop_front();
          check(b3_data == e, $sformatf("word %0d: %h expected %h", written, b3_data, e));
        end
        written++;
        check(slot_done == (written % SLOT_WORDS == 0), $sformatf("slot_done at word %0d", written));
        if (written % SLOT_WORDS == 6 && b3_data[15]) last_slots++;
      end
      if (slot_done) slots++;
      if (len_rd) void'(lens.pop_front());
      if (buf_rd) begin
        check(buf_valid, "read from empty buffer");
        void'(words.pop_front());
        avail--;
      end
      if (avail < words.size() && (!stall_en || $urandom % 4 != 0)) avail++;
      b3_full <= stall_en && ($urandom % 6) == 0;
    end
  end

  task automatic add_packet(int nbytes);
    int nw, idx, rem;
    logic [15:0] d[$];
    nw = (nbytes + 1) / 2;
    for (int i = 0; i < nw; i++) d.push_back(16'($urandom));
    lens.push_back(16'(nbytes));
    foreach (d[i]) words.push_back(d[i]);
    idx = 0;
    rem = nbytes;
    do begin
      for (int i = 0; i < 4; i++) expect_q.push_back(16'h5555);
      expect_q.push_back({8'hE2, onu_id});
      expect_q.push_back(rem > 268 ? 16'h010C : (16'h8000 | 16'(rem)));
      for (int i = 0; i < 134; i++) begin
        if (idx < nw) begin expect_q.push_back(d[idx]); idx++; end
        else expect_q.push_back(16'hAAAA);
      end
      rem = (rem > 268) ? rem - 268 : 0;
    end while (idx < nw);
  endtask

  initial begin
    int s0;
    repeat (3) @(negedge clk);
    rst = 0;
    add_packet(60);      // 1 slot, padded
    add_packet(1500);    // 6 slots
    add_packet(268);     // exactly one slot, last flag 0x810C
    add_packet(269);     // 2 slots, second holds 1 byte
    add_packet(7);       // odd length
    wait (expect_q.size() == 0);
    repeat (5) @(negedge clk);
    check(slots == 1 + 6 + 1 + 2 + 1, $sformatf("%0d slots, expected 11", slots));
    check(last_slots == 5, $sformatf("%0d last-slot flags, expected 5", last_slots));
    // phase 2: no stalls, rate check
    stall_en = 0;
    @(negedge clk);
    avail = 0;
    first_t = -1;
    s0 = slots;
    add_packet(1500);
    wait (expect_q.size() == 0);
    repeat (5) @(negedge clk);
    check(slots - s0 == 6, "1500-byte packet takes six slots");
    check(last_t - first_t + 1 == 6 * SLOT_WORDS,
          $sformatf("six slots in %0d clocks, expected %0d", last_t - first_t + 1, 6 * SLOT_WORDS));
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
