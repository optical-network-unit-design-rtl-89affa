// tb_onu_stream: sustained upstream traffic through the ONU at its default
// sizes.
//
// A stream of Ethernet packets arrives back to back on MII at the full
// 100 Mb/s, separated only by a 12-byte inter-frame gap. Most are 1455 to
// 1494 bytes long, the sizes of a captured UDP video stream, and every fifth
// is a 60-byte minimum-size packet. A DBA-processor model grants a slot as
// soon as `slot_count` reports one. The PON side drains 1.244 Gb/s, so
// nothing may queue up: the test checks that no packet is dropped, that the
// framer never stalls on a full buffer3 and that `slot_count` stays small.
// It also checks that every packet comes out in ceil(L/268) slots with the
// right header, length words, data and idle fill, and that the last slot
// of each packet leaves within 2000 PON clocks (25.7 us) of the packet's
// end on MII. That bound is this test's own: store-and-forward through
// buffer0 and one pass of the framer need about 6 x 140 clocks for a
// 1500-byte packet, plus the clock crossings.
module tb_onu_stream;
  localparam int NPKT        = 40;
  localparam int MAX_LATENCY = 2000;

  logic clk = 0, mii_rx_clk = 0, mii_tx_clk = 0, rst = 1;
  logic [7:0]  onu_id = 8'h03;
  logic [47:0] my_mac = 48'h0002_0004_0006;
  logic        rx_dv = 0, dba_pulse = 0, up_valid, dn_valid = 0, tx_en, dn_locked, up_busy, up_stall;
  logic [3:0]  dn_shift;
  logic [3:0]  rxd = 0, txd;
  logic [7:0]  slot_count;
  logic [15:0] up_data, up_drops, lost_grants, dn_data = 16'h5555, dn_ok, dn_drop;
  int checks = 0, failures = 0;

  always #6.43  clk        = ~clk;
  always #20    mii_rx_clk = ~mii_rx_clk;
  always #20.01 mii_tx_clk = ~mii_tx_clk;

  onu_top dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef logic [15:0] words_t[$];
  words_t up_expect[$];
  int     exp_slots[$];          // slots each packet must take
  longint end_cycle[$];          // PON clock count when each packet ended
  longint cyc = 0;
  int     stalls = 0, max_slots = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic send_packet(int nbytes);
    logic [3:0] n[$];
    words_t w;
    for (int i = 0; i < 2 * nbytes; i++) n.push_back(4'($urandom));
    while (n.size() % 4 != 0) n.push_back(4'h0);
    for (int k = 0; k < n.size() / 4; k++) w.push_back({n[4*k], n[4*k+1], n[4*k+2], n[4*k+3]});
    up_expect.push_back(w);
    exp_slots.push_back((nbytes + 267) / 268);
    for (int i = 0; i < 2 * nbytes; i++) begin
      @(negedge mii_rx_clk); rx_dv = 1; rxd = n[i];
    end
    @(negedge mii_rx_clk); rx_dv = 0;
    end_cycle.push_back(cyc);
    repeat (24) @(negedge mii_rx_clk);   // 12-byte inter-frame gap
  endtask

  // DBA processor model: grant whenever a slot is reported
  initial begin
    @(negedge rst);
    forever begin
      @(negedge clk);
      if (slot_count != 0 && !up_busy) begin
        dba_pulse = 1;
        @(negedge clk); dba_pulse = 0;
        repeat (3) @(negedge clk);
      end
    end
  end

  // upstream checker: parse slots, rebuild packets
  int slot_pos = 0, data_words_left = 0, pkts_checked = 0, slots_this_pkt = 0;
  bit in_last = 0;
  logic [15:0] cur[$];
  always @(posedge clk) begin
    if (!rst) begin
      if (up_stall) stalls++;
      if (int'(slot_count) > max_slots) max_slots = int'(slot_count);
      if (up_valid) begin
        if (slot_pos < 4) check(up_data == 16'h5555, "slot preamble");
        else if (slot_pos == 4) check(up_data == {8'hE2, onu_id}, "delimiter and ONU-ID");
        else if (slot_pos == 5) begin
          slots_this_pkt++;
          in_last = up_data[15];
          if (up_data[15]) data_words_left = (int'(up_data[14:0]) + 1) / 2;
          else begin
            check(up_data == 16'h010C, $sformatf("full-slot length %h", up_data));
            data_words_left = 134;
          end
        end else if (data_words_left > 0) begin
          cur.push_back(up_data);
          data_words_left--;
        end else check(up_data == 16'hAAAA, "idle fill");
        if (slot_pos == 139 && in_last) begin
          if (up_expect.size() == 0) check(0, "packet out that was never sent");
          else begin
            automatic words_t e = up_expect.pop_front();
            automatic int     s = exp_slots.pop_front();
            automatic longint t = end_cycle.pop_front();
            check(slots_this_pkt == s, $sformatf("packet %0d took %0d slots, expected %0d", pkts_checked, slots_this_pkt, s));
            check(cyc - t <= MAX_LATENCY, $sformatf("packet %0d left %0d clocks after its end", pkts_checked, cyc - t));
            check(cur.size() == e.size(), $sformatf("packet %0d: %0d words, expected %0d", pkts_checked, cur.size(), e.size()));
            foreach (e[i]) if (i < cur.size()) check(cur[i] == e[i], $sformatf("packet %0d word %0d", pkts_checked, i));
          end
          slots_this_pkt = 0;
          pkts_checked++;
          cur.delete();
        end
        slot_pos = (slot_pos == 139) ? 0 : slot_pos + 1;
      end
    end
  end

  initial begin
    int sizes[5] = '{1492, 1494, 1458, 1455, 1460};
    repeat (5) @(negedge mii_rx_clk);
    rst = 0;
    repeat (5) @(negedge mii_rx_clk);
    for (int k = 0; k < NPKT; k++) send_packet(k % 5 == 4 ? 60 : sizes[k % 5]);
    repeat (3000) @(negedge clk);
    check(pkts_checked == NPKT, $sformatf("%0d of %0d packets came out", pkts_checked, NPKT));
    check(up_drops == 0, $sformatf("%0d packets dropped", up_drops));
    check(stalls == 0, $sformatf("framer stalled %0d clocks on a full buffer3", stalls));
    check(max_slots <= 2, $sformatf("slot_count reached %0d", max_slots));
    check(slot_count == 0, "slots left behind");
    $display("stream: %0d packets, max slot_count %0d, %0d grants ignored", pkts_checked, max_slots, lost_grants);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
