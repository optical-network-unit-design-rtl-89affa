// tb_onu_top: end-to-end test of the ONU data path at its default sizes.
//
// Upstream: Ethernet packets of 60, 1500, 7, 268 and 1460 bytes enter on MII
// (25 MHz). A DBA-processor model grants slots while `slot_count` is
// non-zero. The 16-bit upstream output is parsed slot by slot (preamble,
// delimiter + ONU-ID, length word, data, idle fill), the packets are
// reassembled and compared with what was sent. Grants are then withheld
// while eight 1500-byte packets arrive back to back, so buffer3, the reorder
// buffer and buffer0 fill up and the MAC drops packets; dropped packets are
// left out of the comparison. Every grant must yield 140 consecutive words.
//
// Downstream: a continuous 16-bit bit stream carries frames for this ONU
// and for another one; bits are inserted between frames so the word
// alignment changes. The MII transmit nibbles must equal the accepted
// packets (address onwards), in order.
//
// Mechanisms counted (each must occur): multi-slot packet, last-slot flag,
// idle fill, buffer3 full (framer stall), packet drop on full, lost grant,
// corrector re-alignment, address mismatch drop, merged TX_EN burst.
module tb_onu_top;
  logic clk = 0, mii_rx_clk = 0, mii_tx_clk = 0, rst = 1;
  logic [7:0]  onu_id = 8'h0A;
  logic [47:0] my_mac = 48'h0001_0003_0007;
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

  // ------------------------------------------------ mechanism counters
  int n_multislot = 0, n_lastflag = 0, n_idlefill = 0, n_b3full = 0, n_drop = 0;
  int n_lostgrant = 0, n_realign = 0, n_addrdrop = 0, n_merged = 0;

  // ------------------------------------------------ upstream stimulus
  typedef logic [15:0] words_t[$];
  words_t up_expect[$];          // expected packets, in order
  bit     grant_en = 1;

  task automatic send_packet(int nbytes);
    logic [3:0] n[$];
    words_t w;
    logic [15:0] drops0;
    for (int i = 0; i < 2 * nbytes; i++) n.push_back(4'($urandom));
    while (n.size() % 4 != 0) n.push_back(4'h0);
    for (int k = 0; k < n.size() / 4; k++) w.push_back({n[4*k], n[4*k+1], n[4*k+2], n[4*k+3]});
    drops0 = up_drops;
    for (int i = 0; i < 2 * nbytes; i++) begin
      @(negedge mii_rx_clk); rx_dv = 1; rxd = n[i];
    end
    @(negedge mii_rx_clk); rx_dv = 0;
    if (up_drops == drops0) up_expect.push_back(w);
    else n_drop++;
    repeat (24) @(negedge mii_rx_clk);
  endtask

  // DBA processor model: grant a slot whenever one is reported
  int grants = 0;
  initial begin
    @(negedge rst);
    forever begin
      @(negedge clk);
      if (grant_en && slot_count != 0 && !up_busy) begin
        dba_pulse = 1; grants++;
        @(negedge clk); dba_pulse = 0;
        repeat (3) @(negedge clk);
      end
    end
  end

  // ------------------------------------------------ upstream checker
  int slot_pos = 0, run = 0, rem = 0, data_words_left = 0, pkts_checked = 0, slots_seen = 0;
  int slots_this_pkt = 0;
  bit in_last = 0;
  logic [15:0] cur[$];
  always @(posedge clk) begin
    if (!rst) begin
      if (up_stall) n_b3full++;
      if (up_valid) begin
        run++;
        if (slot_pos < 4) check(up_data == 16'h5555, "slot preamble");
        else if (slot_pos == 4) check(up_data == {8'hE2, onu_id}, "delimiter and ONU-ID");
        else if (slot_pos == 5) begin
          slots_this_pkt++;
          if (up_data[15]) begin
            in_last = 1; n_lastflag++;
            rem = up_data[14:0];
            check(rem >= 1 && rem <= 268, "last-slot length in range");
            data_words_left = (rem + 1) / 2;
          end else begin
            in_last = 0;
            check(up_data == 16'h010C, $sformatf("full-slot length %h", up_data));
            data_words_left = 134;
          end
        end else begin
          if (data_words_left > 0) begin
            cur.push_back(up_data);
            data_words_left--;
          end else begin
            check(up_data == 16'hAAAA, "idle fill");
            if (slot_pos == 139) n_idlefill++;
          end
        end
        if (slot_pos == 139) begin
          slots_seen++;
          if (in_last) begin
            if (up_expect.size() == 0) check(0, "packet out that was never sent");
            else begin
              automatic words_t e = up_expect.pop_front();
              check(cur.size() == e.size(), $sformatf("packet %0d: %0d words, expected %0d", pkts_checked, cur.size(), e.size()));
              foreach (e[i]) if (i < cur.size()) check(cur[i] == e[i], $sformatf("packet %0d word %0d", pkts_checked, i));
            end
            if (slots_this_pkt > 1) n_multislot++;
            slots_this_pkt = 0;
            pkts_checked++;
            cur.delete();
          end
        end
        slot_pos = (slot_pos == 139) ? 0 : slot_pos + 1;
      end else if (run != 0) begin
        check(run % 140 == 0, $sformatf("grant produced a run of %0d words", run));
        run = 0;
      end
    end
  end

  // ------------------------------------------------ downstream
  logic [3:0] tx_expect[$];
  int tx_got = 0, bursts = 0, dn_accepts = 0;
  logic tx_en_d = 0;
  logic [3:0] prev_shift = 0;
  bit   dn_done = 0;

  always @(posedge mii_tx_clk) begin
    if (!rst) begin
      if (tx_en) begin
        if (tx_expect.size() == 0) check(0, "unexpected TX nibble");
        else check(txd == tx_expect.pop_front(), $sformatf("TX nibble %0d", tx_got));
        tx_got++;
      end
      if (tx_en && !tx_en_d) bursts++;
      tx_en_d <= tx_en;
    end
  end

  always @(posedge clk) begin
    if (!rst && dn_locked && dn_shift != prev_shift) begin
      n_realign++;
      prev_shift <= dn_shift;
    end
  end

  task automatic dn_stream();
    logic        bits[$];
    logic [15:0] d[$];
    int          sizes[5]  = '{134, 134, 60, 134, 40};
    bit          mine[5]   = '{1, 0, 1, 1, 1};
    int          slip[5]   = '{5, 3, 0, 9, 0};
    for (int i = 0; i < 8; i++) for (int b = 15; b >= 0; b--) bits.push_back(1'(16'h5555 >> b));
    foreach (sizes[k]) begin
      automatic logic [47:0] mac = mine[k] ? my_mac : 48'h0001_0003_0009;
      d.delete();
      d.push_back(mac[47:32]); d.push_back(mac[31:16]); d.push_back(mac[15:0]);
      for (int i = 3; i < (sizes[k] + 1) / 2; i++) d.push_back(16'($urandom) & 16'h7F7F);
      for (int i = 0; i < slip[k]; i++) bits.push_back(1'(i % 2));
      for (int i = 0; i < 3; i++) for (int b = 15; b >= 0; b--) bits.push_back(1'(16'h5555 >> b));
      for (int b = 15; b >= 0; b--) bits.push_back(1'(16'h55E2 >> b));
      for (int b = 15; b >= 0; b--) bits.push_back(1'(16'(sizes[k]) >> b));
      foreach (d[i]) for (int b = 15; b >= 0; b--) bits.push_back(d[i][b]);
      // frames 2 and 3 follow closely, so their lengths reach outcontrol
      // while the first is still leaving
      for (int i = 0; i < 4; i++) for (int b = 15; b >= 0; b--) bits.push_back(1'(16'h5555 >> b));
      if (mine[k]) begin
        dn_accepts++;
        foreach (d[i]) for (int j = 3; j >= 0; j--) tx_expect.push_back(d[i][4*j +: 4]);
      end else n_addrdrop++;
    end
    for (int i = 0; i < 16; i++) for (int b = 15; b >= 0; b--) bits.push_back(1'(16'h5555 >> b));
    while (bits.size() % 16 != 0) bits.push_back(1'b0);
    while (bits.size() > 0) begin
      logic [15:0] w;
      for (int b = 15; b >= 0; b--) w[b] = bits.pop_front();
      @(negedge clk); dn_valid = 1; dn_data = w;
    end
    @(negedge clk); dn_valid = 0;
    dn_done = 1;
  endtask

  // ------------------------------------------------ main sequence
  initial begin
    repeat (5) @(negedge mii_rx_clk);
    rst = 0;
    repeat (5) @(negedge mii_rx_clk);
    // one grant with nothing stored is lost
    @(negedge clk); dba_pulse = 1; @(negedge clk); dba_pulse = 0;
    fork
      dn_stream();
      begin
        send_packet(60);
        send_packet(1500);
        send_packet(7);
        send_packet(268);
        send_packet(1460);
        wait (up_expect.size() == 0);
        // withhold grants: the buffers fill and packets are dropped
        grant_en = 0;
        repeat (8) send_packet(1500);
        repeat (200) @(negedge clk);
        grant_en = 1;
        send_packet(60);
      end
    join
    wait (up_expect.size() == 0);
    repeat (20000) @(negedge clk);
    wait (tx_expect.size() == 0 && !tx_en);
    repeat (20) @(negedge mii_tx_clk);
    n_lostgrant = int'(lost_grants);
    if (bursts < dn_accepts) n_merged = dn_accepts - bursts;
    check(up_expect.size() == 0, "all upstream packets delivered");
    check(slot_count == 0, "buffer3 empty at the end");
    check(tx_expect.size() == 0, "all downstream packets sent on MII");
    check(int'(dn_ok) == dn_accepts, $sformatf("dn_ok %0d expected %0d", dn_ok, dn_accepts));
    check(int'(dn_drop) == n_addrdrop, $sformatf("dn_drop %0d expected %0d", dn_drop, n_addrdrop));
    check(int'(up_drops) == n_drop, "MAC drop count");
    $display("mechanisms: multislot=%0d lastflag=%0d idlefill=%0d b3full=%0d drop=%0d lostgrant=%0d realign=%0d addrdrop=%0d merged=%0d",
             n_multislot, n_lastflag, n_idlefill, n_b3full, n_drop, n_lostgrant, n_realign, n_addrdrop, n_merged);
    $display("upstream: %0d packets, %0d slots, %0d grants; downstream: %0d TX bursts", pkts_checked, slots_seen, grants, bursts);
    check(n_multislot > 0, "multi-slot packet seen");
    check(n_lastflag > 0, "last-slot flag seen");
    check(n_idlefill > 0, "idle fill seen");
    check(n_b3full > 0, "buffer3 full seen");
    check(n_drop > 0, "packet drop on full seen");
    check(n_lostgrant > 0, "lost grant seen");
    check(n_realign > 1, "corrector re-aligned");
    check(n_addrdrop > 0, "address mismatch seen");
    check(n_merged > 0, "merged TX burst seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
