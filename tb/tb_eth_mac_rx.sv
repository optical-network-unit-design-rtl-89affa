// tb_eth_mac_rx: self-checking test of the upstream Ethernet MAC.
// Sends MII packets of several sizes, with gaps, and checks the nibbles
// forwarded to buffer0 (including the zero padding to a whole 16-bit word),
// the length written to buffer1/buffer2, whole-packet dropping while `full`
// is high at the packet start, and truncation at MAX_PKT_BYTES (set to 64).
module tb_eth_mac_rx;
  logic mii_clk = 0, rst = 1;
  logic rx_dv = 0, full = 0;
  logic [3:0] rxd = 0;
  logic nib_we, len_we;
  logic [3:0] nib;
  logic [15:0] len, drops;
  int checks = 0, failures = 0;
  logic [3:0]  exp_nibs[$];
  logic [15:0] exp_lens[$];
  int nibs_seen = 0, lens_seen = 0;

  always #20 mii_clk = ~mii_clk;

  eth_mac_rx #(.MAX_PKT_BYTES(64)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge mii_clk) begin
    if (nib_we && !rst) begin
      nibs_seen++;
      if (exp_nibs.size() == 0) check(0, "unexpected nibble");
      else begin
        automatic logic [3:0] e = exp_nibs.pop_front();
        check(nib == e, $sformatf("nibble %h expected %h", nib, e));
      end
    end
    if (len_we && !rst) begin
      lens_seen++;
      if (exp_lens.size() == 0) check(0, "unexpected length");
      else begin
        automatic logic [15:0] e = exp_lens.pop_front();
        check(len == e, $sformatf("length %0d expected %0d", len, e));
      end
    end
  end

  // send `n` nibbles; `keep` says whether the MAC should store them
  task automatic send(int n, bit keep);
    int stored;
    stored = (n > 128) ? 128 : n;
    if (keep) begin
      for (int i = 0; i < n; i++) begin
        automatic logic [3:0] v = 4'($urandom);
        if (i < stored) exp_nibs.push_back(v);
        @(negedge mii_clk); rx_dv = 1; rxd = v;
      end
      while (stored % 4 != 0) begin exp_nibs.push_back(4'h0); stored++; end
      exp_lens.push_back(16'(((n > 128 ? 128 : n) + 1) / 2));
    end else begin
      for (int i = 0; i < n; i++) begin
        @(negedge mii_clk); rx_dv = 1; rxd = 4'($urandom);
      end
    end
    @(negedge mii_clk); rx_dv = 0;
    repeat (24) @(negedge mii_clk);   // inter-frame gap
  endtask

  initial begin
    repeat (3) @(negedge mii_clk);
    rst = 0;
    send(120, 1);     // 60 bytes, word aligned
    send(10, 1);      // 5 bytes: two zero nibbles of padding
    send(9, 1);       // odd nibble count: three zero nibbles
    send(7, 1);
    full = 1;
    send(40, 0);      // dropped
    send(12, 0);      // dropped
    full = 0;
    send(16, 1);
    // full rising in the middle of a packet does not cut it
    fork
      send(40, 1);
      begin repeat (5) @(negedge mii_clk); full = 1; repeat (10) @(negedge mii_clk); full = 0; end
    join
    send(200, 1);     // truncated to 64 bytes
    repeat (10) @(negedge mii_clk);
    check(exp_nibs.size() == 0, "all nibbles forwarded");
    check(exp_lens.size() == 0, "all lengths written");
    check(lens_seen == 7, $sformatf("%0d lengths written, expected 7", lens_seen));
    check(drops == 16'd2, $sformatf("drops %0d expected 2", drops));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge mii_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
