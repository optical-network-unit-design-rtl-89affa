// onu_top: data path of an Optical Network Unit for a distributed-control
// hybrid (WDM + TDM) PON.
//
// Upstream (subscriber to OLT): MII nibbles at 25 MHz enter eth_mac_rx, which
// writes them to buffer0_up and each packet's length to buffer1 and buffer2
// (len_buffer). On the 77.76 MHz side, the bridge copies each complete packet
// from buffer0 into the reorder buffer, the framer cuts it into 280-byte
// slots with a 12-byte header and stores them in buffer3, and buffer3 reports
// its number of complete slots (`slot_count`) to the DBA processor. Every
// `dba_pulse` grant makes dba_control send one slot as 140 16-bit words on
// `up_data`/`up_valid`.
//
// Downstream (OLT to subscriber): 16-bit words at 77.76 MHz pass the
// corrector (bit re-alignment on 16'h55E2), the main PON MAC (header removal
// and MAC address filter) and buffer0_dn; outcontrol sends the accepted
// packets on MII TXD/TX_EN at 25 MHz.
//
// The DBA processor, PHY, SerDes and optics are outside this module: their
// signals are the ports. `rst` is asynchronous and active high and must be
// held for a few cycles of every clock.
module onu_top (
  input  logic        clk,          // 77.76 MHz PON side
  input  logic        mii_rx_clk,   // 25 MHz
  input  logic        mii_tx_clk,   // 25 MHz
  input  logic        rst,
  input  logic [7:0]  onu_id,
  input  logic [47:0] my_mac,
  // upstream
  input  logic        rx_dv,
  input  logic [3:0]  rxd,
  input  logic        dba_pulse,
  output logic [7:0]  slot_count,
  output logic [15:0] up_data,
  output logic        up_valid,
  output logic [15:0] up_drops,
  output logic [15:0] lost_grants,
  output logic        up_busy,      // a granted slot is being sent
  output logic        up_stall,     // buffer3 full: the framer waits
  // downstream
  input  logic        dn_valid,
  input  logic [15:0] dn_data,
  output logic        tx_en,
  output logic [3:0]  txd,
  output logic [15:0] dn_ok,
  output logic [15:0] dn_drop,
  output logic        dn_locked,
  output logic [3:0]  dn_shift      // bit offset the corrector applies
);
  // ---------------- upstream ----------------
  logic        nib_we, mac_len_we, b0_af, b1_full, b2_full, mac_full;
  logic [3:0]  nib;
  logic [15:0] mac_len;
  logic        b0_rd, b0_valid;
  logic [15:0] b0_dout;
  logic        b1_rd, b1_valid, b2_rd, b2_valid;
  logic [15:0] b1_len, b2_len;
  logic        buf_we, buf_full, buf_rd, buf_valid;
  logic [15:0] buf_dout;
  logic        b3_we, b3_full, b3_rd, b3_valid, slot_in, slot_out;
  logic [15:0] b3_din, b3_dout;

  assign mac_full = b0_af || b1_full || b2_full;
  assign up_stall = b3_full;

  eth_mac_rx u_mac (
    .mii_clk(mii_rx_clk), .rst, .rx_dv, .rxd, .full(mac_full),
    .nib_we, .nib, .len_we(mac_len_we), .len(mac_len), .drops(up_drops)
  );

  buffer0_up u_buf0 (
    .wclk(mii_rx_clk), .rclk(clk), .rst, .we(nib_we), .din(nib),
    .almost_full(b0_af), .rd(b0_rd), .dout(b0_dout), .dvalid(b0_valid)
  );

  len_buffer u_buf1 (
    .wclk(mii_rx_clk), .rclk(clk), .rst, .we(mac_len_we), .din(mac_len),
    .full(b1_full), .rd(b1_rd), .dout(b1_len), .dvalid(b1_valid)
  );

  len_buffer u_buf2 (
    .wclk(mii_rx_clk), .rclk(clk), .rst, .we(mac_len_we), .din(mac_len),
    .full(b2_full), .rd(b2_rd), .dout(b2_len), .dvalid(b2_valid)
  );

  bridge u_bridge (
    .clk, .rst, .len_valid(b1_valid), .len(b1_len), .len_rd(b1_rd),
    .b0_valid, .b0_rd, .buf_full, .buf_we
  );

  reorder_buffer u_buf (
    .clk, .rst, .we(buf_we), .din(b0_dout), .full(buf_full),
    .rd(buf_rd), .dout(buf_dout), .dvalid(buf_valid)
  );

  framer u_framer (
    .clk, .rst, .onu_id, .len_valid(b2_valid), .len(b2_len), .len_rd(b2_rd),
    .buf_valid, .buf_data(buf_dout), .buf_rd,
    .b3_full, .b3_we, .b3_data(b3_din), .slot_done(slot_in)
  );

  buffer3 u_buf3 (
    .clk, .rst, .we(b3_we), .din(b3_din), .slot_in, .full(b3_full),
    .rd(b3_rd), .dout(b3_dout), .dvalid(b3_valid), .slot_out, .slot_count
  );

  dba_control u_dba (
    .clk, .rst, .dba_pulse, .slot_count, .b3_valid, .b3_data(b3_dout),
    .b3_rd, .slot_out, .pon_out(up_data), .pon_out_valid(up_valid),
    .busy(up_busy), .lost_grants
  );

  // ---------------- downstream ----------------
  logic        hunt, al_valid;
  logic [15:0] al_data;
  logic        wr_en, wr_commit, wr_rewind, dl_we, dl_full, dl_rd, dl_valid;
  logic [15:0] wr_data, buf_free, dl_len, dl_dout;
  logic        nrd, nvalid;
  logic [3:0]  dnib;
  logic [18:0] pending;       // nibbles still to send; left open, for waveforms only

  corrector u_corr (
    .clk, .rst, .din_valid(dn_valid), .din(dn_data), .hunt,
    .dout_valid(al_valid), .dout(al_data), .locked(dn_locked), .shift(dn_shift)
  );

  pon_mac u_ponmac (
    .clk, .rst, .my_mac, .din_valid(al_valid), .din(al_data), .hunt,
    .wr_en, .wr_data, .wr_commit, .wr_rewind, .buf_free,
    .len_we(dl_we), .len(dl_len), .len_full(dl_full), .pkt_ok(dn_ok), .pkt_drop(dn_drop)
  );

  buffer0_dn u_dbuf0 (
    .wclk(clk), .rclk(mii_tx_clk), .rst, .we(wr_en), .din(wr_data),
    .commit(wr_commit), .rewind(wr_rewind), .free_words(buf_free),
    .rd(nrd), .nib(dnib), .nvalid
  );

  len_buffer u_dlen (
    .wclk(clk), .rclk(mii_tx_clk), .rst, .we(dl_we), .din(dl_len),
    .full(dl_full), .rd(dl_rd), .dout(dl_dout), .dvalid(dl_valid)
  );

  outcontrol u_out (
    .clk(mii_tx_clk), .rst, .len_valid(dl_valid), .len(dl_dout), .len_rd(dl_rd),
    .nvalid, .nib(dnib), .nrd, .tx_en, .txd, .pending
  );
endmodule
