// buffer0_dn: downstream buffer0, from the 16-bit 77.76 MHz PON side to the
// 4-bit 25 MHz MII transmit side.
//
// The PON MAC writes words (`we`/`din`) as a packet arrives. `rewind` moves
// the write pointer to the last commit point (a packet for another ONU);
// `commit` publishes everything written so far, including a word written in
// the same clock, to the read side. Only committed words are visible to the
// reader. The committed pointer crosses to the MII clock in Gray code; the
// read pointer crosses back for `free_words`. The read side hands out one
// nibble per `rd`, most significant nibble first (16'h1234 leaves as 1,2,3,4),
// first-word-fall-through (`nvalid`). Widths and clocks follow the
// specification; the depth, commit/rewind and nibble order are this design's
// choices.
module buffer0_dn #(
  parameter int unsigned AW = 10
) (
  input  logic        wclk,
  input  logic        rclk,
  input  logic        rst,
  input  logic        we,
  input  logic [15:0] din,
  input  logic        commit,
  input  logic        rewind,
  output logic [15:0] free_words,
  input  logic        rd,
  output logic [3:0]  nib,
  output logic        nvalid
);
  logic [15:0] mem [2**AW];

  logic [AW:0] wptr, cptr, cptr_g, cptr_g_rs, cptr_rs;
  logic [AW:0] rptr, rptr_g, rptr_g_ws, rptr_ws, used;
  logic        full;

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  assign rptr_ws    = gray2bin(rptr_g_ws);
  assign used       = wptr - rptr_ws;
  assign full       = used[AW];
  assign free_words = 16'((AW+1)'(2**AW) - used);

  always_ff @(posedge wclk) begin
    if (we && !full && !rewind) mem[wptr[AW-1:0]] <= din;
  end

  always_ff @(posedge wclk or posedge rst) begin
    if (rst) begin
      wptr   <= '0;
      cptr   <= '0;
      cptr_g <= '0;
    end else if (rewind) begin
      wptr <= cptr;
    end else begin
      logic [AW:0] nxt;
      nxt = (we && !full) ? wptr + 1'b1 : wptr;
      wptr <= nxt;
      if (commit) begin
        cptr   <= nxt;
        cptr_g <= nxt ^ (nxt >> 1);
      end
    end
  end

  ptr_sync #(.W(AW+1)) u_r2w (.clk(wclk), .rst(rst), .d(rptr_g), .q(rptr_g_ws));
  ptr_sync #(.W(AW+1)) u_w2r (.clk(rclk), .rst(rst), .d(cptr_g), .q(cptr_g_rs));

  // ---------------- read side ----------------
  logic [15:0] word;
  logic        wvalid, load, last_nib;
  logic [1:0]  idx;

  assign cptr_rs  = gray2bin(cptr_g_rs);
  assign last_nib = (idx == 2'd3);
  assign load     = (cptr_rs != rptr) && (!wvalid || (rd && last_nib));
  assign nvalid   = wvalid;
  assign nib      = word[15 - 4*idx -: 4];

  always_ff @(posedge rclk) begin
    if (load) word <= mem[rptr[AW-1:0]];
  end

  always_ff @(posedge rclk or posedge rst) begin
    if (rst) begin
      rptr   <= '0;
      rptr_g <= '0;
      wvalid <= 1'b0;
      idx    <= '0;
    end else begin
      if (load) begin
        rptr   <= rptr + 1'b1;
        rptr_g <= (rptr + 1'b1) ^ ((rptr + 1'b1) >> 1);
      end
      if (rd && wvalid) idx <= idx + 1'b1;
      if (load)                         wvalid <= 1'b1;
      else if (rd && wvalid && last_nib) wvalid <= 1'b0;
    end
  end
endmodule
