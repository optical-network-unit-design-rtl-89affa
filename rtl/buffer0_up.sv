// buffer0_up: upstream buffer0, the width and clock-domain converter between
// the MII receive side and the PON side.
//
// The write port takes one nibble per 25 MHz MII clock; the read port delivers
// one 16-bit word per 77.76 MHz system clock. As in the dual-port block RAM it
// stands for, four consecutive nibbles fill one word from the least
// significant end, so nibbles 1,2,3,4 read back as 16'h4321 (the following
// `reorder_buffer` restores the order). Pointers cross the clock domains in
// Gray code (nibble pointer to the read side, word pointer to the write side);
// the read side only sees whole words. `almost_full` tells the Ethernet MAC
// that fewer than RESERVE_NIB nibbles are free, i.e. a maximum-size packet
// might not fit. The read port is first-word-fall-through (`dvalid`/`rd`).
// The default depth of 8192 nibbles holds one maximum-size packet still
// waiting to be drained plus the next one arriving after a minimum
// inter-frame gap: the bridge only starts on a complete packet, so with half
// that depth every second back-to-back long packet would be dropped.
// Depth and the crossing scheme are this design's choices; the widths and
// clocks follow the specification.
module buffer0_up #(
  parameter int unsigned NIB_AW      = 13,
  parameter int unsigned RESERVE_NIB = 3072
) (
  input  logic        wclk,
  input  logic        rclk,
  input  logic        rst,
  input  logic        we,
  input  logic [3:0]  din,
  output logic        almost_full,
  input  logic        rd,
  output logic [15:0] dout,
  output logic        dvalid
);
  localparam int unsigned WAW = NIB_AW - 2;   // word address width

  logic [15:0] mem [2**WAW];

  logic [NIB_AW:0] wptr, wptr_g, wptr_g_rs, wptr_rs;
  logic [WAW:0]    rptr, rptr_g, rptr_g_ws, rptr_ws;
  logic [NIB_AW:0] used;
  logic            full;

  function automatic logic [NIB_AW:0] gray2bin_w(input logic [NIB_AW:0] g);
    logic [NIB_AW:0] b;
    b[NIB_AW] = g[NIB_AW];
    for (int i = int'(NIB_AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction
  function automatic logic [WAW:0] gray2bin_r(input logic [WAW:0] g);
    logic [WAW:0] b;
    b[WAW] = g[WAW];
    for (int i = int'(WAW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side (MII clock) ----------------
  assign rptr_ws     = gray2bin_r(rptr_g_ws);
  assign used        = wptr - {rptr_ws, 2'b00};
  assign full        = used[NIB_AW];
  assign almost_full = (NIB_AW+1)'(2**NIB_AW) - used < (NIB_AW+1)'(RESERVE_NIB);

  always_ff @(posedge wclk) begin
    if (we && !full) mem[wptr[NIB_AW-1:2]][wptr[1:0]*4 +: 4] <= din;
  end

  always_ff @(posedge wclk or posedge rst) begin
    if (rst) begin
      wptr   <= '0;
      wptr_g <= '0;
    end else if (we && !full) begin
      wptr   <= wptr + 1'b1;
      wptr_g <= (wptr + 1'b1) ^ ((wptr + 1'b1) >> 1);
    end
  end

  ptr_sync #(.W(WAW+1))    u_r2w (.clk(wclk), .rst(rst), .d(rptr_g), .q(rptr_g_ws));
  ptr_sync #(.W(NIB_AW+1)) u_w2r (.clk(rclk), .rst(rst), .d(wptr_g), .q(wptr_g_rs));

  // ---------------- read side (system clock) ----------------
  logic mem_has, load;
  assign wptr_rs = gray2bin_w(wptr_g_rs);
  assign mem_has = (wptr_rs[NIB_AW:2] != rptr);
  assign load    = mem_has && (!dvalid || rd);

  always_ff @(posedge rclk) begin
    if (load) dout <= mem[rptr[WAW-1:0]];
  end

  always_ff @(posedge rclk or posedge rst) begin
    if (rst) begin
      rptr   <= '0;
      rptr_g <= '0;
      dvalid <= 1'b0;
    end else begin
      if (load) begin
        rptr   <= rptr + 1'b1;
        rptr_g <= (rptr + 1'b1) ^ ((rptr + 1'b1) >> 1);
      end
      if (load)    dvalid <= 1'b1;
      else if (rd) dvalid <= 1'b0;
    end
  end
endmodule
