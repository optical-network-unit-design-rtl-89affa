// len_buffer: dual-clock FIFO of packet lengths (buffer1 and buffer2 of the
// upstream path, and the length hand-off from the PON MAC to outcontrol on the
// downstream path).
//
// Each entry is one length word. The default, 16 entries of 16 bits, is the
// 32-byte memory the design specifies for buffer1/buffer2. The write and read
// ports run on independent clocks. Their pointers carry one extra wrap bit and
// cross domains in Gray code through ptr_sync, so `full` and the read side's
// empty test are safe across clocks (this crossing scheme is this design's
// choice). The read port is first-word-fall-through: `dvalid` says `dout`
// holds the oldest entry; `rd` while `dvalid` pops it. A write takes effect on
// the read side three read clocks later (memory write, two sync stages) plus
// one clock to load the output register.
module len_buffer #(
  parameter int unsigned W  = 16,
  parameter int unsigned AW = 4
) (
  input  logic         wclk,
  input  logic         rclk,
  input  logic         rst,
  input  logic         we,
  input  logic [W-1:0] din,
  output logic         full,
  input  logic         rd,
  output logic [W-1:0] dout,
  output logic         dvalid
);
  logic [W-1:0] mem [2**AW];

  logic [AW:0] wptr, wptr_g, rptr, rptr_g;
  logic [AW:0] wptr_g_rs, rptr_g_ws, wptr_rs, rptr_ws;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write domain
  assign rptr_ws = gray2bin(rptr_g_ws);
  assign full    = (wptr[AW] != rptr_ws[AW]) && (wptr[AW-1:0] == rptr_ws[AW-1:0]);

  always_ff @(posedge wclk) begin
    if (we && !full) mem[wptr[AW-1:0]] <= din;
  end

  always_ff @(posedge wclk or posedge rst) begin
    if (rst) begin
      wptr   <= '0;
      wptr_g <= '0;
    end else if (we && !full) begin
      wptr   <= wptr + 1'b1;
      wptr_g <= bin2gray(wptr + 1'b1);
    end
  end

  ptr_sync #(.W(AW+1)) u_r2w (.clk(wclk), .rst(rst), .d(rptr_g), .q(rptr_g_ws));
  ptr_sync #(.W(AW+1)) u_w2r (.clk(rclk), .rst(rst), .d(wptr_g), .q(wptr_g_rs));

  // read domain, first-word-fall-through output register
  logic mem_has, load;
  assign wptr_rs = gray2bin(wptr_g_rs);
  assign mem_has = (wptr_rs != rptr);
  assign load    = mem_has && (!dvalid || rd);

  always_ff @(posedge rclk) begin
    if (load) dout <= mem[rptr[AW-1:0]];
  end

  always_ff @(posedge rclk or posedge rst) begin
    if (rst) begin
      rptr   <= '0;
      rptr_g <= '0;
      dvalid <= 1'b0;
    end else begin
      if (load) begin
        rptr   <= rptr + 1'b1;
        rptr_g <= bin2gray(rptr + 1'b1);
      end
      if (load)    dvalid <= 1'b1;
      else if (rd) dvalid <= 1'b0;
    end
  end
endmodule
