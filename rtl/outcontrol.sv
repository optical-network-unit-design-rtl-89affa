// outcontrol: MII transmit control of the downstream path.
//
// Every packet length the PON MAC reports (through a dual-clock length FIFO)
// is added to `pending`, the number of nibbles still to send; lengths are
// rounded up to whole 16-bit words, since buffer0 holds whole words. While
// `pending` is non-zero and buffer0 has a nibble, the block reads one nibble
// per 25 MHz clock and drives it on TXD with TX_EN high (both registered,
// one clock after the read). Lengths that arrive while a packet is leaving
// are added to the count, so back-to-back packets go out in one TX_EN burst.
// Adding the lengths and raising TX_EN follow the specification; the nibble
// count and the rounding are this design's choices.
module outcontrol (
  input  logic        clk,
  input  logic        rst,
  input  logic        len_valid,
  input  logic [15:0] len,
  output logic        len_rd,
  input  logic        nvalid,
  input  logic [3:0]  nib,
  output logic        nrd,
  output logic        tx_en,
  output logic [3:0]  txd,
  output logic [18:0] pending
);
  logic [16:0] even_bytes;
  logic [18:0] add;          // nibbles to add

  assign len_rd     = len_valid;
  assign even_bytes = ({1'b0, len} + 17'd1) & ~17'd1;
  assign add        = len_valid ? {1'b0, even_bytes, 1'b0} : '0;
  assign nrd    = (pending != '0) && nvalid;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      pending <= '0;
      tx_en   <= 1'b0;
      txd     <= '0;
    end else begin
      pending <= pending + add - {18'd0, nrd};
      tx_en   <= nrd;
      if (nrd) txd <= nib;
    end
  end
endmodule
