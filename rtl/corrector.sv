// corrector: downstream bit aligner in front of the main PON MAC.
//
// Words from the PON receiver may be misaligned by any number of bits when
// PSYNC bits are lost. The corrector keeps the previous word and the current
// one as a 32-bit window (first received bit = most significant) and looks
// for the PSYNC+delimiter word 16'h55E2 at each of the 16 bit offsets,
// lowest offset first. When it finds it while `hunt` is high, it adopts that
// offset, and from then on every output word is taken from the window at that
// offset, so the delimiter always leaves as 16'h55E2 and the words after it
// are aligned to it. While `hunt` is low (a packet is in flight) the offset is
// frozen. Output is registered: `dout` is the word formed from the previous
// and current input words, one clock after the current one. Nothing is output
// before the first lock. Re-aligning to the delimiter follows the
// specification; offsets modulo 16 and the hunt gate are this design's
// choices.
module corrector
  import onu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        din_valid,
  input  logic [15:0] din,
  input  logic        hunt,
  output logic        dout_valid,
  output logic [15:0] dout,
  output logic        locked,
  output logic [3:0]  shift
);
  logic [15:0] prev;
  logic [31:0] window;
  logic        found;
  logic [3:0]  found_s, use_s;

  assign window = {prev, din};

  always_comb begin
    found   = 1'b0;
    found_s = '0;
    for (int s = 15; s >= 0; s--) begin
      if (window[31-s -: 16] == DN_SYNC_WORD) begin
        found   = 1'b1;
        found_s = 4'(s);
      end
    end
  end

  assign use_s = (hunt && found) ? found_s : shift;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      prev       <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
      locked     <= 1'b0;
      shift      <= '0;
    end else begin
      dout_valid <= 1'b0;
      if (din_valid) begin
        prev <= din;
        if (hunt && found) begin
          shift  <= found_s;
          locked <= 1'b1;
        end
        dout       <= window[31-use_s -: 16];
        dout_valid <= locked || (hunt && found);
      end
    end
  end
endmodule
