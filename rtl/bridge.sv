// bridge: moves whole packets from upstream buffer0 into the reorder buffer.
//
// buffer0's output word is wired straight to the buffer's input; the bridge
// only drives the two enables. When buffer1 holds a length (a complete packet
// is in buffer0), the bridge pops it and then transfers ceil(length/2) words,
// one per clock, pausing whenever buffer0 has no word yet or the buffer is
// full. `b0_rd` and `buf_we` are the same combinational strobe, so a word
// leaves buffer0 exactly when it is written. The packet-at-a-time behaviour
// and the word count follow the specification; the stall rule is this
// design's choice.
module bridge (
  input  logic        clk,
  input  logic        rst,
  input  logic        len_valid,
  input  logic [15:0] len,
  output logic        len_rd,
  input  logic        b0_valid,
  output logic        b0_rd,
  input  logic        buf_full,
  output logic        buf_we
);
  logic [15:0] words_left;
  logic        active;

  assign len_rd = !active && len_valid;
  assign b0_rd  = active && b0_valid && !buf_full;
  assign buf_we = b0_rd;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      active     <= 1'b0;
      words_left <= '0;
    end else if (!active) begin
      if (len_valid && len != 16'd0) begin
        active     <= 1'b1;
        words_left <= (len + 16'd1) >> 1;
      end
    end else if (b0_rd) begin
      words_left <= words_left - 1'b1;
      if (words_left == 16'd1) active <= 1'b0;
    end
  end
endmodule
