// ptr_sync: two-flop synchroniser for a Gray-coded FIFO pointer.
//
// The pointer is Gray coded by its sender, so at most one bit changes per
// sender clock and the receiving domain sees either the old or the new value.
// Latency is two receiver clocks. Reset clears both stages.
module ptr_sync #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
