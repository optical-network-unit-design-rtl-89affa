// sync_fifo: single-clock FIFO on a block-RAM style memory with a
// first-word-fall-through output register.
//
// `we` writes `din` unless `full`. The memory is read synchronously into the
// output register whenever that register is empty or being popped, so `dout`
// is valid (`dvalid`) one clock after a word is written into an empty FIFO and
// a word can be popped every clock. Capacity is 2**AW words in the memory
// plus the one in the output register. Used by reorder_buffer and buffer3.
module sync_fifo #(
  parameter int unsigned W  = 16,
  parameter int unsigned AW = 10
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         we,
  input  logic [W-1:0] din,
  output logic         full,
  input  logic         rd,
  output logic [W-1:0] dout,
  output logic         dvalid
);
  logic [W-1:0] mem [2**AW];
  logic [AW:0]  wptr, rptr;
  logic         mem_has, load;

  assign full    = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);
  assign mem_has = (wptr != rptr);
  assign load    = mem_has && (!dvalid || rd);

  always_ff @(posedge clk) begin
    if (we && !full) mem[wptr[AW-1:0]] <= din;
    if (load)        dout <= mem[rptr[AW-1:0]];
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wptr   <= '0;
      rptr   <= '0;
      dvalid <= 1'b0;
    end else begin
      if (we && !full) wptr <= wptr + 1'b1;
      if (load)        rptr <= rptr + 1'b1;
      if (load)        dvalid <= 1'b1;
      else if (rd)     dvalid <= 1'b0;
    end
  end
endmodule
