// reorder_buffer: the upstream "buffer" between buffer0 and the framer.
//
// buffer0 packs the first nibble of a word into its least significant bits,
// so nibbles 1,2,3,4 arrive here as 16'h4321. This block swaps the four
// nibbles back (16'h1234, first nibble most significant, as the slot format
// expects) and stores the words in a single-clock FIFO (sync_fifo) that the
// framer reads at its own pace. Interface: write `we`/`din`, `full`;
// first-word-fall-through read `rd`/`dout`/`dvalid`. A written word can be
// read one clock later. The reordering follows the specification; the depth
// (1024 words) is this design's choice.
module reorder_buffer #(
  parameter int unsigned AW = 10
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        we,
  input  logic [15:0] din,
  output logic        full,
  input  logic        rd,
  output logic [15:0] dout,
  output logic        dvalid
);
  logic [15:0] swapped;

  always_comb begin
    for (int i = 0; i < 4; i++) swapped[15-4*i -: 4] = din[4*i +: 4];
  end

  sync_fifo #(.W(16), .AW(AW)) u_fifo (
    .clk, .rst, .we, .din(swapped), .full, .rd, .dout, .dvalid
  );
endmodule
