// buffer3: slot store in front of the upstream PON output, and the ONU's
// queue report to the DBA processor.
//
// The framer writes slot words (`we`/`din`) and pulses `slot_in` with the last
// word of each 280-byte slot; DBAcontrol reads words (first-word-fall-through
// `rd`/`dout`/`dvalid`) and pulses `slot_out` when a slot has been read out.
// `slot_count` is the number of complete slots held, updated in the clock
// after each pulse; it is what the DBA processor sees. Storage is a
// single-clock sync_fifo of 1024 words (this design's choice; enough for
// seven slots). Counting slots and reporting them to the DBA follows the
// specification. An assertion checks that no slot is read out that was never
// stored; its `disable iff (rst)` uses the asynchronous reset as an ordinary
// signal, which lint reports as a reset used both ways. That is harmless,
// because the assertion is not hardware.
module buffer3 #(
  parameter int unsigned AW = 10
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        we,
  input  logic [15:0] din,
  input  logic        slot_in,
  output logic        full,
  input  logic        rd,
  output logic [15:0] dout,
  output logic        dvalid,
  input  logic        slot_out,
  output logic [7:0]  slot_count
);
  sync_fifo #(.W(16), .AW(AW)) u_fifo (
    .clk, .rst, .we, .din, .full, .rd, .dout, .dvalid
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) slot_count <= '0;
    else unique case ({slot_in, slot_out})
      2'b10:   slot_count <= slot_count + 1'b1;
      2'b01:   slot_count <= slot_count - 1'b1;
      default: ;
    endcase
  end

  property p_no_underflow;
    @(posedge clk) disable iff (rst) slot_out |-> (slot_count != 0 || slot_in);
  endproperty
  a_no_underflow: assert property (p_no_underflow);
endmodule
