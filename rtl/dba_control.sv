// dba_control: DBAcontrol, the gate between buffer3 and the upstream PON
// output.
//
// Each `dba_pulse` from the DBA processor grants one slot. If buffer3 holds a
// complete slot and no slot is being sent, the block raises buffer3's read
// enable and sends the slot's 140 words (280 bytes, two per clock) on
// `pon_out`, one word per clock with `pon_out_valid`; a byte counter falls by
// two per word. After the last word it pulses `slot_out` so buffer3 lowers its
// slot count. Grants that cannot be served (no complete slot, or a slot in
// progress) are ignored and counted in `lost_grants`. Output is registered:
// a word appears one clock after it is read. The 280-byte read per grant
// follows the specification; dropping unserviceable grants is this design's
// choice.
module dba_control
  import onu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        dba_pulse,
  input  logic [7:0]  slot_count,
  input  logic        b3_valid,
  input  logic [15:0] b3_data,
  output logic        b3_rd,
  output logic        slot_out,
  output logic [15:0] pon_out,
  output logic        pon_out_valid,
  output logic        busy,
  output logic [15:0] lost_grants
);
  logic [15:0] bytes_left;

  assign b3_rd = busy && b3_valid;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      busy          <= 1'b0;
      bytes_left    <= '0;
      slot_out      <= 1'b0;
      pon_out       <= '0;
      pon_out_valid <= 1'b0;
      lost_grants   <= '0;
    end else begin
      slot_out      <= 1'b0;
      pon_out_valid <= b3_rd;
      if (b3_rd) pon_out <= b3_data;
      if (!busy) begin
        if (dba_pulse) begin
          if (slot_count != 8'd0) begin
            busy       <= 1'b1;
            bytes_left <= 16'(SLOT_BYTES);
          end else begin
            lost_grants <= lost_grants + 1'b1;
          end
        end
      end else begin
        if (dba_pulse) lost_grants <= lost_grants + 1'b1;
        if (b3_rd) begin
          bytes_left <= bytes_left - 16'd2;
          if (bytes_left == 16'd2) begin
            busy     <= 1'b0;
            slot_out <= 1'b1;
          end
        end
      end
    end
  end
endmodule
