// framer: cuts each upstream packet into 280-byte slots.
//
// For every packet length in buffer2 the framer builds as many slots as the
// packet needs (a 1500-byte packet needs six). Each slot is 140 words:
//   words 0-3  preamble 16'h5555
//   word  4    delimiter 8'hE2 in the upper byte, the ONU-ID in the lower
//   word  5    payload length: 16'h010C (268) while more than 268 bytes
//              remain, otherwise 16'h8000 | remaining bytes (last slot)
//   words 6-139 packet data from the reorder buffer, and after the packet's
//              last word the idle word 16'hAAAA up to the end of the slot.
// One word is written to buffer3 per clock (`b3_we`/`b3_data`,
// combinational from the registered state); the framer holds while the
// reorder buffer has no word or buffer3 is full. `slot_done` marks the last
// word of each slot. Slot size, header contents, the last-slot flag and the
// idle fill follow the specification; the stall behaviour is this design's
// choice.
module framer
  import onu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  onu_id,
  input  logic        len_valid,
  input  logic [15:0] len,
  output logic        len_rd,
  input  logic        buf_valid,
  input  logic [15:0] buf_data,
  output logic        buf_rd,
  input  logic        b3_full,
  output logic        b3_we,
  output logic [15:0] b3_data,
  output logic        slot_done
);
  typedef enum logic [1:0] {F_IDLE, F_HDR, F_DATA, F_PAD} fstate_t;
  fstate_t     state;
  logic [7:0]  slot_word;    // position inside the slot, 0..139
  logic [15:0] bytes_left;   // packet bytes not yet framed
  logic [15:0] words_left;   // packet words not yet framed
  logic        last_in_slot;

  assign last_in_slot = (slot_word == 8'(SLOT_WORDS - 1));
  assign len_rd       = (state == F_IDLE) && len_valid;

  always_comb begin
    b3_we   = 1'b0;
    b3_data = IDLE_WORD;
    buf_rd  = 1'b0;
    unique case (state)
      F_HDR: begin
        b3_we = !b3_full;
        if (slot_word < 8'(PREAMBLE_WORDS))        b3_data = PREAMBLE_WORD;
        else if (slot_word == 8'(PREAMBLE_WORDS))  b3_data = {DELIMITER, onu_id};
        else if (bytes_left > 16'(PAYLOAD_BYTES))  b3_data = 16'(PAYLOAD_BYTES);
        else                                       b3_data = LAST_SLOT_FLAG | bytes_left;
      end
      F_DATA: begin
        b3_we   = buf_valid && !b3_full;
        buf_rd  = b3_we;
        b3_data = buf_data;
      end
      F_PAD: b3_we = !b3_full;
      default: ;
    endcase
  end

  assign slot_done = b3_we && last_in_slot;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state      <= F_IDLE;
      slot_word  <= '0;
      bytes_left <= '0;
      words_left <= '0;
    end else begin
      unique case (state)
        F_IDLE: if (len_valid && len != 16'd0) begin
          state      <= F_HDR;
          slot_word  <= '0;
          bytes_left <= len;
          words_left <= (len + 16'd1) >> 1;
        end
        F_HDR: if (b3_we) begin
          slot_word <= slot_word + 1'b1;
          if (slot_word == 8'(HDR_WORDS - 1)) state <= F_DATA;
        end
        F_DATA: if (b3_we) begin
          words_left <= words_left - 1'b1;
          bytes_left <= (bytes_left > 16'd2) ? bytes_left - 16'd2 : 16'd0;
          if (last_in_slot) begin
            slot_word <= '0;
            state     <= (words_left == 16'd1) ? F_IDLE : F_HDR;
          end else begin
            slot_word <= slot_word + 1'b1;
            if (words_left == 16'd1) state <= F_PAD;
          end
        end
        F_PAD: if (b3_we) begin
          if (last_in_slot) begin
            slot_word <= '0;
            state     <= F_IDLE;
          end else begin
            slot_word <= slot_word + 1'b1;
          end
        end
        default: state <= F_IDLE;
      endcase
    end
  end
endmodule
