// pon_mac: main downstream PON MAC; strips the frame header and keeps only
// packets addressed to this ONU.
//
// A downstream frame, after the corrector, reads
//   ... 16'h5555 (PSYNC) | 16'h55E2 (PSYNC byte, delimiter) | length | data
// where `length` counts the data bytes and the data starts with the 6-byte
// MAC address of the destination ONU. In HUNT the block waits for 16'h55E2
// (and tells the corrector it may re-align). It then takes the length; if
// buffer0 has no room for the packet or the length FIFO is full, the packet
// is skipped. Otherwise the data words are written to buffer0 as they arrive
// and the first three are compared with `my_mac`. On a mismatch buffer0 is
// rewound and the rest of the packet skipped; on a match the whole packet is
// written, committed with its last word, and its length is passed to
// outcontrol. All outputs are combinational from the registered state and
// the (registered) input word. `pkt_ok`/`pkt_drop` count accepted and
// discarded packets. Header removal and the address check follow the
// specification; the rewind and the skip rules are this design's choices.
module pon_mac
  import onu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [47:0] my_mac,
  input  logic        din_valid,
  input  logic [15:0] din,
  output logic        hunt,
  output logic        wr_en,
  output logic [15:0] wr_data,
  output logic        wr_commit,
  output logic        wr_rewind,
  input  logic [15:0] buf_free,
  output logic        len_we,
  output logic [15:0] len,
  input  logic        len_full,
  output logic [15:0] pkt_ok,
  output logic [15:0] pkt_drop
);
  typedef enum logic [2:0] {P_HUNT, P_LEN, P_ADDR, P_DATA, P_SKIP} pstate_t;
  pstate_t     state;
  logic [15:0] len_r, words_left;
  logic [1:0]  addr_idx;
  logic        addr_ok;      // address words so far all matched
  logic        word_match, last_word;
  logic [15:0] words_in;

  assign words_in   = 16'(({1'b0, din} + 17'd1) >> 1);
  assign word_match = (din == my_mac[47 - 16*addr_idx -: 16]);
  assign last_word  = (words_left == 16'd1);
  assign hunt       = (state == P_HUNT);
  assign wr_data    = din;
  assign len        = len_r;

  always_comb begin
    wr_en     = 1'b0;
    wr_commit = 1'b0;
    wr_rewind = 1'b0;
    len_we    = 1'b0;
    if (din_valid) begin
      unique case (state)
        P_ADDR: begin
          wr_en = 1'b1;
          if (addr_idx == 2'(MAC_WORDS - 1)) begin
            if (!(addr_ok && word_match)) wr_rewind = 1'b1;
            else if (last_word) begin
              wr_commit = 1'b1;
              len_we    = 1'b1;
            end
          end
        end
        P_DATA: begin
          wr_en = 1'b1;
          if (last_word) begin
            wr_commit = 1'b1;
            len_we    = 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state      <= P_HUNT;
      len_r      <= '0;
      words_left <= '0;
      addr_idx   <= '0;
      addr_ok    <= 1'b0;
      pkt_ok     <= '0;
      pkt_drop   <= '0;
    end else if (din_valid) begin
      unique case (state)
        P_HUNT: if (din == DN_SYNC_WORD) state <= P_LEN;
        P_LEN: begin
          len_r      <= din;
          words_left <= words_in;
          addr_idx   <= '0;
          addr_ok    <= 1'b1;
          if (words_in < 16'(MAC_WORDS)) begin
            state    <= (words_in == 16'd0) ? P_HUNT : P_SKIP;
            pkt_drop <= pkt_drop + 1'b1;
          end else if (words_in > buf_free || len_full) begin
            state    <= P_SKIP;
            pkt_drop <= pkt_drop + 1'b1;
          end else begin
            state <= P_ADDR;
          end
        end
        P_ADDR: begin
          words_left <= words_left - 1'b1;
          addr_idx   <= addr_idx + 1'b1;
          addr_ok    <= addr_ok && word_match;
          if (addr_idx == 2'(MAC_WORDS - 1)) begin
            if (!(addr_ok && word_match)) begin
              pkt_drop <= pkt_drop + 1'b1;
              state    <= last_word ? P_HUNT : P_SKIP;
            end else if (last_word) begin
              pkt_ok <= pkt_ok + 1'b1;
              state  <= P_HUNT;
            end else begin
              state <= P_DATA;
            end
          end
        end
        P_DATA: begin
          words_left <= words_left - 1'b1;
          if (last_word) begin
            pkt_ok <= pkt_ok + 1'b1;
            state  <= P_HUNT;
          end
        end
        P_SKIP: begin
          words_left <= words_left - 1'b1;
          if (last_word) state <= P_HUNT;
        end
        default: state <= P_HUNT;
      endcase
    end
  end
endmodule
