// eth_mac_rx: upstream Ethernet MAC on the MII receive side.
//
// While RX_DV is high the MII nibbles are forwarded one per 25 MHz clock to
// buffer0 (`nib_we`/`nib`) and counted. When RX_DV falls the packet is padded
// with 4'b0000 nibbles up to a whole 16-bit word (at most three extra clocks,
// well inside the inter-frame gap), and its length in bytes (nibbles / 2,
// rounded up) is written to buffer1 and buffer2 with a one-clock `len_we`.
// If `full` is high when a packet starts, the whole packet is dropped and
// `drops` counts it; a packet already being stored is always completed.
// Packets longer than MAX_PKT_BYTES are cut at that size. Counting, padding
// and dropping follow the specification; sampling `full` only at the packet
// start and the length cap are this design's choices.
module eth_mac_rx #(
  parameter int unsigned MAX_PKT_BYTES = 1536
) (
  input  logic        mii_clk,
  input  logic        rst,
  input  logic        rx_dv,
  input  logic [3:0]  rxd,
  input  logic        full,
  output logic        nib_we,
  output logic [3:0]  nib,
  output logic        len_we,
  output logic [15:0] len,
  output logic [15:0] drops
);
  typedef enum logic [1:0] {IDLE, RECV, DROP, PAD} state_t;
  state_t      state;
  logic [15:0] nib_cnt;     // nibbles written for this packet
  logic [15:0] real_len;    // bytes received, latched when RX_DV falls

  localparam logic [15:0] MAX_NIB = 16'(2 * MAX_PKT_BYTES);

  always_ff @(posedge mii_clk or posedge rst) begin
    if (rst) begin
      state   <= IDLE;
      nib_cnt <= '0;
      nib_we  <= 1'b0;
      nib     <= '0;
      len_we  <= 1'b0;
      len     <= '0;
      drops   <= '0;
      real_len <= '0;
    end else begin
      nib_we <= 1'b0;
      len_we <= 1'b0;
      unique case (state)
        IDLE: if (rx_dv) begin
          if (full) begin
            state <= DROP;
            drops <= drops + 1'b1;
          end else begin
            state   <= RECV;
            nib_we  <= 1'b1;
            nib     <= rxd;
            nib_cnt <= 16'd1;
          end
        end
        RECV: begin
          if (rx_dv) begin
            if (nib_cnt < MAX_NIB) begin
              nib_we  <= 1'b1;
              nib     <= rxd;
              nib_cnt <= nib_cnt + 1'b1;
            end
          end else if (nib_cnt[1:0] != 2'b00) begin
            state    <= PAD;
            real_len <= (nib_cnt + 16'd1) >> 1;
            nib_we  <= 1'b1;
            nib     <= 4'b0000;
            nib_cnt <= nib_cnt + 1'b1;
          end else begin
            state  <= IDLE;
            len_we <= 1'b1;
            len    <= nib_cnt >> 1;
          end
        end
        PAD: begin
          // nib_cnt already counts the pad nibbles; the byte count uses the
          // number of real nibbles, rounded up
          if (nib_cnt[1:0] != 2'b00) begin
            nib_we  <= 1'b1;
            nib     <= 4'b0000;
            nib_cnt <= nib_cnt + 1'b1;
          end else begin
            state  <= IDLE;
            len_we <= 1'b1;
            len    <= real_len;
          end
        end
        DROP: if (!rx_dv) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
