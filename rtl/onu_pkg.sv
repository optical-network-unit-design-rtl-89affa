// onu_pkg: constants shared by the ONU upstream and downstream data paths.
//
// Upstream slots are 280 bytes: a 12-byte header (four 16'h5555 preamble
// words, the delimiter byte 8'hE2 followed by the ONU-ID byte, and a 2-byte
// payload length) and 268 payload bytes. The payload length of a full slot
// is 16'h010C; the last slot of a packet sets bit 15 and carries the bytes
// that remain. Unused slot space is filled with the idle word 16'hAAAA.
// Downstream frames start with PSYNC bytes 8'h55, the delimiter 8'hE2 and a
// 2-byte length. All of these values are the ones the design is specified
// with; the data path is 16 bits wide on the PON side and 4 bits (MII) on the
// Ethernet side.
package onu_pkg;
  localparam int unsigned WORD_W        = 16;
  localparam int unsigned NIB_W         = 4;
  localparam int unsigned LEN_W         = 16;

  localparam int unsigned SLOT_BYTES    = 280;
  localparam int unsigned HDR_BYTES     = 12;
  localparam int unsigned PAYLOAD_BYTES = SLOT_BYTES - HDR_BYTES;   // 268
  localparam int unsigned SLOT_WORDS    = SLOT_BYTES / 2;           // 140
  localparam int unsigned HDR_WORDS     = HDR_BYTES / 2;            // 6
  localparam int unsigned PREAMBLE_WORDS = 4;

  localparam logic [15:0] PREAMBLE_WORD = 16'h5555;
  localparam logic [7:0]  DELIMITER     = 8'hE2;
  localparam logic [15:0] IDLE_WORD     = 16'hAAAA;
  localparam logic [15:0] LAST_SLOT_FLAG = 16'h8000;

  localparam logic [15:0] DN_SYNC_WORD  = 16'h55E2;  // PSYNC byte + delimiter
  localparam int unsigned MAC_WORDS     = 3;         // 48-bit address
endpackage
