// l1_pkg: types and constants shared by the L1 readout board modules.
//
// The board takes HPD pixel events from 12 optical input channels, optionally
// zero-suppresses them, stores them in six external L1 buffer memories (two
// channels per memory) and sends requested memory rows as Ethernet frames over
// a 100baseTX link. Everything moves as 16-bit words; a 32-bit event word is
// carried as two 16-bit words, low half first, so that the bytes of the final
// Ethernet payload read correctly as little-endian 32-bit words.
//
// From the document: the event sizes (L1 header, two L0 headers, 32 or 256
// pixel rows, one parity word), the L1 header layout, the zero-suppressed word
// layout, the 1024-byte memory row and the register numbering. This design's
// own choices: the 18-bit FIFO word split (16 data bits plus start and end of
// event flags) and the numeric command codes of the control interface.
package l1_pkg;

  localparam int unsigned N_CHANNELS   = 12;
  localparam int unsigned N_MEMORIES   = 6;
  // 32-bit words in a pixel block
  localparam int unsigned LHCB_ROWS    = 32;
  localparam int unsigned ALICE_ROWS   = 256;
  // 32-bit words of an input event: L0[0], L0[1], pixel rows, parity
  localparam int unsigned LHCB_IN_W32  = 2 + LHCB_ROWS + 1;    // 35
  localparam int unsigned ALICE_IN_W32 = 2 + ALICE_ROWS + 1;   // 259
  // 16-bit words of a stored event (L1 header added)
  localparam int unsigned LHCB_OUT_W16  = 2 * (LHCB_IN_W32 + 1);  // 72
  localparam int unsigned ALICE_OUT_W16 = 2 * (ALICE_IN_W32 + 1); // 520
  // one memory row = one Ethernet payload = 1024 bytes = 512 16-bit words
  localparam int unsigned ROW_BYTES    = 1024;
  localparam int unsigned ROW_W16      = ROW_BYTES / 2;

  // 18-bit FIFO word: start-of-event flag, end-of-event flag, 16 data bits
  typedef struct packed {
    logic        sof;
    logic        eof;
    logic [15:0] data;
  } fifo_word_t;

  // L1 header word (Table 1 of the board description)
  typedef struct packed {
    logic        reserved;   // 31
    logic [14:0] event_id;   // 30:16
    logic [2:0]  bank_id;    // 15:13
    logic        alice;      // 12  0 = LHCb, 1 = ALICE
    logic        zs;         // 11  zero-suppressed
    logic [10:0] zs_count;   // 10:0 number of 32-bit zero-suppressed words
  } l1_header_t;

  // per-channel configuration register (control register 16+n)
  typedef struct packed {
    logic [11:0] unused;
    logic        force_mode; // 3
    logic        alice;      // 2  used only when force_mode = 1
    logic        inhibit;    // 1
    logic        zs_enable;  // 0
  } chan_cfg_t;

  // control-interface message types (numeric codes are this design's choice)
  typedef enum logic [7:0] {
    CMD_STATUS_REQUEST = 8'h01,
    CMD_RESET_REQUEST  = 8'h02,
    CMD_CONFIG_DATA    = 8'h03,
    CMD_L1_RESET       = 8'h04,
    CMD_STATUS         = 8'h81
  } cmd_t;

  // Ethernet CRC-32 (IEEE 802.3, reflected, polynomial 0xEDB88320) over one byte
  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input logic [7:0] b);
    logic [31:0] c;
    c = crc ^ {24'h0, b};
    for (int i = 0; i < 8; i++)
      c = c[0] ? ((c >> 1) ^ 32'hEDB88320) : (c >> 1);
    return c;
  endfunction

endpackage
