// fs_pkg: constants and types shared by the frame synchronizer.
//
// The frame format is the one of the satellite link this design serves:
// 2400 eight-bit words per frame (19200 bits), the first 8 words carrying a
// 64-bit frame sync code (FSC), the first 16 words a fixed test pattern.
// The FSC and the 16-byte pattern are the values shown for the link's test
// pattern; the second half of the pattern (bytes 9..16) comes from that
// pattern listing as well.  The encodings of the flywheel state and of the
// slip position are this design's own choice.
package fs_pkg;

  localparam int unsigned FRAME_WORDS_DEFAULT = 2400;
  localparam int unsigned FRAME_BITS_DEFAULT  = FRAME_WORDS_DEFAULT * 8;  // 19200
  localparam int unsigned WIN_START_DEFAULT   = 19198;

  // Frame sync code, sent MSB first: 0C 28 F2 2C EA 7D 0E 24.
  localparam logic [63:0] FSC_DEFAULT = 64'h0C28_F22C_EA7D_0E24;

  // Bytes 9..16 of the fixed pattern: DA DE C6 97 73 2A FE 04.
  localparam logic [63:0] TAIL_DEFAULT = 64'hDADE_C697_732A_FE04;

  // Complete 16-byte fixed pattern at the start of every frame.
  localparam logic [127:0] PATTERN_DEFAULT = {FSC_DEFAULT, TAIL_DEFAULT};

  // Flywheel synchroniser states.
  typedef enum logic [1:0] {
    ST_SEARCH = 2'd0,
    ST_VERIFY = 2'd1,
    ST_LOCK   = 2'd2,
    ST_CHECK  = 2'd3
  } fw_state_e;

  // Where in the 3-bit slip window an accepted sync was found.
  typedef enum logic [1:0] {
    SLIP_NONE  = 2'd0,   // found outside a window (search mode)
    SLIP_EARLY = 2'd1,   // one bit early
    SLIP_ZERO  = 2'd2,   // at the expected bit
    SLIP_LATE  = 2'd3    // one bit late
  } slip_e;

  // Per-channel status brought out of the top level.
  typedef struct packed {
    fw_state_e   state;        // flywheel state
    logic        raw_detect;   // correlator score reached the threshold
    logic        frame_sync;   // sync accepted by the flywheel
    logic        loss_pulse;   // window closed with no sync
    logic        frame_mark;   // frame boundary (found or flywheeled)
    slip_e       slip;         // position of the last accepted sync
    logic        in_window;    // the 3-bit sync window is open
    logic [14:0] bit_count;    // frame bit counter
    logic [6:0]  score;        // correlation score (matching bits)
    logic        data_out;     // delayed serial data for the recorder
    logic        ref_ready;    // reference latch holds a loaded code
  } chan_status_t;

endpackage
