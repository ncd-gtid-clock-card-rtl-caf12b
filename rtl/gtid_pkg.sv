// gtid_pkg: constants and types shared by the GTID / clock card logic.
//
// The register map is the card's VME A16 map: each register is a 16-bit
// word at an even byte offset from the board base address. Reads and
// writes at the same offset can mean different things (offset 14h reads
// the latched lower GTID but writes the lower GTID *counter*). The offsets,
// the Board ID field layout, the board type code 5 for a GTID card and the
// counter widths (24-bit GTID, 48-bit VME clock count) are the card's
// specification; the command strobe bundle is this design's own.
package gtid_pkg;

  // Counter widths.
  localparam int unsigned GTID_LO_W = 16;
  localparam int unsigned GTID_HI_W = 8;
  localparam int unsigned GTID_W    = GTID_LO_W + GTID_HI_W;
  localparam int unsigned VCLK_W    = 48;

  // Address modifiers accepted: A16 non-privileged (29h) and supervisory (2Dh).
  localparam logic [5:0] AM_A16_USER = 6'h29;
  localparam logic [5:0] AM_A16_SUPV = 6'h2D;

  // Register byte offsets from the base address.
  typedef enum logic [5:0] {
    OFF_REG_RESET      = 6'h00,  // W: register reset
    OFF_FAST_CLEAR     = 6'h02,  // W: no function
    OFF_EVENT_RESET    = 6'h08,  // W: NCD GT event reset
    OFF_MB_ENABLE      = 6'h0A,  // W: multiboard output enable, D<0>
    OFF_VCLK_ENABLE    = 6'h0C,  // W: VME clock counter enable, D<0>
    OFF_VCLK_RESET     = 6'h0E,  // W: VME clock counter reset
    OFF_BOARD_ID       = 6'h10,  // R: board ID
    OFF_STATUS         = 6'h12,  // R: status
    OFF_GTID_LO        = 6'h14,  // R: GTID register <15:0>,  W: load counter <15:0>
    OFF_GTID_HI        = 6'h16,  // R: GTID register <23:16>, W: load counter <23:16>
    OFF_VCLK_LO        = 6'h18,  // R/W: VME clock <15:0>
    OFF_VCLK_MID       = 6'h1A,  // R/W: VME clock <31:16>
    OFF_VCLK_HI        = 6'h1C,  // R/W: VME clock <47:32>
    OFF_SOFT_GT        = 6'h20,  // W: software GTRIG
    OFF_SOFT_SYNCLR    = 6'h22,  // W: software SYNCLR
    OFF_SOFT_GT_SYNCLR = 6'h24,  // W: software GTRIG and SYNCLR
    OFF_SOFT_SYNCLR24  = 6'h26,  // W: software SYNCLR24
    OFF_LATCH_GTID     = 6'h28,  // W: test latch GTID register
    OFF_LATCH_VCLK     = 6'h2A   // W: test latch VME clock register
  } reg_off_e;

  // Board ID register: <15:11> revision, <10:8> type, <7:0> serial number.
  typedef enum logic [2:0] {
    BT_TEST = 3'd0, BT_EMIT = 3'd1, BT_NCD = 3'd2, BT_TIMETAG = 3'd3,
    BT_EMIT_CLOCK = 3'd4, BT_GTID = 3'd5
  } board_type_e;

  // Status register bit positions.
  localparam int unsigned ST_MUX_EVT    = 0;
  localparam int unsigned ST_SHAPER_EVT = 1;
  localparam int unsigned ST_VALID_GT   = 2;
  localparam int unsigned ST_COUNT_ERR  = 3;
  localparam int unsigned ST_VCLK_EN    = 4;

  // One-cycle command strobes decoded from register writes.
  typedef struct packed {
    logic reg_reset;
    logic event_reset;
    logic vclk_reset;
    logic load_gtid_lo;
    logic load_gtid_hi;
    logic load_vclk_lo;
    logic load_vclk_mid;
    logic load_vclk_hi;
    logic soft_gt;
    logic soft_synclr;
    logic soft_gt_synclr;
    logic soft_synclr24;
    logic latch_gtid;
    logic latch_vclk;
  } cmd_t;

endpackage
