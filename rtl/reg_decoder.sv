// reg_decoder: the card's register map.
//
// A register access from the VME slave (one-clock rd_stb or wr_stb with the
// byte offset from the base address) is turned into read data or into
// one-clock command strobes (cmd). Reads: Board ID (10h), Status (12h),
// latched GTID lower/upper (14h/16h), latched VME clock lower/middle/upper
// (18h/1Ah/1Ch). Writes: Register Reset (00h), Fast Clear (02h, no function),
// NCD GT Event Reset (08h), Multiboard Output Enable (0Ah, D<0>), VME Clock
// Counter Enable (0Ch, D<0>), VME Clock Counter Reset (0Eh), loads of the
// GTID and VME clock counters (14h-1Ch), software GTRIG / SYNCLR /
// GTRIG+SYNCLR / SYNCLR24 (20h-26h) and the two test latches (28h, 2Ah).
// The two enable bits live here; Register Reset clears them.
//
// rd_data is combinational from reg_off and is sampled by the VME slave in
// the clock of rd_stb; status_rd marks a Status read in that clock.
// Offsets and bit layouts follow the specification. This design's choices:
// unused offsets read 0, the unused status bits read 0, and the upper GTID
// load takes D<7:0>.
module reg_decoder
  import gtid_pkg::*;
#(
  parameter logic [7:0] BOARD_SERIAL = 8'd40,
  parameter logic [4:0] BOARD_REV    = 5'd2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rd_stb,
  input  logic              wr_stb,
  input  logic [5:0]        reg_off,
  input  logic [15:0]       wr_data,
  output logic [15:0]       rd_data,
  output cmd_t              cmd,
  output logic              status_rd,
  output logic              mb_enable,
  output logic              vclk_enable,
  input  logic [3:0]        event_bits,   // count err, valid GT, shaper, mux
  input  logic [GTID_W-1:0] gtid_reg,
  input  logic [VCLK_W-1:0] vclk_reg
);
  logic [15:0] status_word;

  always_comb begin
    status_word = '0;
    status_word[ST_COUNT_ERR:ST_MUX_EVT] = event_bits;
    status_word[ST_VCLK_EN]              = vclk_enable;
  end

  always_comb begin
    unique case (reg_off)
      OFF_BOARD_ID: rd_data = {BOARD_REV, BT_GTID, BOARD_SERIAL};
      OFF_STATUS:   rd_data = status_word;
      OFF_GTID_LO:  rd_data = gtid_reg[15:0];
      OFF_GTID_HI:  rd_data = {8'h00, gtid_reg[23:16]};
      OFF_VCLK_LO:  rd_data = vclk_reg[15:0];
      OFF_VCLK_MID: rd_data = vclk_reg[31:16];
      OFF_VCLK_HI:  rd_data = vclk_reg[47:32];
      default:      rd_data = '0;
    endcase
  end

  assign status_rd = rd_stb && (reg_off == OFF_STATUS);

  always_comb begin
    cmd = '0;
    if (wr_stb) begin
      unique case (reg_off)
        OFF_REG_RESET:      cmd.reg_reset      = 1'b1;
        OFF_EVENT_RESET:    cmd.event_reset    = 1'b1;
        OFF_VCLK_RESET:     cmd.vclk_reset     = 1'b1;
        OFF_GTID_LO:        cmd.load_gtid_lo   = 1'b1;
        OFF_GTID_HI:        cmd.load_gtid_hi   = 1'b1;
        OFF_VCLK_LO:        cmd.load_vclk_lo   = 1'b1;
        OFF_VCLK_MID:       cmd.load_vclk_mid  = 1'b1;
        OFF_VCLK_HI:        cmd.load_vclk_hi   = 1'b1;
        OFF_SOFT_GT:        cmd.soft_gt        = 1'b1;
        OFF_SOFT_SYNCLR:    cmd.soft_synclr    = 1'b1;
        OFF_SOFT_GT_SYNCLR: cmd.soft_gt_synclr = 1'b1;
        OFF_SOFT_SYNCLR24:  cmd.soft_synclr24  = 1'b1;
        OFF_LATCH_GTID:     cmd.latch_gtid     = 1'b1;
        OFF_LATCH_VCLK:     cmd.latch_vclk     = 1'b1;
        default:            ;  // Fast Clear, enables (below), unused offsets
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mb_enable   <= 1'b0;
      vclk_enable <= 1'b0;
    end else if (wr_stb && reg_off == OFF_REG_RESET) begin
      mb_enable   <= 1'b0;
      vclk_enable <= 1'b0;
    end else if (wr_stb && reg_off == OFF_MB_ENABLE) begin
      mb_enable   <= wr_data[0];
    end else if (wr_stb && reg_off == OFF_VCLK_ENABLE) begin
      vclk_enable <= wr_data[0];
    end
  end
endmodule
