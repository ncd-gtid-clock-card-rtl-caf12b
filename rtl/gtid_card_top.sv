// gtid_card_top: logic of the NCD GTID / clock card.
//
// The card ties the NCD data-acquisition electronics to the SNO trigger
// system. It keeps its own copy of the 24-bit global trigger ID (GTID),
// stepped by the time bus of the master trigger card (MTC/D), and a 48-bit
// count of the 16 MHz VME clock for use when the MTC/D is not running. When
// an NCD MUX or NCD shaper event arrives, the card flags it, asks the MTC/D
// for a global trigger (ncd_gt_out), and on the trailing edge of the next
// GTRIG latches the GTID and the VME clock count into registers that the
// host reads over VME. The host then clears the event with NCD GT Event
// Reset. Without an MTC/D, the host issues software GTRIG / SYNCLR commands.
//
// Blocks: vme_slave (A16/D16 bus cycles) -> reg_decoder (register map,
// command strobes, enable bits) -> timebus_rx (time bus + software pulses),
// gtid_counter, vme_clock_counter, event_status; led_stretch drives the four
// LEDs. Everything runs on clk, the 16 MHz VME clock; sysreset_n clears all
// state, including the GTID counter, which Register Reset leaves alone.
//
// Ports are the logic levels after the card's ECL/NIM/TTL receivers and
// drivers. The VME data bus is split into d_in, d_out and an output enable;
// DTACK* is an active-low level meant for an open-collector driver.
module gtid_card_top
  import gtid_pkg::*;
#(
  parameter logic [15:0] BASE_ADDR    = 16'h7000,
  parameter logic [7:0]  BOARD_SERIAL = 8'd40,
  parameter logic [4:0]  BOARD_REV    = 5'd2,
  parameter int unsigned LED_HOLD     = 1_600_000
) (
  input  logic        clk,
  input  logic        sysreset_n,
  // VME bus
  input  logic [15:1] vme_a,
  input  logic [5:0]  vme_am,
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_write_n,
  input  logic        vme_iack_n,
  input  logic [15:0] vme_d_in,
  output logic [15:0] vme_d_out,
  output logic        vme_d_oe,
  output logic        vme_dtack_n,
  // time bus from the MTC/D
  input  logic        tb_gtrig,
  input  logic        tb_synclr,
  input  logic        tb_synclr24,
  // NCD front panel
  input  logic        mux_trig,
  input  logic        mb_in,
  output logic        mb_out,
  output logic        ncd_gt_out,
  // LEDs
  output logic        led_mtcd_gt,
  output logic        led_synclr,
  output logic        led_ncd_gt,
  output logic        led_synclr24
);
  logic              rst_n;
  logic              rd_stb, wr_stb, status_rd;
  logic [5:0]        reg_off;
  logic [15:0]       wr_data, rd_data;
  cmd_t              cmd;
  logic              mb_enable, vclk_enable;
  logic              gt_rise, gt_fall, synclr_rise, synclr24_rise;
  logic              gt_level, synclr_level, synclr24_level;
  logic [GTID_W-1:0] gtid_cnt, gtid_reg;
  logic [VCLK_W-1:0] vclk_cnt, vclk_reg;
  logic              count_err_evt, latch_regs;
  logic              mux_evt, shaper_evt, valid_gt, count_err;

  assign rst_n = sysreset_n;

  vme_slave #(.BASE_ADDR(BASE_ADDR)) u_vme (
    .clk, .rst_n,
    .vme_a, .vme_am, .vme_as_n, .vme_ds_n, .vme_write_n, .vme_iack_n,
    .vme_d_in, .vme_d_out, .vme_d_oe, .vme_dtack_n,
    .rd_stb, .wr_stb, .reg_off, .wr_data, .rd_data
  );

  reg_decoder #(.BOARD_SERIAL(BOARD_SERIAL), .BOARD_REV(BOARD_REV)) u_regs (
    .clk, .rst_n, .rd_stb, .wr_stb, .reg_off, .wr_data, .rd_data,
    .cmd, .status_rd, .mb_enable, .vclk_enable,
    .event_bits({count_err, valid_gt, shaper_evt, mux_evt}),
    .gtid_reg, .vclk_reg
  );

  timebus_rx u_tbus (
    .clk, .rst_n, .tb_gtrig, .tb_synclr, .tb_synclr24,
    .soft_gt(cmd.soft_gt), .soft_synclr(cmd.soft_synclr),
    .soft_gt_synclr(cmd.soft_gt_synclr), .soft_synclr24(cmd.soft_synclr24),
    .gt_rise, .gt_fall, .synclr_rise, .synclr24_rise,
    .gt_level, .synclr_level, .synclr24_level
  );

  gtid_counter u_gtid (
    .clk, .rst_n, .gt_rise, .synclr_rise, .synclr24_rise,
    .latch(latch_regs || cmd.latch_gtid), .reg_reset(cmd.reg_reset),
    .load_lo(cmd.load_gtid_lo), .load_hi(cmd.load_gtid_hi), .load_data(wr_data),
    .gtid_cnt, .gtid_reg, .count_err(count_err_evt)
  );

  vme_clock_counter u_vclk (
    .clk, .rst_n, .enable(vclk_enable),
    .cnt_reset(cmd.vclk_reset), .reg_reset(cmd.reg_reset),
    .load_lo(cmd.load_vclk_lo), .load_mid(cmd.load_vclk_mid), .load_hi(cmd.load_vclk_hi),
    .load_data(wr_data), .latch(latch_regs || cmd.latch_vclk),
    .vclk_cnt, .vclk_reg
  );

  event_status u_evt (
    .clk, .rst_n, .mux_trig, .mb_in, .mb_enable, .mb_out,
    .gt_fall, .count_err_evt, .status_rd,
    .event_reset(cmd.event_reset), .reg_reset(cmd.reg_reset),
    .mux_evt, .shaper_evt, .valid_gt, .count_err, .latch_regs, .ncd_gt_out
  );

  led_stretch #(.HOLD(LED_HOLD)) u_led_gt   (.clk, .rst_n, .pulse(gt_rise),       .led(led_mtcd_gt));
  led_stretch #(.HOLD(LED_HOLD)) u_led_sc   (.clk, .rst_n, .pulse(synclr_rise),   .led(led_synclr));
  led_stretch #(.HOLD(LED_HOLD)) u_led_ncd  (.clk, .rst_n, .pulse(ncd_gt_out),    .led(led_ncd_gt));
  led_stretch #(.HOLD(LED_HOLD)) u_led_sc24 (.clk, .rst_n, .pulse(synclr24_rise), .led(led_synclr24));
endmodule
