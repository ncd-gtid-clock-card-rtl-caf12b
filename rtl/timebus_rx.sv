// timebus_rx: receiver for the SNO time bus, merged with the software
// time-bus commands.
//
// The MTC/D drives three lines that matter here: GTRIG (count one global
// trigger), SYNCLR (clear the lower 16 GTID bits) and SYNCLR24 (clear the
// upper 8 bits). The GTID counter steps on the leading edge of GTRIG and the
// count is latched on its trailing edge; at lower-count rollover the MTC/D
// raises SYNCLR while GTRIG is still high. The PED line is not used.
//
// Each line is synchronised to clk, ORed with a software-made copy of the
// same line, and edge-detected, so a software command goes through exactly
// the logic a real pulse does. Software pulses are SOFT_GT_LEN clocks long;
// for "GTRIG and SYNCLR" the SYNCLR pulse starts one clock after GTRIG rises
// and ends one clock before GTRIG falls, giving the order
// GTRIG rise -> SYNCLR rise -> GTRIG fall that the MTC/D produces. The pulse
// length and the SYNCLR placement inside GTRIG are this design's choices.
//
// Timing: edge outputs are one-cycle pulses, 2 clocks after an external
// edge and 1 clock after a software command strobe.
module timebus_rx #(
  parameter int unsigned SOFT_GT_LEN = 4   // >= 3
) (
  input  logic clk,
  input  logic rst_n,
  // time bus, asynchronous
  input  logic tb_gtrig,
  input  logic tb_synclr,
  input  logic tb_synclr24,
  // software command strobes, one cycle each
  input  logic soft_gt,
  input  logic soft_synclr,
  input  logic soft_gt_synclr,
  input  logic soft_synclr24,
  // events
  output logic gt_rise,
  output logic gt_fall,
  output logic synclr_rise,
  output logic synclr24_rise,
  // merged synchronised levels
  output logic gt_level,
  output logic synclr_level,
  output logic synclr24_level
);
  localparam logic [SOFT_GT_LEN-1:0] ONES  = '1;
  // SYNCLR inside GTRIG: clocks 1 .. LEN-2 of the GTRIG pulse
  localparam logic [SOFT_GT_LEN-1:0] INNER = (ONES >> 2) << 1;

  logic gt_s, sc_s, sc24_s;

  sync2 u_sync_gt   (.clk, .rst_n, .din(tb_gtrig),    .dout(gt_s));
  sync2 u_sync_sc   (.clk, .rst_n, .din(tb_synclr),   .dout(sc_s));
  sync2 u_sync_sc24 (.clk, .rst_n, .din(tb_synclr24), .dout(sc24_s));

  // Software pulse shapers: bit 0 drives the line, shifted right each clock.
  logic [SOFT_GT_LEN-1:0] gt_sr, sc_sr, sc24_sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gt_sr   <= '0;
      sc_sr   <= '0;
      sc24_sr <= '0;
    end else begin
      gt_sr   <= (gt_sr   >> 1) | ((soft_gt || soft_gt_synclr) ? ONES : '0);
      sc_sr   <= (sc_sr   >> 1) | (soft_synclr ? ONES : '0) | (soft_gt_synclr ? INNER : '0);
      sc24_sr <= (sc24_sr >> 1) | (soft_synclr24 ? ONES : '0);
    end
  end

  assign gt_level       = gt_s   | gt_sr[0];
  assign synclr_level   = sc_s   | sc_sr[0];
  assign synclr24_level = sc24_s | sc24_sr[0];

  logic gt_q, sc_q, sc24_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gt_q   <= 1'b0;
      sc_q   <= 1'b0;
      sc24_q <= 1'b0;
    end else begin
      gt_q   <= gt_level;
      sc_q   <= synclr_level;
      sc24_q <= synclr24_level;
    end
  end

  assign gt_rise       =  gt_level       & ~gt_q;
  assign gt_fall       = ~gt_level       &  gt_q;
  assign synclr_rise   =  synclr_level   & ~sc_q;
  assign synclr24_rise =  synclr24_level & ~sc24_q;

  initial assert (SOFT_GT_LEN >= 3) else $error("SOFT_GT_LEN must be at least 3");
endmodule
