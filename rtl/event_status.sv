// event_status: NCD event capture and the event half of the status register.
//
// Two kinds of NCD event arrive on the front panel: a trigger from the NCD
// MUX controller (mux_trig) and the daisy-chained enable/disable line of the
// NCD shaper cards (mb_in, "shaper lockout"). Both are synchronised; a rising
// edge sets "NCD Mux Event" or "NCD Shaper ADC Event". The shaper line only
// counts while Multiboard Output Enable is set, and the same enable gates it
// onward to the next board (mb_out = mb_in AND mb_enable, no clock).
// Each accepted event edge also sends an NCD_GT_LEN-clock trigger pulse
// (ncd_gt_out) to the master trigger card, which answers with GTRIG.
//
// On the first GTRIG trailing edge while an event is pending and
// "Valid NCD GT Clock" is clear, the block sets Valid and pulses latch_regs
// for one clock, so the GTID and VME clock registers capture the count of the
// trigger belonging to the event. Later triggers leave them alone until the
// NCD GT Event Reset (or Register Reset) clears the three bits. An event edge
// in the same clock as a clear is kept, so no event is lost.
//
// "Count Error" is set by a count_err_evt pulse from the GTID counter and
// cleared by the status-register read that returns it; Register Reset does
// not clear it.
//
// Following the specification: the status bits, what sets and clears them,
// the enable gating. This design's choices: edge-triggered capture, latching
// on the first trigger only, clear-on-read of Count Error (as the prototype
// was observed to behave) and the ncd_gt_out pulse length.
module event_status #(
  parameter int unsigned NCD_GT_LEN = 4   // >= 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic mux_trig,       // asynchronous
  input  logic mb_in,          // asynchronous
  input  logic mb_enable,
  output logic mb_out,
  input  logic gt_fall,
  input  logic count_err_evt,
  input  logic status_rd,
  input  logic event_reset,
  input  logic reg_reset,
  output logic mux_evt,
  output logic shaper_evt,
  output logic valid_gt,
  output logic count_err,
  output logic latch_regs,
  output logic ncd_gt_out
);
  localparam int unsigned LW = $clog2(NCD_GT_LEN + 1);

  logic mux_s, mb_s, mux_q, mb_q;
  logic mux_edge, shaper_edge, clr;
  logic [LW-1:0] gt_cnt;

  sync2 u_sync_mux (.clk, .rst_n, .din(mux_trig), .dout(mux_s));
  sync2 u_sync_mb  (.clk, .rst_n, .din(mb_in),    .dout(mb_s));

  assign mux_edge    = mux_s & ~mux_q;
  assign shaper_edge = mb_s & ~mb_q & mb_enable;
  assign clr         = event_reset | reg_reset;
  assign latch_regs  = gt_fall & (mux_evt | shaper_evt) & ~valid_gt & ~clr;
  assign mb_out      = mb_in & mb_enable;
  assign ncd_gt_out  = (gt_cnt != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mux_q      <= 1'b0;
      mb_q       <= 1'b0;
      mux_evt    <= 1'b0;
      shaper_evt <= 1'b0;
      valid_gt   <= 1'b0;
      count_err  <= 1'b0;
      gt_cnt     <= '0;
    end else begin
      mux_q <= mux_s;
      mb_q  <= mb_s;

      if (mux_edge)  mux_evt <= 1'b1;
      else if (clr)  mux_evt <= 1'b0;

      if (shaper_edge) shaper_evt <= 1'b1;
      else if (clr)    shaper_evt <= 1'b0;

      if (clr)             valid_gt <= 1'b0;
      else if (latch_regs) valid_gt <= 1'b1;

      if (count_err_evt)  count_err <= 1'b1;
      else if (status_rd) count_err <= 1'b0;

      if (mux_edge || shaper_edge) gt_cnt <= LW'(NCD_GT_LEN);
      else if (gt_cnt != '0)       gt_cnt <= gt_cnt - 1'b1;
    end
  end

  initial assert (NCD_GT_LEN >= 1) else $error("NCD_GT_LEN must be at least 1");
endmodule
