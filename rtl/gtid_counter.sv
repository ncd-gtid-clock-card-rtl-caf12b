// gtid_counter: the card's copy of the SNO global trigger ID (GTID) counter
// and the GTID register latched from it.
//
// The 24-bit count is a lower 16-bit and an upper 8-bit half, kept in step
// with the master trigger card by the time bus:
//   * GTRIG leading edge  - count + 1 (a lower-half wrap carries upward);
//   * SYNCLR leading edge - first checks that the lower half is FFFF and
//     pulses count_err if not, then clears the lower half and carries one
//     into the upper half, so that the trigger during which the MTC/D sends
//     SYNCLR reads as xx+1:0000;
//   * SYNCLR24 leading edge - clears the upper half (wins over a carry).
// When GTRIG and SYNCLR edges fall in the same clock, the increment is
// applied first and the check sees the incremented value.
// VME loads of either half override the time bus in that clock. The GTID
// register copies the count on `latch` (trailing GTRIG edge of a valid NCD
// event, or the test-latch command); it sees the count as it was before that
// clock's updates. Register Reset (reg_reset) clears the GTID register but
// not the counter; only the power-on reset clears the counter.
//
// Following the specification: widths, edges, the FFFF check and the reset
// rules. This design's reading: the upper half steps on SYNCLR (the card's
// bench test reports "Lower GTID gets cleared and the Upper GTID gets
// incremented" for GTRIG+SYNCLR), and a load of the upper half takes D<7:0>.
module gtid_counter
  import gtid_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 gt_rise,
  input  logic                 synclr_rise,
  input  logic                 synclr24_rise,
  input  logic                 latch,
  input  logic                 reg_reset,
  input  logic                 load_lo,
  input  logic                 load_hi,
  input  logic [15:0]          load_data,
  output logic [GTID_W-1:0]    gtid_cnt,
  output logic [GTID_W-1:0]    gtid_reg,
  output logic                 count_err
);
  logic [GTID_LO_W-1:0] lo, lo_inc, lo_nxt;
  logic [GTID_HI_W-1:0] hi, hi_nxt;
  logic                 wrap, carry, err_nxt;

  always_comb begin
    {wrap, lo_inc} = {1'b0, lo} + (GTID_LO_W+1)'(gt_rise);
    lo_nxt  = lo_inc;
    carry   = wrap;
    err_nxt = 1'b0;
    if (synclr_rise) begin
      err_nxt = (lo_inc != '1);
      lo_nxt  = '0;
      carry   = 1'b1;
    end
    hi_nxt = hi + GTID_HI_W'(carry);
    if (synclr24_rise) hi_nxt = '0;
    if (load_lo) lo_nxt = load_data[GTID_LO_W-1:0];
    if (load_hi) hi_nxt = load_data[GTID_HI_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lo        <= '0;
      hi        <= '0;
      gtid_reg  <= '0;
      count_err <= 1'b0;
    end else begin
      lo        <= lo_nxt;
      hi        <= hi_nxt;
      count_err <= err_nxt;
      if (reg_reset)  gtid_reg <= '0;
      else if (latch) gtid_reg <= {hi, lo};
    end
  end

  assign gtid_cnt = {hi, lo};
endmodule
