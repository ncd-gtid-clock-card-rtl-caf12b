// vme_clock_counter: 48-bit free-running counter of the 16 MHz VME clock,
// used to time-stamp NCD events when the master trigger card is not running,
// and the 48-bit VME clock count register latched from it.
//
// The counter adds one every clk while `enable` is set (so bit 32 steps every
// 2^32 / 16 MHz = 268.4 s). Each 16-bit third can be loaded from VME.
// Priority in one clock: reset (cnt_reset or reg_reset) > load > count.
// The count register copies the counter on `latch` (valid NCD global trigger
// or test-latch command), taking the value before that clock's update, and is
// cleared by Register Reset. Width, enable, reset, loads and latch follow the
// specification; the priority order is this design's choice.
module vme_clock_counter #(
  parameter int unsigned CNT_W = 48   // 33 .. 48
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic             cnt_reset,
  input  logic             reg_reset,
  input  logic             load_lo,
  input  logic             load_mid,
  input  logic             load_hi,
  input  logic [15:0]      load_data,
  input  logic             latch,
  output logic [CNT_W-1:0] vclk_cnt,
  output logic [CNT_W-1:0] vclk_reg
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vclk_cnt <= '0;
      vclk_reg <= '0;
    end else begin
      if (cnt_reset || reg_reset) begin
        vclk_cnt <= '0;
      end else if (load_lo || load_mid || load_hi) begin
        if (load_lo)  vclk_cnt[15:0]       <= load_data;
        if (load_mid) vclk_cnt[31:16]      <= load_data;
        if (load_hi)  vclk_cnt[CNT_W-1:32] <= load_data[CNT_W-33:0];
      end else if (enable) begin
        vclk_cnt <= vclk_cnt + 1'b1;
      end
      if (reg_reset)  vclk_reg <= '0;
      else if (latch) vclk_reg <= vclk_cnt;
    end
  end

  initial assert (CNT_W > 32 && CNT_W <= 48) else $error("CNT_W must be 33..48 to fit the three 16-bit registers");
endmodule
