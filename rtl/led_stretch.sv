// led_stretch: retriggerable pulse stretcher for a front-panel LED.
//
// A one-clock event on `pulse` loads a down-counter with HOLD; the LED is on
// while the counter is non-zero, so it stays lit for HOLD clocks after the
// last event (default 1,600,000 clocks = 0.1 s at 16 MHz). The card has
// LEDs for the MTC/D global trigger, SYNCLR, NCD GT and SYNCLR24; how they
// are stretched is this design's choice.
module led_stretch #(
  parameter int unsigned HOLD = 1_600_000   // >= 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pulse,
  output logic led
);
  localparam int unsigned W = $clog2(HOLD + 1);
  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          cnt <= '0;
    else if (pulse)      cnt <= W'(HOLD);
    else if (cnt != '0)  cnt <= cnt - 1'b1;
  end

  assign led = (cnt != '0);
endmodule
