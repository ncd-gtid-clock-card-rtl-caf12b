// tb_led_stretch: checks the LED pulse stretcher with a short HOLD.
// A single pulse must light the LED for exactly HOLD clocks; a second pulse
// while lit must restart the hold time.
module tb_led_stretch;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned HOLD = 5;
  logic clk = 1'b0, rst_n = 1'b0, pulse = 1'b0, led;
  int checks = 0, failures = 0;

  led_stretch #(.HOLD(HOLD)) dut (.clk, .rst_n, .pulse, .led);

  always #31.25 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Count clocks the LED stays on after one pulse.
  task automatic measure(output int n);
    n = 0;
    @(negedge clk) pulse = 1'b1;
    @(negedge clk) pulse = 1'b0;
    while (led) begin n++; @(negedge clk); end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(led == 1'b0, "LED off after reset");
    measure(n);
    check(n == HOLD, $sformatf("hold time %0d, expected %0d", n, HOLD));
    measure(n);
    check(n == HOLD, "second pulse same hold time");
    // retrigger after 3 clocks: on for 3 + HOLD clocks in total
    @(negedge clk) pulse = 1'b1;
    @(negedge clk) pulse = 1'b0;
    repeat (2) @(negedge clk);
    pulse = 1'b1;
    @(negedge clk) pulse = 1'b0;
    n = 3;
    while (led) begin n++; @(negedge clk); end
    check(n == 3 + HOLD, $sformatf("retriggered on time %0d, expected %0d", n, 3 + HOLD));
    repeat (10) @(negedge clk);
    check(led == 1'b0, "LED off when idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
