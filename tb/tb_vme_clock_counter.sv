// tb_vme_clock_counter: checks the 48-bit VME clock counter: one count per
// enabled clock (rate check over a measured interval), hold when disabled,
// loads of each 16-bit third, carry across the thirds, reset, latch into
// the count register and Register Reset.
module tb_vme_clock_counter;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0;
  logic enable = 0, cnt_reset = 0, reg_reset = 0, load_lo = 0, load_mid = 0, load_hi = 0, latch = 0;
  logic [15:0] load_data = '0;
  logic [47:0] vclk_cnt, vclk_reg;
  int checks = 0, failures = 0;

  vme_clock_counter dut (.*);

  always #31.25 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic pulse_load(input int which, input logic [15:0] d);
    load_data = d;
    case (which)
      0: load_lo = 1;
      1: load_mid = 1;
      default: load_hi = 1;
    endcase
    @(negedge clk);
    {load_lo, load_mid, load_hi} = '0;
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [47:0] a;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(vclk_cnt == 0 && vclk_reg == 0, "reset");
    repeat (10) @(negedge clk);
    check(vclk_cnt == 0, "no count while disabled");
    enable = 1;
    a = vclk_cnt;
    repeat (1000) @(negedge clk);
    check(vclk_cnt - a == 48'd1000, $sformatf("rate: %0d counts in 1000 clocks", vclk_cnt - a));
    enable = 0;
    a = vclk_cnt;
    repeat (7) @(negedge clk);
    check(vclk_cnt == a, "holds when disabled");
    // loads
    pulse_load(0, 16'hFFFD);
    pulse_load(1, 16'hFFFF);
    pulse_load(2, 16'h1234);
    check(vclk_cnt == 48'h1234_FFFF_FFFD, $sformatf("loads give %h", vclk_cnt));
    enable = 1;
    repeat (5) @(negedge clk);
    check(vclk_cnt == 48'h1235_0000_0002, $sformatf("carry across thirds: %h", vclk_cnt));
    // latch takes the value before that clock's count
    a = vclk_cnt;
    latch = 1;
    @(negedge clk) latch = 0;
    check(vclk_reg == a, "latch");
    repeat (3) @(negedge clk);
    check(vclk_reg == a, "register holds");
    // counter reset
    cnt_reset = 1;
    @(negedge clk) cnt_reset = 0;
    check(vclk_cnt == 0 && vclk_reg == a, "counter reset leaves register");
    @(negedge clk);
    check(vclk_cnt == 1, "counts on after reset");
    // register reset
    reg_reset = 1;
    @(negedge clk) reg_reset = 0;
    check(vclk_cnt == 0 && vclk_reg == 0, "register reset clears counter and register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
