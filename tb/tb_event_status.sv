// tb_event_status: checks NCD event capture and the status bits.
// MUX pulse -> Mux Event and an ncd_gt_out pulse of NCD_GT_LEN clocks;
// first GTRIG trailing edge -> Valid NCD GT Clock and one latch pulse, later
// ones no latch; NCD GT Event Reset clears; shaper input ignored while
// Multiboard Output Enable is off and passed through (mb_out) only when on;
// Count Error sticky until a status read; Register Reset clears events but
// not Count Error; an event in the same clock as a clear is kept.
module tb_event_status;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned GTLEN = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic mux_trig = 0, mb_in = 0, mb_enable = 0, gt_fall = 0, count_err_evt = 0;
  logic status_rd = 0, event_reset = 0, reg_reset = 0;
  logic mb_out, mux_evt, shaper_evt, valid_gt, count_err, latch_regs, ncd_gt_out;
  int checks = 0, failures = 0;
  int n_latch = 0, n_gt_clocks = 0;

  event_status #(.NCD_GT_LEN(GTLEN)) dut (.*);

  always #31.25 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && latch_regs) n_latch++;
    if (rst_n && ncd_gt_out) n_gt_clocks++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic pulse(ref logic s);
    s = 1'b1; @(negedge clk); s = 1'b0;
  endtask

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check({mux_evt, shaper_evt, valid_gt, count_err} == 0, "reset");
    // GTRIG with no event: nothing latched
    pulse(gt_fall);
    check(n_latch == 0 && !valid_gt, "no latch without an event");
    // MUX event
    mux_trig = 1; repeat (3) @(negedge clk); mux_trig = 0;
    repeat (GTLEN + 4) @(negedge clk);
    check(mux_evt && !shaper_evt && !valid_gt, "MUX event set");
    check(n_gt_clocks == GTLEN, $sformatf("ncd_gt_out %0d clocks, expected %0d", n_gt_clocks, GTLEN));
    pulse(gt_fall);
    check(valid_gt && n_latch == 1, "first GTRIG after event latches and sets Valid");
    pulse(gt_fall);
    check(n_latch == 1, "second GTRIG does not latch again");
    pulse(event_reset);
    check({mux_evt, shaper_evt, valid_gt} == 0, "NCD GT Event Reset clears");
    // shaper input while disabled
    mb_in = 1; @(negedge clk);
    check(mb_out == 0, "mb_out gated off");
    repeat (3) @(negedge clk); mb_in = 0; repeat (3) @(negedge clk);
    check(!shaper_evt, "shaper ignored while disabled");
    mb_enable = 1;
    mb_in = 1; #1;
    check(mb_out == 1, "mb_out follows mb_in when enabled");
    repeat (3) @(negedge clk); mb_in = 0; repeat (3) @(negedge clk);
    check(shaper_evt && !mux_evt, "shaper event set when enabled");
    pulse(gt_fall);
    check(valid_gt && n_latch == 2, "shaper event latches on GTRIG");
    // count error sticky until read
    pulse(count_err_evt);
    repeat (3) @(negedge clk);
    check(count_err, "count error sticky");
    pulse(reg_reset);
    check(count_err && {mux_evt, shaper_evt, valid_gt} == 0, "register reset clears events, keeps count error");
    pulse(status_rd);
    check(!count_err, "status read clears count error");
    // event edge in the same clock as a clear is kept
    mux_trig = 1; @(negedge clk); @(negedge clk);
    // mux edge is visible now (two-flop synchroniser): clear in this clock
    event_reset = 1; @(negedge clk); event_reset = 0;
    mux_trig = 0;
    check(mux_evt, "event coinciding with clear kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
