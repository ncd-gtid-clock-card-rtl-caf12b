// tb_timebus_rx: checks the time-bus receiver. External GTRIG, SYNCLR and
// SYNCLR24 pulses must give one rise (and for GTRIG one fall) event each, two
// clocks after the edge. Software commands must give events in the order of
// a real pulse: GTRIG rise one clock after the command and fall SOFT_GT_LEN
// clocks later; for GTRIG+SYNCLR the SYNCLR rise lies strictly between them.
module tb_timebus_rx;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned LEN = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tb_gtrig = 0, tb_synclr = 0, tb_synclr24 = 0;
  logic soft_gt = 0, soft_synclr = 0, soft_gt_synclr = 0, soft_synclr24 = 0;
  logic gt_rise, gt_fall, synclr_rise, synclr24_rise, gt_level, synclr_level, synclr24_level;
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_gr = 0, n_gf = 0, n_sr = 0, n_s24 = 0;
  int t_gr, t_gf, t_sr, t_s24;

  timebus_rx #(.SOFT_GT_LEN(LEN)) dut (.*);

  always #31.25 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (gt_rise)       begin n_gr++;  t_gr  = cyc; end
    if (gt_fall)       begin n_gf++;  t_gf  = cyc; end
    if (synclr_rise)   begin n_sr++;  t_sr  = cyc; end
    if (synclr24_rise) begin n_s24++; t_s24 = cyc; end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic clear_counts();
    n_gr = 0; n_gf = 0; n_sr = 0; n_s24 = 0;
  endtask

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    clear_counts();
    // external GTRIG, 5 clocks long
    t0 = cyc; tb_gtrig = 1;
    repeat (5) @(negedge clk);
    tb_gtrig = 0;
    repeat (6) @(negedge clk);
    check(n_gr == 1 && n_gf == 1 && n_sr == 0, "one GTRIG rise and fall");
    check(t_gr - t0 == 2, $sformatf("GTRIG rise latency %0d, expected 2", t_gr - t0));
    check(t_gf - t_gr == 5, "GTRIG fall 5 clocks after rise");
    // external SYNCLR inside GTRIG, and SYNCLR24
    clear_counts();
    tb_gtrig = 1; @(negedge clk);
    tb_synclr = 1; tb_synclr24 = 1; @(negedge clk);
    tb_synclr = 0; tb_synclr24 = 0; @(negedge clk);
    tb_gtrig = 0;
    repeat (6) @(negedge clk);
    check(n_gr == 1 && n_sr == 1 && n_s24 == 1 && n_gf == 1, "external SYNCLR and SYNCLR24 seen once");
    check(t_gr < t_sr && t_sr < t_gf, "external order GTRIG rise, SYNCLR, GTRIG fall");
    // software GTRIG
    clear_counts();
    t0 = cyc; soft_gt = 1; @(negedge clk); soft_gt = 0;
    repeat (LEN + 4) @(negedge clk);
    check(n_gr == 1 && n_gf == 1 && n_sr == 0, "software GTRIG gives one rise and fall");
    check(t_gr - t0 == 1 && t_gf - t_gr == LEN, $sformatf("soft GT timing rise %0d fall %0d", t_gr - t0, t_gf - t_gr));
    // software GTRIG and SYNCLR
    clear_counts();
    soft_gt_synclr = 1; @(negedge clk); soft_gt_synclr = 0;
    repeat (LEN + 4) @(negedge clk);
    check(n_gr == 1 && n_gf == 1 && n_sr == 1, "software GT+SYNCLR events");
    check(t_gr < t_sr && t_sr < t_gf, $sformatf("soft order %0d < %0d < %0d", t_gr, t_sr, t_gf));
    // software SYNCLR and SYNCLR24 alone
    clear_counts();
    soft_synclr = 1; @(negedge clk); soft_synclr = 0;
    repeat (LEN + 2) @(negedge clk);
    soft_synclr24 = 1; @(negedge clk); soft_synclr24 = 0;
    repeat (LEN + 2) @(negedge clk);
    check(n_sr == 1 && n_s24 == 1 && n_gr == 0, "software SYNCLR and SYNCLR24");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
