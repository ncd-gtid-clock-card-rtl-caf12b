// tb_gtid_card_top: end-to-end test of the GTID / clock card at its default
// parameters, driven over VME as a host would drive it.
//
// It follows the host's event sequence (poll status, global trigger, read
// GTID and clock, NCD GT Event Reset) for events from the MUX input and from
// the shaper daisy chain, with triggers from the time bus and from software,
// and covers: the GTID rollover with SYNCLR inside GTRIG (no count error), an
// out-of-step SYNCLR (count error, cleared by the read), SYNCLR24 from bus and
// software, test latches, the VME clock count rate, VME clock loads and reset,
// Register Reset (counter kept), the multiboard enable and the LEDs. Each of
// these mechanisms is counted and must have happened at least once.
module tb_gtid_card_top;
  timeunit 1ns; timeprecision 1ps;
  import gtid_pkg::*;

  logic        clk = 1'b0, sysreset_n = 1'b0;
  logic [15:1] vme_a = '0;
  logic [5:0]  vme_am = 6'h29;
  logic        vme_as_n = 1, vme_write_n = 1, vme_iack_n = 1;
  logic [1:0]  vme_ds_n = 2'b11;
  logic [15:0] vme_d_in = '0, vme_d_out;
  logic        vme_d_oe, vme_dtack_n;
  logic        tb_gtrig = 0, tb_synclr = 0, tb_synclr24 = 0;
  logic        mux_trig = 0, mb_in = 0, mb_out, ncd_gt_out;
  logic        led_mtcd_gt, led_synclr, led_ncd_gt, led_synclr24;

  gtid_card_top dut (.*);

  localparam logic [15:0] BASE = 16'h7000;
  int checks = 0, failures = 0, cyc = 0;
  int n_ncd_gt = 0;
  logic ncd_gt_q = 0;

  // mechanisms
  typedef enum int {
    M_MUX_EVT, M_SHAPER_EVT, M_MB_GATED, M_HW_GT_LATCH, M_SOFT_GT_LATCH,
    M_ROLLOVER, M_COUNT_ERR, M_ERR_CLEAR_ON_READ, M_SYNCLR24_HW, M_SYNCLR24_SOFT,
    M_EVENT_RESET, M_REG_RESET, M_TEST_LATCH_GTID, M_TEST_LATCH_VCLK,
    M_VCLK_LOAD, M_VCLK_RESET, M_NCD_GT_OUT, M_NOT_SELECTED, M_LEDS, M_COUNT
  } mech_e;
  int mech [M_COUNT];

  always #31.25 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    ncd_gt_q <= ncd_gt_out;
    if (ncd_gt_out && !ncd_gt_q) n_ncd_gt++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------- VME master ----------------
  task automatic vme_cycle(input logic [15:0] addr, input logic [5:0] am, input logic wr,
                           input logic [15:0] wdata, output logic acked, output logic [15:0] rdata);
    int n;
    @(posedge clk);
    vme_a = addr[15:1]; vme_am = am; vme_write_n = !wr; vme_d_in = wdata;
    #5 vme_as_n = 0;
    #5 vme_ds_n = 2'b00;
    n = 0; acked = 0;
    while (n < 30) begin
      @(posedge clk); #1;
      if (!vme_dtack_n) begin acked = 1; break; end
      n++;
    end
    rdata = vme_d_out;
    vme_ds_n = 2'b11; vme_as_n = 1;
    while (!vme_dtack_n) @(posedge clk);
    @(posedge clk);
  endtask

  task automatic wr(input logic [5:0] off, input logic [15:0] d = 16'h0000);
    logic ack; logic [15:0] rd;
    vme_cycle(BASE + 16'(off), 6'h29, 1'b1, d, ack, rd);
    check(ack, $sformatf("write %h acknowledged", off));
  endtask

  task automatic rd(input logic [5:0] off, output logic [15:0] d);
    logic ack;
    vme_cycle(BASE + 16'(off), 6'h2D, 1'b0, 16'h0, ack, d);
    check(ack, $sformatf("read %h acknowledged", off));
  endtask

  task automatic read_gtid(output logic [23:0] g);
    logic [15:0] lo, hi;
    rd(OFF_GTID_LO, lo);
    rd(OFF_GTID_HI, hi);
    g = {hi[7:0], lo};
  endtask

  task automatic read_vclk(output logic [47:0] c);
    logic [15:0] a, b, d;
    rd(OFF_VCLK_LO, a); rd(OFF_VCLK_MID, b); rd(OFF_VCLK_HI, d);
    c = {d, b, a};
  endtask

  task automatic poll_status(input logic [15:0] mask, output logic [15:0] s);
    int n = 0;
    do begin rd(OFF_STATUS, s); n++; end while ((s & mask) == 0 && n < 50);
    check((s & mask) != 0, $sformatf("status bit(s) %h seen", mask));
  endtask

  // ---------------- time bus (MTC/D) ----------------
  task automatic mtcd_gtrig(input logic with_synclr = 0);
    @(negedge clk) tb_gtrig = 1;
    repeat (2) @(negedge clk);
    if (with_synclr) begin
      tb_synclr = 1; repeat (2) @(negedge clk); tb_synclr = 0;
    end
    repeat (3) @(negedge clk);
    tb_gtrig = 0;
    repeat (4) @(negedge clk);
  endtask

  task automatic front_pulse(ref logic s);
    @(negedge clk) s = 1;
    repeat (4) @(negedge clk);
    s = 0;
    repeat (4) @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] s, d;
    logic [23:0] g;
    logic [47:0] c1, c2;
    logic ack;
    int t0, n0;

    repeat (4) @(negedge clk);
    sysreset_n = 1;
    repeat (4) @(negedge clk);

    // Board ID: revision 2, type 5 (GTID), serial 40
    rd(OFF_BOARD_ID, d);
    check(d == {5'd2, 3'd5, 8'd40}, $sformatf("board ID %h", d));
    // cycles not addressed to the card
    vme_cycle(16'h7010, 6'h3D, 1'b0, 0, ack, d);
    check(!ack, "A24 cycle ignored");
    vme_cycle(16'h8010, 6'h29, 1'b0, 0, ack, d);
    check(!ack, "other base ignored");
    if (!ack) mech[M_NOT_SELECTED]++;

    // enable VME clock counter; load GTID = 07:FFFC
    wr(OFF_VCLK_ENABLE, 16'h0001);
    rd(OFF_STATUS, s);
    check(s[ST_VCLK_EN] && s[3:0] == 0, $sformatf("status after enable %h", s));
    wr(OFF_GTID_LO, 16'hFFFC);
    wr(OFF_GTID_HI, 16'h0007);

    // --- event 1: MUX event, MTC/D GTRIG ---
    n0 = n_ncd_gt;
    front_pulse(mux_trig);
    poll_status(16'h0001, s);
    check(s[ST_MUX_EVT] && !s[ST_VALID_GT], "MUX event, not yet valid");
    if (s[ST_MUX_EVT]) mech[M_MUX_EVT]++;
    check(n_ncd_gt == n0 + 1, "NCD GT sent to the MTC/D");
    if (n_ncd_gt == n0 + 1) mech[M_NCD_GT_OUT]++;
    check(led_ncd_gt, "NCD GT LED lit");
    mtcd_gtrig();
    check(led_mtcd_gt, "MTC/D GT LED lit");
    poll_status(16'h0004, s);
    read_gtid(g);
    check(g == 24'h07_FFFD, $sformatf("event 1 GTID %h, expected 07FFFD", g));
    read_vclk(c1);
    check(c1 > 0 && c1 < 48'(cyc), $sformatf("event 1 clock %0d", c1));
    if (s[ST_VALID_GT] && g == 24'h07_FFFD) mech[M_HW_GT_LATCH]++;
    // a later GTRIG must not overwrite the event's registers
    mtcd_gtrig();
    read_gtid(g);
    check(g == 24'h07_FFFD, "registers held until event reset");
    wr(OFF_EVENT_RESET);
    rd(OFF_STATUS, s);
    check(s[2:0] == 0, "NCD GT Event Reset clears event bits");
    if (s[2:0] == 0) mech[M_EVENT_RESET]++;

    // --- event 2: shaper event, gated by multiboard enable ---
    front_pulse(mb_in);
    rd(OFF_STATUS, s);
    check(!s[ST_SHAPER_EVT], "shaper ignored while multiboard disabled");
    wr(OFF_MB_ENABLE, 16'h0001);
    @(negedge clk) mb_in = 1; #1;
    check(mb_out, "multiboard output follows input when enabled");
    if (mb_out) mech[M_MB_GATED]++;
    repeat (4) @(negedge clk); mb_in = 0;
    poll_status(16'h0002, s);
    if (s[ST_SHAPER_EVT]) mech[M_SHAPER_EVT]++;
    // software GTRIG and SYNCLR at the rollover: 07:FFFE -> FFFF -> 08:0000, no error
    wr(OFF_SOFT_GT_SYNCLR);
    poll_status(16'h0004, s);
    check(!s[ST_COUNT_ERR], "no count error at a proper rollover");
    read_gtid(g);
    check(g == 24'h08_0000, $sformatf("rollover GTID %h, expected 080000", g));
    if (g == 24'h08_0000 && !s[ST_COUNT_ERR]) mech[M_ROLLOVER]++;
    check(led_synclr, "SYNCLR LED lit");
    wr(OFF_EVENT_RESET);

    // --- event 3: MUX event, software GTRIG ---
    front_pulse(mux_trig);
    poll_status(16'h0001, s);
    wr(OFF_SOFT_GT);
    poll_status(16'h0004, s);
    read_gtid(g);
    check(g == 24'h08_0001, $sformatf("soft GT GTID %h", g));
    if (g == 24'h08_0001) mech[M_SOFT_GT_LATCH]++;
    wr(OFF_EVENT_RESET);

    // --- out-of-step SYNCLR from the time bus: count error ---
    mtcd_gtrig(1);           // 08:0002 at SYNCLR -> error, 09:0000
    rd(OFF_STATUS, s);
    check(s[ST_COUNT_ERR], "count error on out-of-step SYNCLR");
    if (s[ST_COUNT_ERR]) mech[M_COUNT_ERR]++;
    rd(OFF_STATUS, s);
    check(!s[ST_COUNT_ERR], "count error cleared by the read");
    if (!s[ST_COUNT_ERR]) mech[M_ERR_CLEAR_ON_READ]++;
    wr(OFF_LATCH_GTID);
    read_gtid(g);
    check(g == 24'h09_0000, $sformatf("test latch GTID %h, expected 090000", g));
    if (g == 24'h09_0000) mech[M_TEST_LATCH_GTID]++;

    // --- SYNCLR24 from software and from the time bus ---
    wr(OFF_SOFT_SYNCLR24);
    wr(OFF_LATCH_GTID);
    read_gtid(g);
    check(g == 24'h00_0000, $sformatf("soft SYNCLR24 GTID %h", g));
    if (g == 0) mech[M_SYNCLR24_SOFT]++;
    wr(OFF_GTID_HI, 16'h0033);
    wr(OFF_SOFT_GT);
    wr(OFF_SOFT_GT);
    @(negedge clk) tb_synclr24 = 1;
    repeat (3) @(negedge clk); tb_synclr24 = 0;
    repeat (4) @(negedge clk);
    check(led_synclr24, "SYNCLR24 LED lit");
    wr(OFF_LATCH_GTID);
    read_gtid(g);
    check(g == 24'h00_0002, $sformatf("bus SYNCLR24 GTID %h, expected 000002", g));
    if (g == 24'h00_0002) mech[M_SYNCLR24_HW]++;
    // software SYNCLR alone clears the lower half
    wr(OFF_SOFT_SYNCLR);
    wr(OFF_LATCH_GTID);
    read_gtid(g);
    check(g == 24'h01_0000, $sformatf("soft SYNCLR GTID %h, expected 010000", g));
    rd(OFF_STATUS, s);  // clears the count error this raised

    // --- VME clock rate: two test latches exactly K clocks apart ---
    t0 = cyc;
    wr(OFF_LATCH_VCLK);
    read_vclk(c1);
    while (cyc < t0 + 5000) @(posedge clk);
    wr(OFF_LATCH_VCLK);
    read_vclk(c2);
    check(c2 - c1 == 48'd5000, $sformatf("clock count rate: %0d in 5000 clocks", c2 - c1));
    if (c2 - c1 == 48'd5000) mech[M_TEST_LATCH_VCLK]++;

    // --- Register Reset: clears registers, status, enables; keeps GTID counter ---
    front_pulse(mux_trig);
    wr(OFF_SOFT_GT);        // 01:0001 latched as event
    wr(OFF_FAST_CLEAR);     // no function
    rd(OFF_STATUS, s);
    check(s[ST_MUX_EVT] && s[ST_VALID_GT] && s[ST_VCLK_EN], "state before register reset");
    wr(OFF_REG_RESET);
    rd(OFF_STATUS, s);
    check(s == 16'h0000, $sformatf("status after register reset %h", s));
    read_gtid(g);
    read_vclk(c1);
    check(g == 0 && c1 == 0, "GTID and clock registers cleared");
    @(negedge clk) mb_in = 1; #1;
    check(!mb_out, "multiboard enable cleared by register reset");
    repeat (4) @(negedge clk); mb_in = 0;
    wr(OFF_LATCH_GTID);
    read_gtid(g);
    check(g == 24'h01_0001, $sformatf("GTID counter kept through register reset: %h", g));
    if (s == 0 && g == 24'h01_0001) mech[M_REG_RESET]++;

    // --- VME clock loads and reset (counter disabled by register reset) ---
    wr(OFF_VCLK_LO, 16'h1111);
    wr(OFF_VCLK_MID, 16'h2222);
    wr(OFF_VCLK_HI, 16'h3333);
    wr(OFF_LATCH_VCLK);
    read_vclk(c1);
    check(c1 == 48'h3333_2222_1111, $sformatf("clock load %h", c1));
    if (c1 == 48'h3333_2222_1111) mech[M_VCLK_LOAD]++;
    wr(OFF_VCLK_RESET);
    wr(OFF_LATCH_VCLK);
    read_vclk(c1);
    check(c1 == 0, "clock counter reset");
    if (c1 == 0) mech[M_VCLK_RESET]++;

    // --- LEDs go dark after their hold time ---
    repeat (1_700_000) @(posedge clk);
    check(!led_mtcd_gt && !led_synclr && !led_ncd_gt && !led_synclr24, "LEDs off after hold time");
    if (!led_mtcd_gt && !led_synclr24) mech[M_LEDS]++;

    for (int m = 0; m < M_COUNT; m++) begin
      check(mech[m] > 0, $sformatf("mechanism %s happened", mech_e'(m)));
      $display("mechanism %-22s %0d", mech_e'(m), mech[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
