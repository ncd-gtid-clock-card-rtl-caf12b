// tb_gtid_counter: checks the 24-bit GTID counter against a reference model.
// Directed part: the MTC/D rollover (FFFE -> GTRIG -> FFFF -> SYNCLR -> 0000
// with the upper half + 1 and no count error), an out-of-step SYNCLR (count
// error), SYNCLR24, loads, latch and Register Reset. Random part: thousands
// of clocks of random events compared with a model that treats the count as
// one 24-bit number.
module tb_gtid_counter;
  timeunit 1ns; timeprecision 1ps;
  import gtid_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic gt_rise = 0, synclr_rise = 0, synclr24_rise = 0, latch = 0, reg_reset = 0;
  logic load_lo = 0, load_hi = 0;
  logic [15:0] load_data = '0;
  logic [23:0] gtid_cnt, gtid_reg;
  logic count_err;
  int checks = 0, failures = 0;

  gtid_counter dut (.*);

  always #31.25 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Apply one clock of inputs.
  task automatic step(input logic g, s, s24, l, rr, ll, lh, input logic [15:0] d);
    gt_rise = g; synclr_rise = s; synclr24_rise = s24; latch = l; reg_reset = rr;
    load_lo = ll; load_hi = lh; load_data = d;
    @(negedge clk);
    {gt_rise, synclr_rise, synclr24_rise, latch, reg_reset, load_lo, load_hi} = '0;
  endtask

  // Reference: the count as one 24-bit number.
  logic [23:0] m_cnt, m_reg;
  logic        m_err;
  task automatic model(input logic g, s, s24, l, rr, ll, lh, input logic [15:0] d);
    logic [23:0] v;
    v = m_cnt;
    if (l)  m_reg = m_cnt;
    if (rr) m_reg = '0;
    if (g)  v = v + 24'd1;
    m_err = 1'b0;
    if (s) begin
      m_err = (v[15:0] != 16'hFFFF);
      v = {m_cnt[23:16] + 8'd1, 16'h0000};
    end
    if (s24) v[23:16] = 8'h00;
    if (ll) v[15:0]  = d;
    if (lh) v[23:16] = d[7:0];
    m_cnt = v;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(gtid_cnt == 0 && gtid_reg == 0, "reset clears counter and register");

    // load 12:FFFE
    step(0,0,0,0,0,1,0,16'hFFFE);
    step(0,0,0,0,0,0,1,16'h0112);   // D<7:0> = 12 goes in
    check(gtid_cnt == 24'h12FFFE, $sformatf("load gives %h", gtid_cnt));
    step(1,0,0,0,0,0,0,0);          // GTRIG leading edge
    check(gtid_cnt == 24'h12FFFF, "GTRIG: FFFE -> FFFF");
    step(0,1,0,0,0,0,0,0);          // SYNCLR during GTRIG
    check(count_err == 1'b0, "no count error at FFFF");
    check(gtid_cnt == 24'h130000, $sformatf("SYNCLR: %h, expected 130000", gtid_cnt));
    step(0,0,0,1,0,0,0,0);          // trailing edge latch
    check(gtid_reg == 24'h130000, "latched 13:0000");
    // out-of-step SYNCLR
    step(1,0,0,0,0,0,0,0);
    step(1,0,0,0,0,0,0,0);
    step(0,1,0,0,0,0,0,0);
    check(count_err == 1'b1, "count error when lower is 0002");
    check(gtid_cnt == 24'h140000, "SYNCLR still clears and carries");
    @(negedge clk);
    check(count_err == 1'b0, "count error is a one-clock pulse");
    // GTRIG and SYNCLR in the same clock
    step(1,1,0,0,0,0,0,0);
    check(count_err == 1'b1 && gtid_cnt == 24'h150000, "GT+SYNCLR same clock");
    step(0,0,1,0,0,0,0,0);
    check(gtid_cnt == 24'h000000, "SYNCLR24 clears upper");
    // plain wrap from FFFF carries
    step(0,0,0,0,0,1,0,16'hFFFF);
    step(1,0,0,0,0,0,0,0);
    check(gtid_cnt == 24'h010000, "GTRIG from FFFF carries");
    // register reset clears register, not counter
    step(0,0,0,1,0,0,0,0);
    check(gtid_reg == 24'h010000, "test latch");
    step(0,0,0,0,1,0,0,0);
    check(gtid_reg == 0 && gtid_cnt == 24'h010000, "register reset keeps counter");

    // random comparison
    m_cnt = gtid_cnt; m_reg = gtid_reg; m_err = 0;
    for (int i = 0; i < 5000; i++) begin
      logic g, s, s24, l, rr, ll, lh;
      logic [15:0] d;
      g   = ($urandom_range(0, 3) == 0);
      s   = ($urandom_range(0, 40) == 0);
      s24 = ($urandom_range(0, 200) == 0);
      l   = ($urandom_range(0, 5) == 0);
      rr  = ($urandom_range(0, 300) == 0);
      ll  = ($urandom_range(0, 150) == 0);
      lh  = ($urandom_range(0, 150) == 0);
      d   = (i % 3 == 0) ? 16'hFFFE : 16'($urandom);
      model(g, s, s24, l, rr, ll, lh, d);
      step(g, s, s24, l, rr, ll, lh, d);
      check(gtid_cnt == m_cnt && gtid_reg == m_reg && count_err == m_err,
            $sformatf("random %0d: cnt %h/%h reg %h/%h err %b/%b", i,
                      gtid_cnt, m_cnt, gtid_reg, m_reg, count_err, m_err));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
