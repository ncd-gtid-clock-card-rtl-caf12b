// tb_vme_slave: checks the VME A16/D16 slave with a simple bus master.
// Reads and writes at base 7000h with AM 29h and 2Dh must produce one strobe
// with the right offset and data and end with DTACK*; read data must be on
// the bus while DTACK* is low; a wrong base, a wrong AM or an IACK cycle must
// get no strobe and no DTACK*. The access latency (DS* to strobe and to
// DTACK*) is checked in clocks.
module tb_vme_slave;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:1] vme_a = '0;
  logic [5:0]  vme_am = '0;
  logic        vme_as_n = 1, vme_write_n = 1, vme_iack_n = 1;
  logic [1:0]  vme_ds_n = 2'b11;
  logic [15:0] vme_d_in = '0, vme_d_out;
  logic        vme_d_oe, vme_dtack_n;
  logic        rd_stb, wr_stb;
  logic [5:0]  reg_off;
  logic [15:0] wr_data, rd_data;
  int checks = 0, failures = 0;
  int n_rd = 0, n_wr = 0, cyc = 0, t_stb = 0;
  logic [5:0] last_off;
  logic [15:0] last_wdata;

  vme_slave #(.BASE_ADDR(16'h7000)) dut (.*);

  // register model: read data is a function of the offset
  assign rd_data = {10'h2C5, reg_off} ^ 16'h5A00;

  always #31.25 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rd_stb) begin n_rd++; last_off = reg_off; t_stb = cyc; end
    if (wr_stb) begin n_wr++; last_off = reg_off; last_wdata = wr_data; t_stb = cyc; end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // One VME cycle; returns whether DTACK* came and the data read.
  task automatic vme_cycle(input logic [15:0] addr, input logic [5:0] am, input logic wr,
                           input logic [15:0] wdata, input logic iack,
                           output logic acked, output logic [15:0] rdata, output int lat);
    int t0, n;
    vme_a = addr[15:1]; vme_am = am; vme_write_n = !wr; vme_iack_n = !iack;
    vme_d_in = wdata;
    #20 vme_as_n = 0;
    #20 vme_ds_n = 2'b00;
    t0 = cyc; n = 0; acked = 0;
    while (n < 20) begin
      @(posedge clk); #1;
      if (!vme_dtack_n) begin acked = 1; break; end
      n++;
    end
    lat = cyc - t0;
    rdata = vme_d_out;
    if (acked && !wr) check(vme_d_oe, "data driven with DTACK* on a read");
    if (acked && wr)  check(!vme_d_oe, "data not driven on a write");
    #10 vme_ds_n = 2'b11; vme_as_n = 1;
    n = 0;
    while (!vme_dtack_n && n < 10) begin @(posedge clk); n++; end
    #1 check(vme_dtack_n && !vme_d_oe, "DTACK* and data released after DS*");
    repeat (2) @(posedge clk);
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ack; logic [15:0] rd; int lat, nr, nw;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int off = 0; off < 64; off += 2) begin
      nr = n_rd;
      vme_cycle(16'h7000 + 16'(off), (off % 4 == 0) ? 6'h29 : 6'h2D, 0, 0, 0, ack, rd, lat);
      check(ack && n_rd == nr + 1 && last_off == 6'(off), $sformatf("read %h: ack %b off %h", off, ack, last_off));
      check(rd == ({10'h2C5, 6'(off)} ^ 16'h5A00), $sformatf("read data %h", rd));
      check(lat == 4, $sformatf("read DTACK* latency %0d clocks, expected 4", lat));
    end
    for (int k = 0; k < 10; k++) begin
      logic [15:0] d; logic [5:0] off;
      d = 16'($urandom); off = 6'($urandom) & 6'h3E;
      nw = n_wr;
      vme_cycle(16'h7000 + 16'(off), 6'h29, 1, d, 0, ack, rd, lat);
      check(ack && n_wr == nw + 1 && last_off == off && last_wdata == d, "write strobe, offset, data");
    end
    nr = n_rd; nw = n_wr;
    vme_cycle(16'h7040, 6'h29, 0, 0, 0, ack, rd, lat);
    check(!ack, "outside the window: no DTACK*");
    vme_cycle(16'h6000, 6'h29, 1, 0, 0, ack, rd, lat);
    check(!ack, "other base: no DTACK*");
    vme_cycle(16'h7010, 6'h39, 0, 0, 0, ack, rd, lat);
    check(!ack, "A24 AM: no DTACK*");
    vme_cycle(16'h7010, 6'h29, 0, 0, 1, ack, rd, lat);
    check(!ack, "IACK cycle: no DTACK*");
    check(n_rd == nr && n_wr == nw, "no strobes for cycles not addressed to the card");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
