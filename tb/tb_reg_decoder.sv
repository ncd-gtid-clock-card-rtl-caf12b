// tb_reg_decoder: checks the register map. Every write offset must raise
// exactly its own command strobe for one clock (none for Fast Clear, the
// enables or unused offsets); the enables follow D<0> and are cleared by
// Register Reset; reads return Board ID (revision, type 5, serial), the
// status word and the latched GTID and VME clock words.
module tb_reg_decoder;
  timeunit 1ns; timeprecision 1ps;
  import gtid_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rd_stb = 0, wr_stb = 0;
  logic [5:0] reg_off = '0;
  logic [15:0] wr_data = '0, rd_data;
  cmd_t cmd;
  logic status_rd, mb_enable, vclk_enable;
  logic [3:0] event_bits = '0;
  logic [23:0] gtid_reg = 24'hA5_1234;
  logic [47:0] vclk_reg = 48'h0BCD_89AB_4567;
  int checks = 0, failures = 0;

  reg_decoder #(.BOARD_SERIAL(8'd40), .BOARD_REV(5'd2)) dut (.*);

  always #31.25 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Expected strobe vector, in cmd_t field order, for a write at `off`.
  function automatic logic [13:0] expect_cmd(input logic [5:0] off);
    case (off)
      6'h00: return 14'b10000000000000;
      6'h08: return 14'b01000000000000;
      6'h0E: return 14'b00100000000000;
      6'h14: return 14'b00010000000000;
      6'h16: return 14'b00001000000000;
      6'h18: return 14'b00000100000000;
      6'h1A: return 14'b00000010000000;
      6'h1C: return 14'b00000001000000;
      6'h20: return 14'b00000000100000;
      6'h22: return 14'b00000000010000;
      6'h24: return 14'b00000000001000;
      6'h26: return 14'b00000000000100;
      6'h28: return 14'b00000000000010;
      6'h2A: return 14'b00000000000001;
      default: return '0;
    endcase
  endfunction

  function automatic logic [15:0] expect_rd(input logic [5:0] off);
    case (off)
      6'h10: return {5'd2, 3'd5, 8'd40};
      6'h12: return {11'd0, vclk_enable, event_bits};
      6'h14: return 16'h1234;
      6'h16: return 16'h00A5;
      6'h18: return 16'h4567;
      6'h1A: return 16'h89AB;
      6'h1C: return 16'h0BCD;
      default: return 16'h0000;
    endcase
  endfunction

  task automatic write(input logic [5:0] off, input logic [15:0] d);
    reg_off = off; wr_data = d; wr_stb = 1; #1;
    check(cmd == expect_cmd(off), $sformatf("write %h: cmd %b", off, cmd));
    @(negedge clk) wr_stb = 0; #1;
    check(cmd == '0, "strobe lasts one clock");
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int off = 0; off < 64; off += 2) write(6'(off), 16'hFFFF);
    write(6'h0A, 16'h0001);
    write(6'h0C, 16'h0001);
    check(mb_enable && vclk_enable, "enables set from D<0>");
    write(6'h0A, 16'hFFFE);
    check(!mb_enable && vclk_enable, "multiboard enable cleared by D<0>=0");
    write(6'h0A, 16'h0001);
    write(6'h00, 16'h0000);
    check(!mb_enable && !vclk_enable, "register reset clears enables");
    write(6'h0C, 16'h0001);
    // reads
    for (int k = 0; k < 3; k++) begin
      event_bits = 4'($urandom);
      for (int off = 0; off < 64; off += 2) begin
        reg_off = 6'(off); rd_stb = 1; #1;
        check(rd_data == expect_rd(6'(off)), $sformatf("read %h: %h, expected %h", off, rd_data, expect_rd(6'(off))));
        check(status_rd == (off == 6'h12), "status_rd only for the status offset");
        @(negedge clk) rd_stb = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
