// sync2: two-flop synchroniser for one asynchronous input line (time-bus
// signal, front-panel trigger, VME strobe).
//
// The input passes through two flip-flops clocked by clk; dout follows din
// two clocks later. Reset drives both flops to RST_VAL. The two-flop depth is
// this design's choice.
module sync2 #(
  parameter logic RST_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,   // asynchronous
  output logic dout   // synchronised to clk
);
  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RST_VAL;
      dout <= RST_VAL;
    end else begin
      meta <= din;
      dout <= meta;
    end
  end
endmodule
