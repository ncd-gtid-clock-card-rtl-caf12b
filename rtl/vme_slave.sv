// vme_slave: VME A16/D16 slave interface of the card.
//
// The card answers short-I/O (A16) cycles with address modifier 29h
// (non-privileged) or 2Dh (supervisory) whose address lies in a 2^WINDOW_BITS
// byte window at BASE_ADDR. AS* and the data strobes are synchronised to clk
// with two flops each. When both are active, IACK* is high and the address
// and AM match, the slave performs exactly one register access: a one-clock
// rd_stb or wr_stb with reg_off = A[WINDOW_BITS-1:1],0 and wr_data = D<15:0>.
// Read data is captured in the same clock and driven (vme_d_oe) with DTACK*
// low until the master releases the data strobes; then DTACK* is released.
// Byte accesses are treated as word accesses and LWORD* is not used;
// reg_off bit 0 is therefore always 0.
//
// Timing: the access strobe comes 3 clocks after DS* falls (two synchroniser
// flops and one register), DTACK* falls one clock later and rises 3 clocks
// after DS* rises.
// Following the specification: base 7000h, AM 29h/2Dh, 16-bit registers at
// even offsets. The handshake details and the window size are this design's
// choices, made the usual way for a VME slave.
module vme_slave
  import gtid_pkg::*;
#(
  parameter logic [15:0] BASE_ADDR   = 16'h7000,
  parameter int unsigned WINDOW_BITS = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  // VME bus
  input  logic [15:1] vme_a,
  input  logic [5:0]  vme_am,
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_write_n,
  input  logic        vme_iack_n,
  input  logic [15:0] vme_d_in,
  output logic [15:0] vme_d_out,
  output logic        vme_d_oe,
  output logic        vme_dtack_n,
  // register side
  output logic        rd_stb,
  output logic        wr_stb,
  output logic [5:0]  reg_off,
  output logic [15:0] wr_data,
  input  logic [15:0] rd_data
);
  typedef enum logic [1:0] {S_IDLE, S_ACK} state_e;
  state_e state;

  logic as_s, ds_s, ds_any;
  logic sel, start, is_write;

  assign ds_any = ~&vme_ds_n;   // any data strobe low
  sync2 #(.RST_VAL(1'b0)) u_sync_as (.clk, .rst_n, .din(~vme_as_n), .dout(as_s));
  sync2 #(.RST_VAL(1'b0)) u_sync_ds (.clk, .rst_n, .din(ds_any),    .dout(ds_s));

  assign sel = (vme_a[15:WINDOW_BITS] == BASE_ADDR[15:WINDOW_BITS])
            && (vme_am == AM_A16_USER || vme_am == AM_A16_SUPV)
            && vme_iack_n;
  assign start = (state == S_IDLE) && as_s && ds_s && sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      rd_stb    <= 1'b0;
      wr_stb    <= 1'b0;
      reg_off   <= '0;
      wr_data   <= '0;
      is_write  <= 1'b0;
    end else begin
      rd_stb <= start && vme_write_n;
      wr_stb <= start && !vme_write_n;
      if (start) begin
        reg_off  <= 6'({vme_a[WINDOW_BITS-1:1], 1'b0});
        wr_data  <= vme_d_in;
        is_write <= !vme_write_n;
      end
      unique case (state)
        S_IDLE: if (start) state <= S_ACK;
        S_ACK:  if (!ds_s) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Read data is taken in the strobe clock; DTACK* follows one clock later.
  logic ack_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vme_d_out <= '0;
      ack_q     <= 1'b0;
    end else begin
      if (rd_stb) vme_d_out <= rd_data;
      ack_q <= (state == S_ACK) && ds_s && !start;
    end
  end

  assign vme_dtack_n = ~ack_q;
  assign vme_d_oe    = ack_q && !is_write;

  initial assert (WINDOW_BITS >= 6 && WINDOW_BITS <= 15)
    else $error("WINDOW_BITS must cover the register offsets 00h..2Ah");
endmodule
