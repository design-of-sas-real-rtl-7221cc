// sas_display_top: FPGA side of a real-time sonar image display. The DSP
// computes the display image and writes it, word by word, over its external
// memory bus (XINTF); the FPGA buffers the words and streams them as 16-bit
// RGB pixels, with den/hsync/vsync timing, to an SSD2828 bridge that drives
// a 1280x720 phone screen over MIPI.
//
// Data path:
//   XINTF pins -> xintf_wr_buf (clk) -> trans_fifo 16x256 (clk -> pclk)
//     -> lcd_con (pclk) -> lcd_* pins            when the control bit is 0
//     -> xintf_rd_buf (pclk) -> XINTF read data  when the control bit is 1
// Bit 0 of the control register (XINTF address 1, see sas_pkg) picks the
// consumer of the FIFO: the screen, or the DSP itself, which can then read
// back what it wrote (a link test, driven by the dsp_int_n interrupt). The
// bit crosses into pclk through a two-flop synchroniser; switching it while
// words are in the FIFO hands the remaining words to the new consumer.
//
// Clocks and reset: clk samples the XINTF and runs the FIFO's write side;
// pclk is the pixel clock, made by a PLL outside this module and also sent to
// the bridge on lcd_pclk. rst is the board reset, active high, shared with
// the bridge (lcd_reset) and synchronised into each domain here.
//
// XINTF bus: the data pins are split into xintf_data_i, xintf_data_o and
// xintf_data_oe; the pad (or the board) joins them. fifo_busy tells the DSP
// that the FIFO is nearly full; fifo_overflow that a word was dropped
// (sticky until the next control write); display_underflow pulses for every
// visible pixel the FIFO could not supply.
//
// The blocks and their order follow the system's FPGA schematic; the mode
// bit, the status signals and the bus split are this design's own choices.
module sas_display_top
  import sas_pkg::*;
#(
  parameter int unsigned H_ACTIVE   = 1280,
  parameter int unsigned H_FP       = 110,
  parameter int unsigned H_SYNC     = 40,
  parameter int unsigned H_BP       = 220,
  parameter int unsigned V_ACTIVE   = 720,
  parameter int unsigned V_FP       = 5,
  parameter int unsigned V_SYNC     = 5,
  parameter int unsigned V_BP       = 20,
  parameter int unsigned HIGH_WATER = 240
) (
  input  logic                    clk,
  input  logic                    pclk,
  input  logic                    rst,
  // DSP XINTF
  input  logic [XINTF_ADDR_W-1:0] xintf_addr,
  input  logic [XINTF_DATA_W-1:0] xintf_data_i,
  output logic [XINTF_DATA_W-1:0] xintf_data_o,
  output logic                    xintf_data_oe,
  input  logic                    xintf_cs_n,
  input  logic                    xintf_wr_n,
  input  logic                    xintf_rd_n,
  output logic                    dsp_int_n,
  output logic                    fifo_busy,
  // SSD2828 RGB interface
  output logic                    lcd_pclk,
  output logic                    lcd_reset,
  output logic                    lcd_den,
  output logic                    lcd_hsync,
  output logic                    lcd_vsync,
  output logic [15:0]             lcd_data,
  // status
  output logic                    fifo_overflow,
  output logic                    display_underflow,
  output logic                    frame_start
);
  logic rst_clk, rst_pclk;

  rst_sync u_rst_clk  (.clk(clk),  .rst_in(rst), .rst_out(rst_clk));
  rst_sync u_rst_pclk (.clk(pclk), .rst_in(rst), .rst_out(rst_pclk));

  assign lcd_pclk  = pclk;
  assign lcd_reset = rst;

  // ---------------- write side (clk) ----------------
  logic [XINTF_DATA_W-1:0] fifo_wdata, ctrl_reg;
  logic                    fifo_wr, wrfull;
  logic [FIFO_AW-1:0]      wrusedw;

  xintf_wr_buf #(.HIGH_WATER(HIGH_WATER)) u_wr (
    .clk(clk), .rst(rst_clk),
    .addr(xintf_addr), .data_in(xintf_data_i),
    .cs_n(xintf_cs_n), .wr_n(xintf_wr_n), .rd_n(xintf_rd_n),
    .wrusedw(wrusedw), .wrfull(wrfull),
    .fifo_data(fifo_wdata), .fifo_wr(fifo_wr),
    .outreg(ctrl_reg), .out(fifo_busy), .overflow(fifo_overflow)
  );

  // ---------------- transfer FIFO ----------------
  logic [XINTF_DATA_W-1:0] fifo_q;
  logic                    rdreq, rdempty;
  logic [FIFO_AW-1:0]      rdusedw;

  trans_fifo #(.DATA_W(XINTF_DATA_W), .AW(FIFO_AW)) u_fifo (
    .wrclk(clk), .wrrst(rst_clk), .data(fifo_wdata), .wrreq(fifo_wr),
    .wrfull(wrfull), .wrusedw(wrusedw),
    .rdclk(pclk), .rdrst(rst_pclk), .rdreq(rdreq), .q(fifo_q),
    .rdempty(rdempty), .rdusedw(rdusedw)
  );

  // ---------------- consumer select (pclk) ----------------
  logic loopback;

  sync_ff #(.WIDTH(1)) u_sync_mode (
    .clk(pclk), .rst(rst_pclk), .d(ctrl_reg[CTRL_LOOPBACK_BIT]), .q(loopback)
  );

  logic rb_rd, pix_rd;
  assign rdreq = loopback ? rb_rd : pix_rd;

  xintf_rd_buf u_rd (
    .clk(pclk), .rst(rst_pclk), .en(loopback),
    .addr(xintf_addr), .cs_n(xintf_cs_n), .wr_n(xintf_wr_n), .rd_n(xintf_rd_n),
    .data_dsp_rd(xintf_data_o), .data_oe(xintf_data_oe),
    .fifo_q(fifo_q), .recv_fifo_empty(rdempty), .fifo_rdusedw(rdusedw),
    .fifo_rd(rb_rd), .dsp_int_rd(dsp_int_n)
  );

  lcd_con #(
    .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)
  ) u_lcd (
    .pclk(pclk), .reset(rst_pclk), .en(!loopback),
    .pix_data(fifo_q), .pix_valid(!rdempty), .pix_rd(pix_rd),
    .den(lcd_den), .hsync(lcd_hsync), .vsync(lcd_vsync), .lcd_data(lcd_data),
    .underflow(display_underflow), .frame_start(frame_start)
  );
endmodule
