// lcd_con: display timing controller for the 1280x720 screen behind the
// SSD2828 RGB-to-MIPI bridge.
//
// What it does: scans the screen line by line and, for every visible pixel,
// takes one 16-bit RGB word from a show-ahead pixel source (the transfer FIFO)
// and puts it on lcd_data with den high. hsync and vsync mark the line and
// frame boundaries for the bridge, which serialises the stream onto the
// screen's four-lane MIPI link.
//
// How it works: a horizontal counter h runs 0..H_TOTAL-1 and a vertical
// counter v 0..V_TOTAL-1 on pclk. Each line is H_ACTIVE visible pixels, then
// the front porch H_FP, the sync pulse H_SYNC and the back porch H_BP; each
// frame is V_ACTIVE visible lines, then V_FP, V_SYNC and V_BP whole lines. So
// a frame starts with its first visible pixel. In a visible cycle with en high,
// pix_rd acknowledges the word on pix_data if pix_valid is high; if the source
// is empty, BLANK is shown instead and underflow pulses. With en low the
// visible area shows BLANK and nothing is taken. den, hsync, vsync and lcd_data
// are registered and so appear one pclk after the counter state they belong
// to; frame_start is high for the cycle in which h = v = 0 (combinational).
// Sync outputs are active when equal to SYNC_POL. Reset is active high and
// synchronous to pclk; it is shared with the bridge.
//
// From the system: the 1280x720 size, the 16-bit data, the port names
// (pclk, reset, den, hsync, vsync, lcd_data[15:0]) and a PLL-made pclk. The
// porch and sync lengths are this design's choice (the common 1280x720 at
// 60 Hz timing, 74.25 MHz pclk), as are the pixel-source handshake, BLANK and
// the underflow flag.
module lcd_con #(
  parameter int unsigned H_ACTIVE = 1280,
  parameter int unsigned H_FP     = 110,
  parameter int unsigned H_SYNC   = 40,
  parameter int unsigned H_BP     = 220,
  parameter int unsigned V_ACTIVE = 720,
  parameter int unsigned V_FP     = 5,
  parameter int unsigned V_SYNC   = 5,
  parameter int unsigned V_BP     = 20,
  parameter logic        SYNC_POL = 1'b1,
  parameter logic [15:0] BLANK    = 16'h0000
) (
  input  logic        pclk,
  input  logic        reset,
  input  logic        en,
  // pixel source (show-ahead)
  input  logic [15:0] pix_data,
  input  logic        pix_valid,
  output logic        pix_rd,
  // to the SSD2828 RGB port
  output logic        den,
  output logic        hsync,
  output logic        vsync,
  output logic [15:0] lcd_data,
  // status
  output logic        underflow,
  output logic        frame_start
);
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;
  localparam int unsigned HW = $clog2(H_TOTAL);
  localparam int unsigned VW = $clog2(V_TOTAL);

  logic [HW-1:0] h;
  logic [VW-1:0] v;
  logic active, hs, vs;

  always_ff @(posedge pclk) begin
    if (reset) begin
      h <= '0;
      v <= '0;
    end else if (h == HW'(H_TOTAL - 1)) begin
      h <= '0;
      v <= (v == VW'(V_TOTAL - 1)) ? '0 : v + 1'b1;
    end else begin
      h <= h + 1'b1;
    end
  end

  assign active      = (h < HW'(H_ACTIVE)) && (v < VW'(V_ACTIVE));
  assign hs          = (h >= HW'(H_ACTIVE + H_FP)) && (h < HW'(H_ACTIVE + H_FP + H_SYNC));
  assign vs          = (v >= VW'(V_ACTIVE + V_FP)) && (v < VW'(V_ACTIVE + V_FP + V_SYNC));
  assign pix_rd      = active && en && pix_valid;
  assign frame_start = (h == '0) && (v == '0);

  always_ff @(posedge pclk) begin
    if (reset) begin
      den       <= 1'b0;
      hsync     <= !SYNC_POL;
      vsync     <= !SYNC_POL;
      lcd_data  <= '0;
      underflow <= 1'b0;
    end else begin
      den       <= active;
      hsync     <= hs ? SYNC_POL : !SYNC_POL;
      vsync     <= vs ? SYNC_POL : !SYNC_POL;
      lcd_data  <= !active ? '0 : (pix_rd ? pix_data : BLANK);
      underflow <= active && en && !pix_valid;
    end
  end
endmodule
