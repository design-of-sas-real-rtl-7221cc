// Shared types and constants of the sonar image display core.
//
// The DSP talks to the FPGA over its external memory bus (XINTF) with 19
// address lines and 16 data lines; pixels travel as 16-bit RGB words, and the
// transfer FIFO holds 256 such words. Those widths and sizes are the ones the
// system was built with. The register map on the bus (which address is the
// FIFO port, which the control register) is this design's own choice.
package sas_pkg;

  localparam int unsigned XINTF_ADDR_W = 19;  // DSP XINTF address lines
  localparam int unsigned XINTF_DATA_W = 16;  // DSP XINTF data lines
  localparam int unsigned FIFO_AW      = 8;   // 2**8 = 256 FIFO words

  // 16-bit RGB pixel, 5-6-5 packing (red in the top bits).
  typedef struct packed {
    logic [4:0] r;
    logic [5:0] g;
    logic [4:0] b;
  } rgb565_t;

  // XINTF register map of the FPGA (word addresses inside its chip-select zone).
  localparam logic [XINTF_ADDR_W-1:0] ADDR_FIFO   = 19'h00000; // FIFO data port (write: push, read: pop)
  localparam logic [XINTF_ADDR_W-1:0] ADDR_CTRL   = 19'h00001; // control register (write) / status (read)

  // Bit 0 of the control register: 1 = FIFO words go back to the DSP
  // (read-back test path), 0 = FIFO words go to the screen.
  localparam int unsigned CTRL_LOOPBACK_BIT = 0;

endpackage
