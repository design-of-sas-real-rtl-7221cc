// xintf_wr_buf: write buffer between the DSP's external bus (XINTF) and the
// transfer FIFO.
//
// What it does: the DSP writes pixel words to the FPGA as ordinary
// asynchronous memory writes. Every write cycle to the FIFO data port ends up
// as one push into the FIFO; a write to the control address loads outreg,
// the control register of the display core. The DSP's write strobe going low
// is what tells the FPGA that a word is on the bus.
//
// How it works: the active-low strobes cs_n, wr_n and rd_n pass through
// two-flop synchronisers, and addr/data through two plain register stages so
// that they stay aligned with the strobes. While the synchronised chip select
// and write strobe are both low (and rd_n high) the module keeps copying the
// aligned address and data; the cycle in which the strobe is seen to end
// commits the last copy. This relies on the XINTF keeping address and data
// valid while the strobe is low, and needs the strobe low for at least two
// clk cycles and high for at least two between writes.
//
// Outputs: fifo_wr is a one-cycle push with fifo_data, driven by the third
// clk edge after wr_n rises at the pins. A FIFO write that arrives while wrfull is high is dropped and
// sets the sticky overflow flag, which the next control-register write
// clears. out is a registered "FIFO nearly full" level for the DSP
// (wrusedw >= HIGH_WATER, or wrfull), so the DSP can hold back before words
// are lost. Resets are active high and synchronous.
//
// The port set follows the write block of the FPGA schematic (clk, rst,
// addr[18:0], wr, cs, rd, wrusedw[7:0] in; data[15:0], outreg[15:0],
// fifo_wr, out out). The register map, the meaning of out, the wrfull input
// and the overflow flag are this design's own choices.
module xintf_wr_buf
  import sas_pkg::*;
#(
  parameter int unsigned ADDR_W     = XINTF_ADDR_W,
  parameter int unsigned DATA_W     = XINTF_DATA_W,
  parameter int unsigned USEDW_W    = FIFO_AW,
  parameter int unsigned HIGH_WATER = 240
) (
  input  logic               clk,
  input  logic               rst,
  // XINTF pins (active-low strobes)
  input  logic [ADDR_W-1:0]  addr,
  input  logic [DATA_W-1:0]  data_in,
  input  logic               cs_n,
  input  logic               wr_n,
  input  logic               rd_n,
  // FIFO write side
  input  logic [USEDW_W-1:0] wrusedw,
  input  logic               wrfull,
  output logic [DATA_W-1:0]  fifo_data,
  output logic               fifo_wr,
  // control / status
  output logic [DATA_W-1:0]  outreg,
  output logic               out,
  output logic               overflow
);
  logic cs_s, wr_s, rd_s;
  logic [ADDR_W-1:0] addr_p1, addr_p2, cap_addr;
  logic [DATA_W-1:0] data_p1, data_p2, cap_data;
  logic wr_act, wr_act_q, commit;

  sync_ff #(.WIDTH(3), .RST_VAL(1'b1)) u_sync (
    .clk(clk), .rst(rst), .d({cs_n, wr_n, rd_n}), .q({cs_s, wr_s, rd_s})
  );

  // Address and data follow the same two-stage path as the strobes.
  always_ff @(posedge clk) begin
    addr_p1 <= addr;
    addr_p2 <= addr_p1;
    data_p1 <= data_in;
    data_p2 <= data_p1;
  end

  assign wr_act = !cs_s && !wr_s && rd_s;
  assign commit = wr_act_q && !wr_act;

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_act_q <= 1'b0;
      cap_addr <= '0;
      cap_data <= '0;
    end else begin
      wr_act_q <= wr_act;
      if (wr_act) begin
        cap_addr <= addr_p2;
        cap_data <= data_p2;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      fifo_wr   <= 1'b0;
      fifo_data <= '0;
      outreg    <= '0;
      overflow  <= 1'b0;
      out       <= 1'b0;
    end else begin
      fifo_wr <= 1'b0;
      out     <= wrfull || (wrusedw >= USEDW_W'(HIGH_WATER));
      if (commit) begin
        if (cap_addr == ADDR_W'(ADDR_FIFO)) begin
          if (wrfull) begin
            overflow <= 1'b1;
          end else begin
            fifo_wr   <= 1'b1;
            fifo_data <= cap_data;
          end
        end else if (cap_addr == ADDR_W'(ADDR_CTRL)) begin
          outreg   <= cap_data;
          overflow <= 1'b0;
        end
      end
    end
  end

  // A push must never be issued into a full FIFO.
  a_no_push_full: assert property (@(posedge clk) disable iff (rst) fifo_wr |-> !wrfull);
endmodule
