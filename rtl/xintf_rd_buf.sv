// xintf_rd_buf: read-back port that lets the DSP fetch words from the
// transfer FIFO over its external bus (XINTF), and the interrupt that tells
// the DSP there is something to fetch.
//
// What it does: with en high (the read-back test path selected), the FIFO's
// oldest word is offered on the bus at the FIFO data port, and each completed
// DSP read cycle of that address removes it. Reading any other address returns
// a status word: bit 9 = en, bit 8 = FIFO empty, bits 7..0 = FIFO fill level.
// dsp_int_rd is an active-low interrupt line: low while en is high and the
// FIFO holds at least one word.
//
// How it works: the bus is asynchronous, so the read data and the bus drive
// enable (data_oe = cs_n and rd_n both low) are combinational from the pins;
// the FIFO is show-ahead, so its head word is steady for the whole strobe.
// The strobes also go through two-flop synchronisers; the address is copied
// while the synchronised read is active, and the clk cycle in which the end
// of the strobe is seen issues fifo_rd (combinational, one cycle) if the copy
// is the FIFO port, the FIFO is not empty and en is high. The FIFO head then
// changes at the next clk edge, so the DSP must leave rd_n high for at least
// four clk cycles between two FIFO reads and hold it low for at least two.
//
// The port set follows the read block of the FPGA schematic (clk, rst,
// addr[18:0], fifo_q[15:0], wr, cs, rd, recv_fifo_empty, fifo_rdusedw[7:0]
// in; data_dsp_rd[15:0], fifo_rd, dsp_int_rd out). The en input, data_oe, the
// status word and the interrupt rule are this design's own choices. Reset is
// active high and synchronous.
module xintf_rd_buf
  import sas_pkg::*;
#(
  parameter int unsigned ADDR_W  = XINTF_ADDR_W,
  parameter int unsigned DATA_W  = XINTF_DATA_W,
  parameter int unsigned USEDW_W = FIFO_AW
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  // XINTF pins (active-low strobes)
  input  logic [ADDR_W-1:0]  addr,
  input  logic               cs_n,
  input  logic               wr_n,
  input  logic               rd_n,
  output logic [DATA_W-1:0]  data_dsp_rd,
  output logic               data_oe,
  // FIFO read side
  input  logic [DATA_W-1:0]  fifo_q,
  input  logic               recv_fifo_empty,
  input  logic [USEDW_W-1:0] fifo_rdusedw,
  output logic               fifo_rd,
  // interrupt to the DSP, active low
  output logic               dsp_int_rd
);
  logic cs_s, wr_s, rd_s;
  logic [ADDR_W-1:0] addr_p1, addr_p2, cap_addr;
  logic rd_act, rd_act_q, commit;
  logic [DATA_W-1:0] status;

  sync_ff #(.WIDTH(3), .RST_VAL(1'b1)) u_sync (
    .clk(clk), .rst(rst), .d({cs_n, wr_n, rd_n}), .q({cs_s, wr_s, rd_s})
  );

  always_ff @(posedge clk) begin
    addr_p1 <= addr;
    addr_p2 <= addr_p1;
  end

  assign rd_act = !cs_s && !rd_s && wr_s;
  assign commit = rd_act_q && !rd_act;

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_act_q <= 1'b0;
      cap_addr <= '0;
    end else begin
      rd_act_q <= rd_act;
      if (rd_act) cap_addr <= addr_p2;
    end
  end

  assign fifo_rd = commit && (cap_addr == ADDR_W'(ADDR_FIFO)) && !recv_fifo_empty && en;

  // Bus side: combinational from the pins.
  always_comb begin
    status = '0;
    status[USEDW_W-1:0] = fifo_rdusedw;
    status[USEDW_W]     = recv_fifo_empty;
    status[USEDW_W+1]   = en;
  end

  assign data_oe     = !cs_n && !rd_n;
  assign data_dsp_rd = (addr == ADDR_W'(ADDR_FIFO)) ? fifo_q : status;

  always_ff @(posedge clk) begin
    if (rst) dsp_int_rd <= 1'b1;
    else     dsp_int_rd <= !(en && !recv_fifo_empty);
  end

  a_no_pop_empty: assert property (@(posedge clk) disable iff (rst) fifo_rd |-> !recv_fifo_empty);
endmodule
