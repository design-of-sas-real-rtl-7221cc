// trans_fifo: dual-clock show-ahead FIFO between the DSP write side and the
// pixel/read-back side, 16 bits x 256 words by default.
//
// How it works: the words sit in a 2**AW-entry array written on wrclk. Each
// side keeps a binary pointer one bit wider than the address, plus its Gray
// copy; the Gray pointer of the other side is brought over through a two-flop
// synchroniser. Full is the Gray write pointer equal to the synchronised read
// pointer with its two top bits inverted; empty is the two Gray pointers equal.
// Because the synchronised pointers lag, wrfull and rdempty are pessimistic for
// two cycles of their own clock after the other side moves, never optimistic.
//
// Interface: the port names follow the FIFO of the FPGA schematic (data,
// wrreq, wrclk, wrfull, wrusedw, q, rdreq, rdclk, rdempty, rdusedw). The read
// side is show-ahead: q already shows the oldest word while rdempty is low,
// and rdreq acknowledges (removes) it at the next rdclk edge. A wrreq while
// wrfull, or an rdreq while rdempty, is ignored. wrusedw/rdusedw are the fill
// level modulo 256 as seen from each side, so they read 0 when the FIFO is
// full; wrfull tells the two cases apart.
//
// Timing: a word written at a wrclk edge shows on q about three rdclk edges
// later (two synchroniser stages plus the pointer update). Resets are active
// high and synchronous to their own clock; both must be applied together.
// The width, depth and show-ahead read come from the system's schematic; the
// Gray-pointer construction is this design's own.
module trans_fifo #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned AW     = 8     // log2 of the depth: 8 -> 256 words
) (
  // write side
  input  logic              wrclk,
  input  logic              wrrst,
  input  logic [DATA_W-1:0] data,
  input  logic              wrreq,
  output logic              wrfull,
  output logic [AW-1:0]     wrusedw,
  // read side
  input  logic              rdclk,
  input  logic              rdrst,
  input  logic              rdreq,
  output logic [DATA_W-1:0] q,
  output logic              rdempty,
  output logic [AW-1:0]     rdusedw
);
  localparam int unsigned DEPTH = 1 << AW;

  logic [DATA_W-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wq2_rgray, rq2_wgray;   // other side's Gray pointer, synchronised

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  logic do_wr;
  assign wrfull = (wgray == {~wq2_rgray[AW:AW-1], wq2_rgray[AW-2:0]});
  assign do_wr  = wrreq && !wrfull;

  always_ff @(posedge wrclk) begin
    if (do_wr) mem[wbin[AW-1:0]] <= data;
  end

  always_ff @(posedge wrclk) begin
    if (wrrst) begin
      wbin  <= '0;
      wgray <= '0;
    end else if (do_wr) begin
      wbin  <= wbin + 1'b1;
      wgray <= bin2gray(wbin + 1'b1);
    end
  end

  sync_ff #(.WIDTH(AW+1)) u_sync_r2w (
    .clk(wrclk), .rst(wrrst), .d(rgray), .q(wq2_rgray)
  );

  logic [AW:0] wr_level;
  assign wr_level = wbin - gray2bin(wq2_rgray);
  assign wrusedw  = wr_level[AW-1:0];

  // ---------------- read side ----------------
  logic do_rd;
  assign rdempty = (rgray == rq2_wgray);
  assign do_rd   = rdreq && !rdempty;
  assign q       = mem[rbin[AW-1:0]];

  always_ff @(posedge rdclk) begin
    if (rdrst) begin
      rbin  <= '0;
      rgray <= '0;
    end else if (do_rd) begin
      rbin  <= rbin + 1'b1;
      rgray <= bin2gray(rbin + 1'b1);
    end
  end

  sync_ff #(.WIDTH(AW+1)) u_sync_w2r (
    .clk(rdclk), .rst(rdrst), .d(wgray), .q(rq2_wgray)
  );

  logic [AW:0] rd_level;
  assign rd_level = gray2bin(rq2_wgray) - rbin;
  assign rdusedw  = rd_level[AW-1:0];

  // The level a side sees can never exceed the depth.
  a_wr_level: assert property (@(posedge wrclk) disable iff (wrrst) wr_level <= (AW+1)'(DEPTH));
  a_rd_level: assert property (@(posedge rdclk) disable iff (rdrst) rd_level <= (AW+1)'(DEPTH));
endmodule
