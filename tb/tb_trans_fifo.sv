// Self-checking testbench for trans_fifo (16 x 256, dual clock, show-ahead).
// A queue in the testbench is the reference: every word pushed goes in, and
// every acknowledged read must show the queue's head on q. Phases:
//  1. latency: one word into an empty FIFO must show on q (rdempty low)
//     within 3 rdclk edges of its wrclk write edge;
//  2. fill: with no reads, exactly 256 pushes are accepted before wrfull,
//     wrusedw then reads 0 (modulo 256) and further pushes are ignored;
//  3. drain: all 256 words read back in order, then rdempty;
//  4. random traffic with random request rates on both sides.
// wrclk runs at 10 ns and rdclk at 13 ns so the two are unrelated.
module tb_trans_fifo;
  localparam int unsigned DW = 16;
  localparam int unsigned AW = 8;
  localparam int unsigned DEPTH = 1 << AW;

  logic wrclk = 0, rdclk = 0, wrrst = 1, rdrst = 1;
  logic [DW-1:0] data;
  logic wrreq = 0, rdreq = 0;
  logic wrfull, rdempty;
  logic [AW-1:0] wrusedw, rdusedw;
  logic [DW-1:0] q;

  int checks = 0, failures = 0;
  logic [DW-1:0] model[$];

  always #5   wrclk = ~wrclk;
  always #6.5 rdclk = ~rdclk;

  trans_fifo #(.DATA_W(DW), .AW(AW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Reference model updates on the clock edges the DUT uses.
  always @(posedge wrclk) if (!wrrst && wrreq && !wrfull) model.push_back(data);
  always @(posedge rdclk) begin
    if (!rdrst && rdreq && !rdempty) begin
      if (model.size() == 0) check(0, "read with empty model");
      else begin
        check(q == model[0], $sformatf("read data %h expected %h", q, model[0]));
        void'(model.pop_front());
      end
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge wrclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int accepted, lat;
    data = '0;
    repeat (4) @(posedge wrclk);
    repeat (4) @(posedge rdclk);
    @(negedge wrclk) wrrst = 0;
    @(negedge rdclk) rdrst = 0;
    repeat (4) @(posedge wrclk);
    check(rdempty && !wrfull && wrusedw == 0 && rdusedw == 0, "reset state");

    // 1. latency
    @(negedge wrclk) begin data = 16'hA5A5; wrreq = 1; end
    @(negedge wrclk) wrreq = 0;
    lat = 0;
    while (rdempty && lat < 10) begin @(posedge rdclk); #1; lat++; end
    check(lat <= 3, $sformatf("write-to-read latency %0d rdclk edges", lat));
    check(q == 16'hA5A5, "show-ahead word on q");
    @(negedge rdclk) rdreq = 1;
    @(negedge rdclk) rdreq = 0;
    repeat (6) @(posedge wrclk);
    check(rdempty && model.size() == 0, "empty after one word");

    // 2. fill
    accepted = 0;
    for (int i = 0; i < DEPTH + 8; i++) begin
      @(negedge wrclk);
      data = 16'(i * 7 + 3);
      wrreq = 1;
      if (!wrfull) accepted++;
    end
    @(negedge wrclk) wrreq = 0;
    check(accepted == DEPTH, $sformatf("accepted %0d words before full", accepted));
    check(wrfull && wrusedw == 0, "wrfull set, wrusedw wraps to 0");
    repeat (6) @(posedge rdclk);
    check(!rdempty && model.size() == DEPTH, "read side sees full FIFO");

    // 3. drain
    @(negedge rdclk) rdreq = 1;
    while (model.size() != 0) @(negedge rdclk);
    rdreq = 0;
    repeat (3) @(posedge rdclk);
    #1 check(rdempty, "rdempty after drain");
    repeat (6) @(posedge wrclk);
    check(!wrfull && wrusedw == 0, "write side sees empty FIFO");

    // 4. random traffic
    fork
      begin
        for (int i = 0; i < 3000; i++) begin
          @(negedge wrclk);
          wrreq = ($urandom_range(0, 99) < 60);
          data  = 16'($urandom);
        end
        @(negedge wrclk) wrreq = 0;
      end
      begin
        for (int i = 0; i < 3000; i++) begin
          @(negedge rdclk);
          rdreq = ($urandom_range(0, 99) < 55);
        end
        rdreq = 1;
        repeat (DEPTH + 20) @(negedge rdclk);
        rdreq = 0;
      end
    join
    repeat (6) @(posedge wrclk);
    check(model.size() == 0 && rdempty, "random traffic fully drained");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
