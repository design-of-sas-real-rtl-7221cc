// Self-checking testbench for xintf_wr_buf. A bus-functional model of the
// DSP's XINTF write cycle (address and data set up, cs_n and wr_n low for
// ACTIVE clk cycles, wr_n high, then cs_n high) drives the block; the FIFO is
// replaced by testbench variables (wrusedw, wrfull) and a queue of the
// expected pushes. Checked:
//  - every write to the FIFO port gives exactly one fifo_wr pulse with that
//    word; fifo_wr is driven by the third clk edge after wr_n rises (two
//    synchroniser stages and the output register), so the testbench samples
//    it high at the fourth edge;
//  - a write to the control address loads outreg and pushes nothing;
//  - writes to other addresses and read cycles push nothing;
//  - with wrfull high a FIFO write is dropped and sets overflow, which the
//    next control write clears;
//  - out follows wrusedw >= HIGH_WATER (240) or wrfull.
module tb_xintf_wr_buf;
  import sas_pkg::*;

  logic clk = 0, rst = 1;
  logic [18:0] addr = '0;
  logic [15:0] data_in = '0;
  logic cs_n = 1, wr_n = 1, rd_n = 1;
  logic [7:0] wrusedw = '0;
  logic wrfull = 0;
  logic [15:0] fifo_data, outreg;
  logic fifo_wr, out, overflow;

  int checks = 0, failures = 0;
  logic [15:0] expected[$];
  int pushes = 0;
  int cyc = 0, rise_cyc = 0, push_lat = -1;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  xintf_wr_buf dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) begin
    if (!rst && fifo_wr) begin
      pushes++;
      push_lat = cyc - rise_cyc;
      if (expected.size() == 0) check(0, "unexpected push");
      else begin
        check(fifo_data == expected[0], $sformatf("push data %h expected %h", fifo_data, expected[0]));
        void'(expected.pop_front());
      end
    end
  end

  task automatic xwrite(input logic [18:0] a, input logic [15:0] d, input int active = 3);
    @(negedge clk) begin addr = a; data_in = d; cs_n = 0; end
    @(negedge clk) wr_n = 0;
    repeat (active) @(negedge clk);
    wr_n = 1;
    rise_cyc = cyc;
    @(negedge clk) cs_n = 1;
    data_in = 16'hDEAD;
    repeat (4) @(negedge clk);
  endtask

  task automatic xread(input logic [18:0] a);
    @(negedge clk) begin addr = a; cs_n = 0; end
    @(negedge clk) rd_n = 0;
    repeat (3) @(negedge clk);
    rd_n = 1;
    @(negedge clk) cs_n = 1;
    repeat (4) @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    check(!fifo_wr && outreg == 0 && !out && !overflow, "reset state");

    // FIFO writes, with a range of strobe lengths
    for (int i = 0; i < 40; i++) begin
      logic [15:0] d = 16'($urandom);
      expected.push_back(d);
      p0 = pushes;
      xwrite(ADDR_FIFO, d, 2 + (i % 4));
      check(pushes == p0 + 1, "one push per FIFO write");
      check(push_lat == 4, $sformatf("push latency %0d clk", push_lat));
    end
    check(expected.size() == 0, "all words pushed");

    // control register
    p0 = pushes;
    xwrite(ADDR_CTRL, 16'h1234);
    check(outreg == 16'h1234 && pushes == p0, "control write loads outreg only");

    // other address and read cycles push nothing
    xwrite(19'h00042, 16'h5555);
    xread(ADDR_FIFO);
    check(pushes == p0 && outreg == 16'h1234, "no push for other address or read");

    // overflow: write while full
    wrfull = 1;
    xwrite(ADDR_FIFO, 16'hBEEF);
    check(pushes == p0 && overflow, "write into full FIFO dropped, overflow set");
    repeat (3) @(negedge clk);
    check(out, "out high while full");
    wrfull = 0;
    xwrite(ADDR_CTRL, 16'h0000);
    check(!overflow && outreg == 0, "control write clears overflow");

    // out threshold
    wrusedw = 8'd239;
    repeat (3) @(negedge clk);
    check(!out, "out low below high water");
    wrusedw = 8'd240;
    repeat (3) @(negedge clk);
    check(out, "out high at high water");
    wrusedw = 8'd10;
    repeat (3) @(negedge clk);
    check(!out, "out low again");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
