// Self-checking testbench for xintf_rd_buf. The FIFO is modelled by a
// testbench queue shown ahead (fifo_q = head, recv_fifo_empty = queue empty,
// fifo_rdusedw = size) and popped on fifo_rd. A bus-functional model of the
// DSP's XINTF read cycle samples the data pins just before rd_n rises.
// Checked:
//  - with en high, each read of the FIFO port returns the head word, drives
//    data_oe during the strobe only, and pops exactly one word, on the third
//    clk edge after rd_n rises;
//  - reading another address returns the status word {en, empty, level} and
//    pops nothing; write cycles pop nothing;
//  - dsp_int_rd is low exactly while en is high and the FIFO holds words;
//  - with en low nothing is popped and the interrupt stays high.
module tb_xintf_rd_buf;
  import sas_pkg::*;

  logic clk = 0, rst = 1, en = 0;
  logic [18:0] addr = '0;
  logic cs_n = 1, wr_n = 1, rd_n = 1;
  logic [15:0] data_dsp_rd, fifo_q;
  logic data_oe, recv_fifo_empty, fifo_rd, dsp_int_rd;
  logic [7:0] fifo_rdusedw;

  int checks = 0, failures = 0;
  logic [15:0] fq[$];
  int pops = 0, cyc = 0, rise_cyc = 0, pop_lat = -1;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  assign fifo_q          = (fq.size() != 0) ? fq[0] : 16'h0000;
  assign recv_fifo_empty = (fq.size() == 0);
  assign fifo_rdusedw    = 8'(fq.size());

  xintf_rd_buf dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) begin
    if (!rst && fifo_rd) begin
      pops++;
      pop_lat = cyc - rise_cyc;
      void'(fq.pop_front());
    end
  end

  task automatic xread(input logic [18:0] a, output logic [15:0] d, output bit oe_seen);
    @(negedge clk) begin addr = a; cs_n = 0; end
    check(!data_oe, "data_oe low before strobe");
    @(negedge clk) rd_n = 0;
    repeat (3) @(negedge clk);
    d = data_dsp_rd;
    oe_seen = data_oe;
    rd_n = 1;
    rise_cyc = cyc;
    @(negedge clk) cs_n = 1;
    check(!data_oe, "data_oe low after strobe");
    repeat (5) @(negedge clk);
  endtask

  task automatic xwrite(input logic [18:0] a);
    @(negedge clk) begin addr = a; cs_n = 0; end
    @(negedge clk) wr_n = 0;
    repeat (3) @(negedge clk);
    wr_n = 1;
    @(negedge clk) cs_n = 1;
    repeat (5) @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d, exp_w;
    bit oe;
    int p0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    check(dsp_int_rd, "no interrupt after reset");

    for (int i = 0; i < 20; i++) fq.push_back(16'($urandom));

    // disabled: nothing popped, no interrupt
    xread(ADDR_FIFO, d, oe);
    check(pops == 0 && dsp_int_rd, "en low: no pop, no interrupt");
    xread(ADDR_CTRL, d, oe);
    check(d == {6'd0, 1'b0, 1'b0, 8'd20}, $sformatf("status with en low %h", d));

    en = 1;
    repeat (3) @(negedge clk);
    check(!dsp_int_rd, "interrupt with data");
    xread(ADDR_CTRL, d, oe);
    check(d == {6'd0, 1'b1, 1'b0, 8'd20} && pops == 0, $sformatf("status with en high %h", d));
    xwrite(ADDR_FIFO);
    check(pops == 0, "write cycle pops nothing");

    while (fq.size() != 0) begin
      exp_w = fq[0];
      p0 = pops;
      xread(ADDR_FIFO, d, oe);
      check(d == exp_w, $sformatf("read %h expected %h", d, exp_w));
      check(oe, "data_oe during read");
      check(pops == p0 + 1, "one pop per read");
      check(pop_lat == 3, $sformatf("pop latency %0d", pop_lat));
    end
    repeat (3) @(negedge clk);
    check(dsp_int_rd, "interrupt released when empty");
    xread(ADDR_FIFO, d, oe);
    check(pops == 20, "no pop from empty FIFO");
    xread(ADDR_CTRL, d, oe);
    check(d == {6'd0, 1'b1, 1'b1, 8'd0}, $sformatf("status empty %h", d));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
