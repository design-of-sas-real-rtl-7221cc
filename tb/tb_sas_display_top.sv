// End-to-end testbench for sas_display_top at a reduced screen size
// (16x6 visible, 24x10 total) with a bus-functional model of the DSP on the
// XINTF pins. clk runs at 1 ns and pclk at 10 ns; fifo_busy is set at 64
// words so that the short stream below reaches it. Sequence:
//  1. After reset the screen scans with an empty FIFO: every visible pixel is
//     an underflow (counted).
//  2. After the first vsync the DSP streams four frames of a known pixel
//     pattern, waiting whenever fifo_busy is high (back-pressure, counted).
//     Frames 1..4 must show exactly that pattern, in raster order, with no
//     underflow; the screen shows BLANK (0) afterwards.
//  3. The DSP sets the read-back bit (mode switch, counted), writes 260 words
//     without looking at fifo_busy: 256 are kept and the rest set
//     fifo_overflow (counted). dsp_int_n must go low (counted); the DSP reads
//     the status word and then the 256 words back, which must match, with
//     data_oe high only during its reads. The display takes nothing meanwhile.
//  4. The DSP clears the control register: overflow clears, the display
//     consumer is back (second mode switch), the interrupt is released.
// Each mechanism above must have happened at least once.
module tb_sas_display_top;
  import sas_pkg::*;

  localparam int HA = 16, HF = 2, HS = 3, HB = 3;
  localparam int VA = 6, VF = 1, VS = 1, VB = 2;
  localparam int FRAME_PIX = HA * VA;

  logic clk = 0, pclk = 0, rst = 1;
  logic [18:0] xintf_addr = '0;
  logic [15:0] xintf_data_i = '0, xintf_data_o;
  logic xintf_data_oe, xintf_cs_n = 1, xintf_wr_n = 1, xintf_rd_n = 1;
  logic dsp_int_n, fifo_busy, lcd_pclk, lcd_reset, lcd_den, lcd_hsync, lcd_vsync;
  logic [15:0] lcd_data;
  logic fifo_overflow, display_underflow, frame_start;

  int checks = 0, failures = 0;
  int n_underflow = 0, n_busy_wait = 0, n_overflow = 0, n_mode = 0, n_int = 0;
  int n_readback = 0, n_frames = 0, n_vsync = 0;
  bit check_pixels = 0;
  int pix_idx = 0, pix_total = 0;
  logic vs_q = 0;

  always #0.5 clk = ~clk;
  always #5   pclk = ~pclk;

  sas_display_top #(
    .H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
    .V_ACTIVE(VA), .V_FP(VF), .V_SYNC(VS), .V_BP(VB),
    .HIGH_WATER(64)
  ) dut (.*);

  function automatic logic [15:0] pattern(input int k);
    return 16'(k * 40503 + 7);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Screen monitor: pixels of the streamed frames must follow the pattern.
  always @(posedge pclk) begin
    if (!rst) begin
      if (display_underflow) n_underflow++;
      if (frame_start) n_frames++;
      vs_q <= lcd_vsync;
      if (lcd_vsync && !vs_q) n_vsync++;
      if (lcd_den && check_pixels) begin
        if (pix_idx < pix_total) begin
          check(lcd_data == pattern(pix_idx),
                $sformatf("pixel %0d = %h expected %h", pix_idx, lcd_data, pattern(pix_idx)));
          pix_idx++;
        end
      end
    end
  end

  always @(posedge clk) if (!rst && !xintf_data_oe_ok()) check(0, "data_oe outside a read");
  function automatic bit xintf_data_oe_ok();
    return !xintf_data_oe || (!xintf_cs_n && !xintf_rd_n);
  endfunction

  task automatic xwrite(input logic [18:0] a, input logic [15:0] d);
    @(negedge clk) begin xintf_addr = a; xintf_data_i = d; xintf_cs_n = 0; end
    @(negedge clk) xintf_wr_n = 0;
    repeat (3) @(negedge clk);
    xintf_wr_n = 1;
    @(negedge clk) xintf_cs_n = 1;
    repeat (2) @(negedge clk);
  endtask

  // Reads are seen in the pclk domain: strobe low 30 clk, high 50 clk.
  task automatic xread(input logic [18:0] a, output logic [15:0] d);
    @(negedge clk) begin xintf_addr = a; xintf_cs_n = 0; end
    @(negedge clk) xintf_rd_n = 0;
    repeat (30) @(negedge clk);
    check(xintf_data_oe, "data_oe during read");
    d = xintf_data_o;
    xintf_rd_n = 1;
    @(negedge clk) xintf_cs_n = 1;
    repeat (50) @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    int uf0, rd_fail;
    repeat (20) @(negedge clk);
    rst = 0;

    // 1. empty FIFO: frame 0 underflows
    wait (n_vsync == 1);
    check(n_underflow == FRAME_PIX, $sformatf("frame 0 underflows %0d", n_underflow));
    uf0 = n_underflow;

    // 2. stream four frames
    pix_total = 4 * FRAME_PIX;
    check_pixels = 1;
    for (int k = 0; k < 4 * FRAME_PIX; k++) begin
      if (fifo_busy) begin
        n_busy_wait++;
        while (fifo_busy) @(negedge clk);
      end
      xwrite(ADDR_FIFO, pattern(k));
    end
    wait (n_vsync == 6);
    check(pix_idx == 4 * FRAME_PIX, $sformatf("pixels shown %0d", pix_idx));
    check(n_underflow - uf0 == FRAME_PIX, "only frame 5 underflows after the stream");
    check(!fifo_overflow, "no overflow while streaming");

    // 3. read-back path
    xwrite(ADDR_CTRL, 16'h0001);
    n_mode++;
    repeat (20) @(negedge clk);
    uf0 = n_underflow;
    for (int k = 0; k < 260; k++) xwrite(ADDR_FIFO, pattern(1000 + k));
    repeat (20) @(negedge clk);
    if (fifo_overflow) n_overflow++;
    check(fifo_overflow, "overflow after 260 writes");
    if (!dsp_int_n) n_int++;
    check(!dsp_int_n, "interrupt with data waiting");
    xread(ADDR_CTRL, d);
    check(d == 16'h0200, $sformatf("status full %h", d));
    rd_fail = 0;
    for (int k = 0; k < 256; k++) begin
      xread(ADDR_FIFO, d);
      n_readback++;
      if (d != pattern(1000 + k)) rd_fail++;
    end
    check(rd_fail == 0, $sformatf("read-back mismatches %0d", rd_fail));
    check(dsp_int_n, "interrupt released when drained");
    xread(ADDR_CTRL, d);
    check(d == 16'h0300, $sformatf("status empty %h", d));
    check(n_underflow == uf0, "display takes nothing in read-back mode");

    // 4. back to display
    xwrite(ADDR_CTRL, 16'h0000);
    n_mode++;
    repeat (20) @(negedge clk);
    check(!fifo_overflow, "overflow cleared");
    repeat (3000) @(negedge clk);
    check(n_underflow > uf0, "display consumer back");

    check(n_underflow > 0, "mechanism: underflow");
    check(n_busy_wait > 0, "mechanism: back-pressure (fifo_busy)");
    check(n_overflow > 0, "mechanism: overflow");
    check(n_mode == 2, "mechanism: mode switch");
    check(n_int > 0, "mechanism: interrupt");
    check(n_readback == 256, "mechanism: read-back");
    $display("mechanisms: underflow=%0d busy_wait=%0d overflow=%0d mode=%0d int=%0d readback=%0d frames=%0d",
             n_underflow, n_busy_wait, n_overflow, n_mode, n_int, n_readback, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
