// Full-size testbench: sas_display_top with every parameter at its default
// (1280x720 visible, 1650x750 total, 256-word FIFO), running the sonar
// display workload. clk runs at 2.5 ns and pclk at 13.468 ns (74.25 MHz).
//
// The DSP model first builds one display image the way the DSP software does:
// a synthetic echo set of 167 lines x 675 range samples (8-bit intensity,
// with a few bright targets) spread over a 150 degree fan, resampled onto the
// 1280x720 grid by R-Theta interpolation. The fan apex is at the bottom
// centre (640, 719); a pixel at distance r and angle theta from the vertical
// lies between lines i, i+1 (line spacing dtheta = 150/166 degrees) and
// samples j, j+1 (spacing dR = 1 pixel), and gets the bilinear mix of those
// four samples weighted by the radial and angular fractions. Pixels outside
// the fan are black; intensity v maps to RGB565 as a blue scale
// {v[7:5] in red, v[7:3] in green, v[7:3] in blue}.
//
// The model waits for the first vsync, then writes the 921,600 pixels over
// the XINTF in raster order, a word every five clk cycles, holding back while
// fifo_busy is high. Frame 1 must show the whole image with no underflow; the
// line and frame counts (720 lines of 1280 den cycles, one vsync per frame)
// are checked too.
`timescale 1ns / 1ps
module tb_sas_display_full;
  import sas_pkg::*;

  localparam int HA = 1280, VA = 720;
  localparam int FRAME_PIX = HA * VA;

  logic clk = 0, pclk = 0, rst = 1;
  logic [18:0] xintf_addr = '0;
  logic [15:0] xintf_data_i = '0, xintf_data_o;
  logic xintf_data_oe, xintf_cs_n = 1, xintf_wr_n = 1, xintf_rd_n = 1;
  logic dsp_int_n, fifo_busy, lcd_pclk, lcd_reset, lcd_den, lcd_hsync, lcd_vsync;
  logic [15:0] lcd_data;
  logic fifo_overflow, display_underflow, frame_start;

  int checks = 0, failures = 0;
  int n_vsync = 0, n_busy_wait = 0, pix_idx = 0, bad = 0;
  int uf_frame1 = 0, den_run = 0, lines_f1 = 0;
  bit in_f1 = 0;
  logic vs_q = 0, den_q = 0;

  always #1.25 clk = ~clk;
  always #6.734 pclk = ~pclk;

  sas_display_top dut (.*);

  localparam int    N_LINES = 167, N_SAMP = 675;
  localparam real   PI      = 3.14159265358979;
  localparam real   FAN     = 150.0 * PI / 180.0;
  localparam real   DTHETA  = FAN / (N_LINES - 1);
  localparam real   DR      = 1.0;
  localparam real   X0      = 640.0, Y0 = 719.0;

  logic [7:0]  echo [N_LINES][N_SAMP];
  logic [15:0] image [FRAME_PIX];

  function automatic logic [15:0] pattern(input int k);
    return image[k];
  endfunction

  // Synthetic echoes: speckle-like texture that fades with range, plus
  // bright point targets.
  task automatic make_echoes();
    for (int i = 0; i < N_LINES; i++)
      for (int j = 0; j < N_SAMP; j++) begin
        int v;
        v = ((i * 37 + j * 11) ^ (j * 5 + i)) & 32'h7F;
        v = v * (N_SAMP - j) / N_SAMP + 20;
        if ((j % 97 < 3) && (i % 23 < 4)) v = 250;
        echo[i][j] = 8'(v);
      end
  endtask

  // R-Theta interpolation of the echo set onto the display grid.
  task automatic make_image();
    for (int y = 0; y < VA; y++)
      for (int x = 0; x < HA; x++) begin
        real dx, dy, r, th, fi, fj, ai, aj, z;
        int i, j;
        logic [7:0] v;
        dx = x - X0;
        dy = Y0 - y;
        r  = $sqrt(dx * dx + dy * dy);
        th = $atan2(dx, dy) + FAN / 2.0;
        fi = th / DTHETA;
        fj = r / DR;
        if (th < 0.0 || th > FAN || fj > real'(N_SAMP - 1)) begin
          image[y * HA + x] = 16'h0000;
        end else begin
          i  = int'($floor(fi));
          j  = int'($floor(fj));
          if (i > N_LINES - 2) i = N_LINES - 2;
          if (j > N_SAMP - 2)  j = N_SAMP - 2;
          ai = fi - i;
          aj = fj - j;
          z  = (1.0 - ai) * ((1.0 - aj) * echo[i][j]   + aj * echo[i][j+1])
             +        ai  * ((1.0 - aj) * echo[i+1][j] + aj * echo[i+1][j+1]);
          v  = 8'(int'(z));
          image[y * HA + x] = {v[7:5], 2'b00, v[7:2], v[7:3]};
        end
      end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge pclk) begin
    if (!rst) begin
      vs_q  <= lcd_vsync;
      den_q <= lcd_den;
      if (lcd_vsync && !vs_q) n_vsync++;
      if (in_f1) begin
        if (display_underflow) uf_frame1++;
        if (lcd_den) begin
          if (lcd_data != pattern(pix_idx)) begin
            bad++;
            if (bad < 10) $display("pixel %0d = %h expected %h", pix_idx, lcd_data, pattern(pix_idx));
          end
          pix_idx++;
          den_run++;
        end else if (den_q) begin
          check(den_run == HA, $sformatf("line %0d has %0d pixels", lines_f1, den_run));
          lines_f1++;
          den_run = 0;
        end
      end
    end
  end

  initial begin : watchdog
    repeat (16_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fan_pix;
    make_echoes();
    make_image();
    fan_pix = 0;
    for (int k = 0; k < FRAME_PIX; k++) if (image[k] != 0) fan_pix++;
    check(fan_pix > FRAME_PIX / 2, $sformatf("fan covers %0d pixels", fan_pix));
    repeat (20) @(negedge clk);
    rst = 0;
    wait (n_vsync == 1);
    in_f1 = 1;
    for (int k = 0; k < FRAME_PIX; k++) begin
      if (fifo_busy) begin
        n_busy_wait++;
        while (fifo_busy) @(negedge clk);
      end
      @(negedge clk) begin xintf_addr = ADDR_FIFO; xintf_data_i = pattern(k); xintf_cs_n = 0; xintf_wr_n = 0; end
      repeat (2) @(negedge clk);
      xintf_wr_n = 1;
      @(negedge clk) xintf_cs_n = 1;
      @(negedge clk);
    end
    wait (n_vsync == 2);
    in_f1 = 0;
    check(pix_idx == FRAME_PIX, $sformatf("pixels shown %0d", pix_idx));
    check(bad == 0, $sformatf("pixel mismatches %0d", bad));
    check(uf_frame1 == 0, $sformatf("underflows in frame 1: %0d", uf_frame1));
    check(lines_f1 == VA, $sformatf("visible lines %0d", lines_f1));
    check(!fifo_overflow, "no overflow");
    check(n_busy_wait > 0, "back-pressure used");
    $display("frame 1: %0d pixels (%0d inside the fan), %0d lines, %0d busy waits",
             pix_idx, fan_pix, lines_f1, n_busy_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
