// Self-checking testbench for lcd_con at a reduced screen size (8x4 visible,
// 17x8 total) so that many frames run quickly. The pixel source is a counter
// whose value is on pix_data and which advances on pix_rd; pix_valid is
// random, so the source sometimes runs dry. The testbench keeps its own scan
// position and, for every pclk edge, works out what den, hsync, vsync,
// lcd_data, underflow and pix_rd must be. Also checked: frame_start comes
// once every H_TOTAL*V_TOTAL cycles, each frame has H_ACTIVE*V_ACTIVE den
// cycles, and with en low the screen shows BLANK and nothing is taken.
module tb_lcd_con;
  localparam int HA = 8, HF = 2, HS = 3, HB = 4;
  localparam int VA = 4, VF = 1, VS = 2, VB = 1;
  localparam int HT = HA + HF + HS + HB;
  localparam int VT = VA + VF + VS + VB;
  localparam logic [15:0] BLANK = 16'h001F;

  logic pclk = 0, reset = 1, en = 1;
  logic [15:0] pix_data;
  logic pix_valid = 0;
  logic pix_rd, den, hsync, vsync, underflow, frame_start;
  logic [15:0] lcd_data;

  int checks = 0, failures = 0;
  int th = 0, tv = 0;
  logic [15:0] seq = 16'h0100;
  logic e_den, e_hs, e_vs, e_uf;
  logic [15:0] e_data;
  bit have_exp = 0;
  int n_uf = 0, n_rd = 0, n_fs = 0, den_cnt = 0, last_fs = -1, cyc = 0;
  int valid_pct = 70;

  always #5 pclk = ~pclk;
  assign pix_data = seq;

  lcd_con #(
    .H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
    .V_ACTIVE(VA), .V_FP(VF), .V_SYNC(VS), .V_BP(VB),
    .SYNC_POL(1'b1), .BLANK(BLANK)
  ) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Reference: state before the edge decides the registered outputs after it.
  always @(posedge pclk) begin
    if (!reset) begin
      bit act;
      cyc++;
      act = (th < HA) && (tv < VA);
      check(pix_rd == (act && en && pix_valid), "pix_rd");
      check(frame_start == (th == 0 && tv == 0), "frame_start");
      if (frame_start) begin
        if (last_fs >= 0) check(cyc - last_fs == HT * VT, "frame period");
        last_fs = cyc;
        n_fs++;
        if (n_fs > 1) check(den_cnt == HA * VA, $sformatf("den count %0d", den_cnt));
        den_cnt = 0;
      end
      e_den  = act;
      e_hs   = (th >= HA + HF) && (th < HA + HF + HS);
      e_vs   = (tv >= VA + VF) && (tv < VA + VF + VS);
      e_data = !act ? 16'h0 : ((en && pix_valid) ? seq : BLANK);
      e_uf   = act && en && !pix_valid;
      have_exp = 1;
      if (act && en && pix_valid) begin seq <= seq + 1'b1; n_rd++; end
      if (th == HT - 1) begin th = 0; tv = (tv == VT - 1) ? 0 : tv + 1; end
      else th++;
    end
  end

  always @(negedge pclk) begin
    if (have_exp) begin
      check(den == e_den && hsync == e_hs && vsync == e_vs, "den/hsync/vsync");
      check(lcd_data == e_data, $sformatf("lcd_data %h expected %h", lcd_data, e_data));
      check(underflow == e_uf, "underflow");
      if (den) den_cnt++;
      if (underflow) n_uf++;
    end
    pix_valid = ($urandom_range(0, 99) < valid_pct);
  end

  initial begin : watchdog
    repeat (20000) @(posedge pclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rd0;
    repeat (3) @(negedge pclk);
    reset = 0;
    repeat (HT * VT * 6) @(negedge pclk);
    check(n_uf > 0 && n_rd > 0, "both pixels and underflows seen");
    valid_pct = 100;
    repeat (HT * VT * 2) @(negedge pclk);
    en = 0;
    rd0 = n_rd;
    repeat (HT * VT * 2) @(negedge pclk);
    check(n_rd == rd0, "en low takes no pixels");
    check(n_fs >= 9, $sformatf("frames seen %0d", n_fs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
