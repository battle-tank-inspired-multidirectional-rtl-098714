// tb_vga_timing - checks the 640x480 raster generator.
//
// Counts pixel enables itself and compares, pixel by pixel for two frames,
// the counters, HSYNC (low for columns 656..751), VSYNC (low for lines
// 490..491) and the display flag against the standard 800x525 raster. Also
// checks that pix_en comes every second clock, that VGA_CLK rises in the
// middle of each pixel and that a frame lasts 840,000 clocks.
`timescale 1ns/1ps
module tb_vga_timing;
  logic clk = 0, rst = 1;
  always #10 clk = !clk;

  logic       pix_en, active, hs_n, vs_n, vga_clk, frame_start;
  logic [9:0] hc, vc;

  vga_timing dut (.clk, .rst, .pix_en, .hcount(hc), .vcount(vc), .active,
                  .hsync_n(hs_n), .vsync_n(vs_n), .vga_clk, .frame_start);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int  eh = 0, ev = 0;            // expected counters
  int  since_en = 0;
  longint cyc = 0, last_frame = -1;
  int  frames = 0, active_pix = 0;
  logic prev_en = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
  end

  always @(posedge clk) if (!rst) begin
    cyc++;
    // counters and decoded outputs of the current pixel
    check(hc == 10'(eh) && vc == 10'(ev), "counters");
    check(hs_n == !(eh >= 656 && eh <= 751), "hsync");
    check(vs_n == !(ev >= 490 && ev <= 491), "vsync");
    check(active == (eh < 640 && ev < 480), "active");
    // VGA_CLK: low in the first clock of a pixel, high in the second
    if (cyc > 1) begin
      if (prev_en) check(vga_clk == 1'b0, "vga_clk low after pixel change");
      else         check(vga_clk == 1'b1, "vga_clk high mid-pixel");
    end
    if (pix_en) begin
      check(since_en == 1 || cyc == 1 || cyc == 2, "pix_en every 2 clocks");
      since_en = 0;
      if (frame_start) begin
        if (last_frame >= 0) check(cyc - last_frame == 840000, "frame length");
        last_frame = cyc;
        frames++;
      end
      if (active && frames < 3) active_pix++;
      eh++;
      if (eh == 800) begin eh = 0; ev++; if (ev == 525) ev = 0; end
    end else since_en++;
    prev_en = pix_en;
    if (frames == 3) begin
      check(active_pix == 2 * 640 * 480, "active pixels per frame");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
