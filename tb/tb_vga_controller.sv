// tb_vga_controller - pixel-exact check of the display controller.
//
// Loads all twelve 32x32 images and ten 20x20 digits through the bus
// (content from the formulas in vga_ref.svh), fills the tile map and the
// three object tables with random entries that overlap one another, and
// sets a playfield. Every pixel of two whole frames is then sampled on
// VGA_CLK rising edges, as the DAC does, and compared with the reference
// model, together with HSYNC, VSYNC and BLANK. Between the frames, during
// vertical blanking, objects are moved, tiles changed and the playfield
// moved. Position is tracked from the start of the VSYNC pulse (pixel
// (0, 490)), so the check also proves that syncs and data leave with the
// same delay; the delay itself (2 pixels) is checked on the first HSYNC.
`timescale 1ns/1ps
module tb_vga_controller;
  logic clk = 0, rst = 1;
  always #10 clk = !clk;

  logic [14:0] address = '0;
  logic        chipselect = 0, write = 0;
  logic [31:0] writedata = '0;
  logic [7:0]  R, G, B;
  logic        vclk, hs, vs, blank_n, sync_n;

  vga_controller dut (
    .clk, .rst, .avs_address(address), .avs_write(write), .avs_writedata(writedata),
    .avs_chipselect(chipselect), .VGA_R(R), .VGA_G(G), .VGA_B(B), .VGA_CLK(vclk),
    .VGA_HS(hs), .VGA_VS(vs), .VGA_BLANK_n(blank_n), .VGA_SYNC_n(sync_n));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [31:0] r_tile [] = new[300];
  logic [31:0] r_tank [] = new[8];
  logic [31:0] r_fx   [] = new[8];
  logic [31:0] r_info [] = new[8];
  logic [31:0] r_field = {14'd0, 4'd13, 4'd1, 5'd13, 5'd1};

  `include "vga_ref.svh"

  task automatic wr(logic [14:0] a, logic [31:0] d);
    @(negedge clk);
    address = a; writedata = d; chipselect = 1; write = 1;
    @(negedge clk);
    chipselect = 0; write = 0;
  endtask

  function automatic logic [31:0] obj_word(bit en, int img, int x, int y);
    return {en, 7'd0, 4'(img), 10'(y), 10'(x)};
  endfunction

  task automatic set_tank(int i, logic [31:0] w); r_tank[i] = w; wr(15'h5400 + 15'(i), w); endtask
  task automatic set_fx(int i, logic [31:0] w);   r_fx[i]   = w; wr(15'h5500 + 15'(i), w); endtask
  task automatic set_info(int i, logic [31:0] w);
    r_info[i] = w;
    if (w[23:20] >= 4'd10) r_info[i][31] = 1'b0;   // only digits 0..9 exist
    wr(15'h5600 + 15'(i), w);
  endtask
  task automatic set_tile(int i, logic [31:0] w); r_tile[i] = w; wr(15'h5000 + 15'(i), w); endtask

  task automatic scramble();
    for (int i = 0; i < 300; i++)
      if ($urandom_range(0, 2) == 0) set_tile(i, {1'b1, 7'd0, 4'($urandom_range(4, 11)), 20'd0});
      else set_tile(i, 32'd0);
    for (int i = 0; i < 8; i++) begin
      set_tank(i, obj_word($urandom_range(0, 4) != 0, $urandom_range(0, 11),
                           $urandom_range(0, 620), $urandom_range(0, 460)));
      set_fx(i, obj_word($urandom_range(0, 4) != 0, $urandom_range(0, 11),
                         $urandom_range(0, 620), $urandom_range(0, 460)));
      set_info(i, obj_word(1, $urandom_range(0, 11), $urandom_range(0, 630), $urandom_range(0, 470)));
    end
    // forced overlaps: fx 1 on fx 0, tank 1 on tank 0, digit 1 on digit 0,
    // fx 2 on tank 2, an object partly off the left edge
    set_fx(1, obj_word(1, 9, int'(r_fx[0][9:0]) + 9, int'(r_fx[0][19:10]) + 5));
    set_tank(1, obj_word(1, 2, int'(r_tank[0][9:0]) + 7, int'(r_tank[0][19:10]) + 11));
    set_info(1, obj_word(1, 3, int'(r_info[0][9:0]) + 6, int'(r_info[0][19:10]) + 4));
    set_fx(2, obj_word(1, 8, int'(r_tank[2][9:0]) + 3, int'(r_tank[2][19:10]) + 3));
    set_tank(3, obj_word(1, 0, 1010, 200));
  endtask

  // ------------------------------------------------------ pixel capture
  int  frames_done = 0;
  bit  tracking = 0;
  int  pos = 0;
  logic vs_prev = 1;
  int  cyc = 0, first_hs = -1;

  always @(posedge clk) begin
    if (!rst) cyc++;
    if (!rst && !hs && first_hs < 0) first_hs = cyc;
  end

  always @(posedge vclk) if (!rst) begin
    if (vs_prev && !vs) begin
      if (tracking) begin
        check(pos == 490 * 800 + 800 * 525, "frame length in pixels");
        frames_done++;
      end
      tracking = 1;
      pos = 490 * 800;
    end
    vs_prev = vs;
    if (tracking) begin
      int x, y;
      x = (pos % (800 * 525)) % 800;
      y = (pos % (800 * 525)) / 800;
      check(hs == !(x >= 656 && x < 752), "HSYNC");
      check(vs == !(y >= 490 && y < 492), "VSYNC");
      check(blank_n == (x < 640 && y < 480), "BLANK_n");
      check(sync_n == 1'b0, "SYNC_n");
      if (x < 640 && y < 480) begin
        logic [29:0] e;
        e = expected_pix(x, y, 1);
        check({R, G, B} == {e[29:22], e[19:12], e[9:2]},
              $sformatf("pixel (%0d,%0d) got %h%h%h want %h", x, y, R, G, B, e));
      end else check({R, G, B} == 24'd0, "RGB zero while blanked");
      pos++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 12; i++)
      for (int r = 0; r < 32; r++)
        for (int c = 0; c < 32; c++) wr(15'(i * 1024 + r * 32 + c), 32'(img_pix(i, r, c)));
    for (int d = 0; d < 10; d++)
      for (int r = 0; r < 20; r++)
        for (int c = 0; c < 20; c++) wr(15'h4000 + 15'(d * 400 + r * 20 + c), 32'(dig_pix(d, r, c)));
    scramble();
    // from here on only change the tables during vertical blanking
    wait (frames_done == 1);
    scramble();
    r_field = {14'd0, 4'd14, 4'd2, 5'd18, 5'd3};
    wr(15'h5700, r_field);
    wait (frames_done == 3);
    check(first_hs == 2 * (656 + 2) + 1 || first_hs == 2 * (656 + 2) ||
          first_hs == 2 * (656 + 2) + 2, $sformatf("pipeline delay (first HSYNC at %0d)", first_hs));
    $display("fx=%0d tile=%0d tank=%0d info=%0d black=%0d grey=%0d clear=%0d overlap=%0d",
             st_fx, st_tile, st_tank, st_info, st_black, st_grey, st_clear, st_overlap);
    check(st_fx > 0 && st_tile > 0 && st_tank > 0 && st_info > 0 && st_black > 0 &&
          st_grey > 0 && st_clear > 0 && st_overlap > 0, "every layer case seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
