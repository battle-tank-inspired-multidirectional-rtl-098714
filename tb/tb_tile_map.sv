// tb_tile_map - checks the 20x15 scenery map.
//
// After reset every tile must read empty. Random entries are then written
// through the write port (a shadow map is the reference) and every tile
// position is read back through (col, row); columns 20..31 must read
// empty. A second reset must empty the map again.
`timescale 1ns/1ps
module tb_tile_map;
  import bt_pkg::*;
  logic clk = 0, rst = 1;
  always #10 clk = !clk;

  logic       we = 0;
  logic [8:0] waddr = '0;
  tile_t      wdata = '0, tile;
  logic [4:0] col = '0;
  logic [3:0] row = '0;

  tile_map dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  tile_t shadow [300];

  task automatic read_all(bit expect_empty);
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 32; c++) begin
        col = 5'(c); row = 4'(r);
        #1;
        if (c >= 20 || r >= 15 || expect_empty) check(tile == '0, "empty tile");
        else check(tile == shadow[r * 20 + c], "tile read");
      end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    read_all(1);
    for (int pass = 0; pass < 3; pass++) begin
      @(negedge clk);
      for (int i = 0; i < 300; i++) begin
        shadow[i] = '{en: 1'($urandom), img: 4'($urandom_range(0, 11))};
        we = 1; waddr = 9'(i); wdata = shadow[i];
        @(negedge clk);
      end
      // a write outside the map changes nothing
      waddr = 9'd300; wdata = '1;
      @(negedge clk);
      we = 0;
      read_all(0);
    end
    @(negedge clk);
    rst = 1;
    @(negedge clk);
    rst = 0;
    read_all(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
