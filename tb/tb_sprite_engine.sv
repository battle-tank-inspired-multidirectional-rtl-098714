// tb_sprite_engine - checks the object hit test and image addressing.
//
// Two engines are tested side by side: eight 32x32 objects (tank layer)
// and eight 20x20 objects (digits). Object tables and pixel positions are
// random, with many pixels placed near object edges. The reference walks
// the table from index 0 and takes the first enabled object with
// (px - x) mod 1024 < SIZE and (py - y) mod 1024 < SIZE; the expected
// address is image*SIZE*SIZE + dy*SIZE + dx.
`timescale 1ns/1ps
module tb_sprite_engine;
  import bt_pkg::*;

  localparam int N = 8;
  sprite_t    objs [N];
  logic [9:0] px, py;
  logic       hit32, hit20;
  logic [13:0] addr32;
  logic [11:0] addr20;

  sprite_engine #(.N(N), .SIZE(32), .AW(14)) dut32 (.px, .py, .objs, .hit(hit32), .addr(addr32));
  sprite_engine #(.N(N), .SIZE(20), .AW(12)) dut20 (.px, .py, .objs, .hit(hit20), .addr(addr20));

  int checks = 0, failures = 0;
  int hits = 0, overlaps = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic expect_for(int size, output bit eh, output int ea, output int ncov);
    eh = 0; ea = 0; ncov = 0;
    for (int i = 0; i < N; i++) begin
      int dx, dy;
      dx = (int'(px) - int'(objs[i].x) + 1024) % 1024;
      dy = (int'(py) - int'(objs[i].y) + 1024) % 1024;
      if (objs[i].en && dx < size && dy < size) begin
        ncov++;
        if (!eh) begin
          eh = 1;
          ea = int'(objs[i].img) * size * size + dy * size + dx;
        end
      end
    end
  endtask

  initial begin
    bit eh; int ea, ncov;
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < N; i++) begin
        objs[i].en  = ($urandom_range(0, 3) != 0);
        objs[i].img = 4'($urandom_range(0, 11));
        objs[i].x   = 10'($urandom_range(0, 660));
        objs[i].y   = 10'($urandom_range(0, 500));
      end
      if (t % 50 == 0) objs[0].x = 10'(1010);     // partly off the left edge
      for (int k = 0; k < 20; k++) begin
        int j;
        j  = $urandom_range(0, N - 1);
        px = 10'(int'(objs[j].x) + $urandom_range(0, 40) - 4);
        py = 10'(int'(objs[j].y) + $urandom_range(0, 40) - 4);
        #1;
        expect_for(32, eh, ea, ncov);
        check(hit32 == eh, "hit 32");
        if (eh) check(int'(addr32) == ea, "address 32");
        if (eh) hits++;
        if (ncov > 1) overlaps++;
        expect_for(20, eh, ea, ncov);
        check(hit20 == eh, "hit 20");
        if (eh) check(int'(addr20) == (ea % 4096), "address 20");
      end
    end
    check(hits > 1000 && overlaps > 100, "hits and overlaps exercised");
    $display("hits=%0d overlaps=%0d", hits, overlaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
