// sprite_engine - finds which object of one display layer covers a pixel.
//
// Each of the N objects is a square image of SIZE x SIZE pixels placed with
// its top-left corner at (x, y) anywhere on the screen, so tanks, bullets
// and explosions move independently of the 32-pixel tile grid. For the
// current pixel every enabled object is compared in parallel
// (0 <= px - x < SIZE and 0 <= py - y < SIZE, as 10-bit unsigned
// differences); the lowest-numbered object that covers the pixel wins (a
// design choice). The output address is that object's image number times
// SIZE*SIZE plus the row-major offset of the pixel inside the image, ready
// for the image memory.
//
// Used for the tank/bonus layer and the bullet/explosion layer (SIZE 32)
// and for the game-information digits (SIZE 20). Purely combinational.
module sprite_engine
  import bt_pkg::*;
#(
  parameter int N    = 8,
  parameter int SIZE = 32,
  parameter int AW   = 14
) (
  input  logic [9:0]    px,
  input  logic [9:0]    py,
  input  sprite_t       objs [N],
  output logic          hit,
  output logic [AW-1:0] addr
);

  logic [9:0] dx, dy;

  always_comb begin
    hit  = 1'b0;
    addr = '0;
    dx   = '0;
    dy   = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (objs[i].en &&
          (10'(px - objs[i].x) < 10'(SIZE)) &&
          (10'(py - objs[i].y) < 10'(SIZE))) begin
        hit  = 1'b1;
        dx   = 10'(px - objs[i].x);
        dy   = 10'(py - objs[i].y);
        addr = AW'(int'(objs[i].img) * SIZE * SIZE + int'(dy) * SIZE + int'(dx));
      end
    end
  end

endmodule
