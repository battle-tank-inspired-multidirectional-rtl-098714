// layer_mux - chooses the visible pixel among the display layers.
//
// The order, from top to bottom, is the game's: bullets and explosions,
// then steel / water / brick / home base, then tanks and bonus, then the
// game-information digits, then the background. A layer shows when it has
// an object at the pixel and that object's pixel is not 0; the value 0
// marks transparent pixels so the layer below shows through (a design
// choice). The background is black inside the playfield and grey outside,
// which draws the grey frame around the field. Purely combinational.
module layer_mux
  import bt_pkg::*;
(
  input  logic fx_hit,
  input  pix_t fx_pix,
  input  logic tile_hit,
  input  pix_t tile_pix,
  input  logic tank_hit,
  input  pix_t tank_pix,
  input  logic info_hit,
  input  pix_t info_pix,
  input  logic in_field,
  output pix_t pix
);

  always_comb begin
    if (fx_hit && fx_pix != '0)
      pix = fx_pix;
    else if (tile_hit && tile_pix != '0)
      pix = tile_pix;
    else if (tank_hit && tank_pix != '0)
      pix = tank_pix;
    else if (info_hit && info_pix != '0)
      pix = info_pix;
    else
      pix = in_field ? BLACK : GREY;
  end

endmodule
