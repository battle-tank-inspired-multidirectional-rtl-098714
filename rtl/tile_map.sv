// tile_map - the 20x15 scenery map of the playfield.
//
// One entry per 32x32 screen tile: an enable bit and the number of the
// image drawn there (steel, water, brick, home base, or any other image).
// Software writes an entry when the scenery changes, for example to show a
// damaged brick or the destroyed base. Reset empties the map.
//
// Timing: writes take effect at the clock edge; the read port is
// combinational from (col, row), and reads an empty tile outside the map.
module tile_map
  import bt_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       we,
  input  logic [8:0] waddr,     // row * COLS + col
  input  tile_t      wdata,
  input  logic [4:0] col,
  input  logic [3:0] row,
  output tile_t      tile
);

  tile_t map [N_TILES];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N_TILES; i++) map[i] <= '0;
    end else if (we && (int'(waddr) < N_TILES)) begin
      map[waddr] <= wdata;
    end
  end

  always_comb begin
    if ((int'(col) < COLS) && (int'(row) < ROWS))
      tile = map[int'(row) * COLS + int'(col)];
    else
      tile = '0;
  end

endmodule
