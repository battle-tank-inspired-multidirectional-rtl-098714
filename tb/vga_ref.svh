// vga_ref.svh - reference model of the tile-and-sprite display, shared by
// the display test benches. Included inside a test bench module that
// declares the tables r_tile, r_tank, r_fx, r_info and r_field.
//
// Picture content is a formula, the same one the test benches load into
// the graphics memory: 30-bit hashes of (image, row, column) with about one
// pixel in seven set to 0 (transparent).

function automatic logic [29:0] img_pix(int i, int r, int c);
  logic [31:0] h;
  if ((r * 3 + c * 5 + i) % 7 == 0) return '0;
  h = 32'(i * 1000003 + r * 7919 + c * 104729 + 12345);
  h = h ^ (h >> 13);
  h = h * 32'd2654435761;
  return (h[29:0] == 0) ? 30'd1 : h[29:0];
endfunction

function automatic logic [29:0] dig_pix(int d, int r, int c);
  if ((r + c * 2 + d) % 5 == 0) return '0;
  return 30'((d + 1) * 40_000_000 + r * 33 + c * 1021);
endfunction

// Layer statistics, counted by expected_pix.
int st_fx = 0, st_tile = 0, st_tank = 0, st_info = 0, st_black = 0, st_grey = 0;
int st_clear = 0, st_overlap = 0;

// Which object of a layer covers (x, y), with wrap-around at 1024.
function automatic int find_obj(logic [31:0] tab [], int size, int x, int y, ref int n_cover);
  int found = -1;
  n_cover = 0;
  for (int i = 0; i < tab.size(); i++) begin
    int ox, oy;
    ox = int'(tab[i][9:0]);
    oy = int'(tab[i][19:10]);
    if (tab[i][31] && ((x - ox + 1024) % 1024) < size && ((y - oy + 1024) % 1024) < size) begin
      n_cover++;
      if (found < 0) found = i;
    end
  end
  return found;
endfunction

function automatic logic [29:0] expected_pix(int x, int y, bit count);
  int j, nc;
  logic [29:0] p;
  bit clear_seen = 0;
  // bullets and explosions
  j = find_obj(r_fx, 32, x, y, nc);
  if (count && nc > 1) st_overlap++;
  if (j >= 0) begin
    p = img_pix(int'(r_fx[j][23:20]), (y - int'(r_fx[j][19:10]) + 1024) % 1024,
                (x - int'(r_fx[j][9:0]) + 1024) % 1024);
    if (p != 0) begin if (count) st_fx++; return p; end
    clear_seen = 1;
  end
  // scenery tiles
  if (r_tile[(y / 32) * 20 + x / 32][31]) begin
    p = img_pix(int'(r_tile[(y / 32) * 20 + x / 32][23:20]), y % 32, x % 32);
    if (p != 0) begin if (count) begin st_tile++; if (clear_seen) st_clear++; end return p; end
    clear_seen = 1;
  end
  // tanks and bonus
  j = find_obj(r_tank, 32, x, y, nc);
  if (count && nc > 1) st_overlap++;
  if (j >= 0) begin
    p = img_pix(int'(r_tank[j][23:20]), (y - int'(r_tank[j][19:10]) + 1024) % 1024,
                (x - int'(r_tank[j][9:0]) + 1024) % 1024);
    if (p != 0) begin if (count) begin st_tank++; if (clear_seen) st_clear++; end return p; end
    clear_seen = 1;
  end
  // game-information digits
  j = find_obj(r_info, 20, x, y, nc);
  if (j >= 0 && int'(r_info[j][23:20]) < 10) begin
    p = dig_pix(int'(r_info[j][23:20]), (y - int'(r_info[j][19:10]) + 1024) % 1024,
                (x - int'(r_info[j][9:0]) + 1024) % 1024);
    if (p != 0) begin if (count) begin st_info++; if (clear_seen) st_clear++; end return p; end
  end
  // background: black playfield, grey frame
  if (x / 32 >= int'(r_field[4:0]) && x / 32 <= int'(r_field[9:5]) &&
      y / 32 >= int'(r_field[13:10]) && y / 32 <= int'(r_field[17:14])) begin
    if (count) st_black++;
    return '0;
  end
  if (count) st_grey++;
  return {10'd512, 10'd512, 10'd512};
endfunction
