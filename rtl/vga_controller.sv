// vga_controller - tile-and-sprite display engine for the tank game.
//
// The processor never draws pixels. It loads the picture of every game
// element once into the graphics memory, then describes the screen with a
// few small tables that it rewrites as the game runs:
//   * a 20x15 tile map of 32x32 scenery tiles (steel, water, brick, base);
//   * N_TANK movable 32x32 objects for tanks and the bonus;
//   * N_FX movable 32x32 objects for bullets and explosions;
//   * N_INFO movable 20x20 digits for the game information;
//   * the playfield rectangle; outside it the background is a grey frame.
// For every pixel the controller looks up all layers at once and shows the
// highest one that is not transparent, in the order bullets/explosions,
// scenery, tanks/bonus, digits, background (see layer_mux). The element
// sizes, the 30-bit pixel, the memory sizes and the layer order follow the
// game's description; the bus map, table layouts and object counts are
// this design's own choices.
//
// Bus (Avalon-MM slave, write-only, word addresses, see bt_pkg):
//   0x0000-0x2FFF image memory, image i row r column c at i*1024+r*32+c
//   0x4000-0x4F9F digit memory, digit d row r column c at d*400+r*20+c
//   0x5000-0x512B tile map, entry row*20+col: [31] enable, [23:20] image
//   0x5400+i / 0x5500+i / 0x5600+i  tank, effect, digit objects:
//                 [31] enable, [23:20] image, [19:10] y, [9:0] x
//   0x5700        playfield: [4:0] first col, [9:5] last col,
//                 [13:10] first row, [17:14] last row (inclusive)
// Writes take effect at once, so software should update the tables during
// vertical blanking to avoid tearing.
//
// Video: 640x480 at 60 Hz from a 50 MHz clock (PIX_DIV = 2). Each channel
// is 10 bits wide inside; the top 8 bits drive VGA_R/G/B. The pixel data
// and the syncs leave the controller two pixel times after the raster
// counters reach that pixel, all delayed alike. RGB is 0 during blanking.
// VGA_SYNC_n is held low on purpose: sync-on-green is not used, so this
// output is a constant. The two low bits of each 10-bit channel have no
// pin on the board's 8-bit DAC inputs and are dropped.
module vga_controller
  import bt_pkg::*;
#(
  parameter int N_TANK  = 8,
  parameter int N_FX    = 8,
  parameter int N_INFO  = 8,
  parameter int PIX_DIV = 2
) (
  input  logic        clk,
  input  logic        rst,
  // Avalon-MM slave
  input  logic [14:0] avs_address,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  input  logic        avs_chipselect,
  // ADV7123 and connector
  output logic [7:0]  VGA_R,
  output logic [7:0]  VGA_G,
  output logic [7:0]  VGA_B,
  output logic        VGA_CLK,
  output logic        VGA_HS,
  output logic        VGA_VS,
  output logic        VGA_BLANK_n,
  output logic        VGA_SYNC_n
);

  // ------------------------------------------------------------ bus side
  logic wr;
  assign wr = avs_chipselect && avs_write;

  logic img_we, digit_we, tile_we;
  always_comb begin
    img_we   = wr && (avs_address <  15'(IMG_WORDS));
    digit_we = wr && (avs_address >= VA_DIGIT) && (avs_address < VA_DIGIT + 15'(DIGIT_WORDS));
    tile_we  = wr && (avs_address >= VA_TILE)  && (avs_address < VA_TILE + 15'(N_TILES));
  end

  sprite_t tank_tab [N_TANK];
  sprite_t fx_tab   [N_FX];
  sprite_t info_tab [N_INFO];
  field_t  field;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N_TANK; i++) tank_tab[i] <= '0;
      for (int i = 0; i < N_FX;   i++) fx_tab[i]   <= '0;
      for (int i = 0; i < N_INFO; i++) info_tab[i] <= '0;
      field <= FIELD_DEFAULT;
    end else if (wr) begin
      for (int i = 0; i < N_TANK; i++)
        if (avs_address == VA_TANK + 15'(i)) tank_tab[i] <= word_to_sprite(avs_writedata);
      for (int i = 0; i < N_FX; i++)
        if (avs_address == VA_FX + 15'(i)) fx_tab[i] <= word_to_sprite(avs_writedata);
      for (int i = 0; i < N_INFO; i++)
        if (avs_address == VA_INFO + 15'(i)) begin
          info_tab[i]    <= word_to_sprite(avs_writedata);
          // only digits 0..9 exist
          info_tab[i].en <= avs_writedata[31] && (avs_writedata[23:20] < 4'(N_DIGITS));
        end
      if (avs_address == VA_FIELD) field <= avs_writedata[17:0];
    end
  end

  // ------------------------------------------------------------- raster
  logic       pix_en, active, hs_n, vs_n;
  logic [9:0] hc, vc;

  vga_timing #(.PIX_DIV(PIX_DIV)) u_timing (
    .clk, .rst, .pix_en, .hcount(hc), .vcount(vc), .active,
    .hsync_n(hs_n), .vsync_n(vs_n), .vga_clk(VGA_CLK), .frame_start()
  );

  // ------------------------------------------- stage 0: find the objects
  tile_t tile;
  tile_map u_tiles (
    .clk, .rst, .we(tile_we), .waddr(avs_address[8:0]),
    .wdata('{en: avs_writedata[31], img: avs_writedata[23:20]}),
    .col(hc[9:5]), .row(vc[8:5]), .tile
  );

  logic              tank_hit, fx_hit, info_hit;
  logic [IMG_AW-1:0] tank_addr, fx_addr, tile_addr;
  logic [DIGIT_AW-1:0] info_addr;

  sprite_engine #(.N(N_TANK), .SIZE(TILE), .AW(IMG_AW)) u_tanks (
    .px(hc), .py(vc), .objs(tank_tab), .hit(tank_hit), .addr(tank_addr));
  sprite_engine #(.N(N_FX), .SIZE(TILE), .AW(IMG_AW)) u_fx (
    .px(hc), .py(vc), .objs(fx_tab), .hit(fx_hit), .addr(fx_addr));
  sprite_engine #(.N(N_INFO), .SIZE(DIGIT), .AW(DIGIT_AW)) u_info (
    .px(hc), .py(vc), .objs(info_tab), .hit(info_hit), .addr(info_addr));

  assign tile_addr = {tile.img, vc[4:0], hc[4:0]};

  logic in_field;
  assign in_field = (hc[9:5] >= field.col_lo) && (hc[9:5] <= field.col_hi) &&
                    (vc[8:5] >= field.row_lo) && (vc[8:5] <= field.row_hi);

  // ----------------------------------------- graphics memory (stage 0->1)
  logic [IMG_AW-1:0]   img_raddr [3];
  pix_t                img_rdata [3];
  logic [DIGIT_AW-1:0] dig_raddr [1];
  pix_t                dig_rdata [1];

  assign img_raddr[0] = fx_addr;
  assign img_raddr[1] = tile_addr;
  assign img_raddr[2] = tank_addr;
  assign dig_raddr[0] = info_addr;

  mp_ram #(.DEPTH(IMG_WORDS), .WIDTH(PIX_W), .NRD(3)) u_images (
    .clk, .we(img_we), .waddr(avs_address[IMG_AW-1:0]), .wdata(avs_writedata[PIX_W-1:0]),
    .re(pix_en), .raddr(img_raddr), .rdata(img_rdata));

  mp_ram #(.DEPTH(DIGIT_WORDS), .WIDTH(PIX_W), .NRD(1)) u_digits (
    .clk, .we(digit_we), .waddr(avs_address[DIGIT_AW-1:0]), .wdata(avs_writedata[PIX_W-1:0]),
    .re(pix_en), .raddr(dig_raddr), .rdata(dig_rdata));

  // ------------------------------------------ stage 1: choose the layer
  typedef struct packed {
    logic fx, tile, tank, info, in_field, active, hs_n, vs_n;
  } s1_t;
  s1_t s1;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= '{hs_n: 1'b1, vs_n: 1'b1, default: 1'b0};
    end else if (pix_en) begin
      s1 <= '{fx: fx_hit, tile: tile.en, tank: tank_hit, info: info_hit,
              in_field: in_field, active: active, hs_n: hs_n, vs_n: vs_n};
    end
  end

  pix_t pix;
  layer_mux u_mux (
    .fx_hit(s1.fx),     .fx_pix(img_rdata[0]),
    .tile_hit(s1.tile), .tile_pix(img_rdata[1]),
    .tank_hit(s1.tank), .tank_pix(img_rdata[2]),
    .info_hit(s1.info), .info_pix(dig_rdata[0]),
    .in_field(s1.in_field), .pix
  );

  // ------------------------------------------------- stage 2: to the pins
  always_ff @(posedge clk) begin
    if (rst) begin
      {VGA_R, VGA_G, VGA_B} <= '0;
      VGA_HS      <= 1'b1;
      VGA_VS      <= 1'b1;
      VGA_BLANK_n <= 1'b0;
    end else if (pix_en) begin
      VGA_R       <= s1.active ? pix[29:22] : 8'd0;
      VGA_G       <= s1.active ? pix[19:12] : 8'd0;
      VGA_B       <= s1.active ? pix[9:2]   : 8'd0;
      VGA_HS      <= s1.hs_n;
      VGA_VS      <= s1.vs_n;
      VGA_BLANK_n <= s1.active;
    end
  end

  assign VGA_SYNC_n = 1'b0;   // no sync on green

endmodule
