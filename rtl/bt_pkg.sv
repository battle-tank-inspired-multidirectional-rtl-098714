// bt_pkg - constants and types shared by the tank-game display and audio
// hardware.
//
// Screen: 640x480 pixels cut into 20x15 tiles of 32x32 pixels. Every picture
// element (tank, steel, water, brick, bonus, bullet, explosion, home base) is a
// 32x32 image; game information is drawn with ten 20x20 digit images. Pixels
// are 30 bits, 10 per colour channel. These numbers follow the game's
// description. The VGA porch/sync lengths are the standard 640x480@60 Hz
// values, and the bus address map, entry layouts and codec register words
// are this design's own choices.
package bt_pkg;

  // ---------------------------------------------------------------- screen
  localparam int H_ACTIVE = 640;
  localparam int H_FP     = 16;
  localparam int H_SYNC   = 96;
  localparam int H_BP     = 48;
  localparam int H_TOTAL  = H_ACTIVE + H_FP + H_SYNC + H_BP;   // 800
  localparam int V_ACTIVE = 480;
  localparam int V_FP     = 10;
  localparam int V_SYNC   = 2;
  localparam int V_BP     = 33;
  localparam int V_TOTAL  = V_ACTIVE + V_FP + V_SYNC + V_BP;   // 525

  localparam int TILE     = 32;            // element size in pixels
  localparam int COLS     = H_ACTIVE / TILE;   // 20
  localparam int ROWS     = V_ACTIVE / TILE;   // 15
  localparam int N_TILES  = COLS * ROWS;       // 300
  localparam int DIGIT    = 20;            // game-information digit size
  localparam int N_IMAGES = 12;            // 32x32 images
  localparam int N_DIGITS = 10;            // 20x20 digit images
  localparam int PIX_W    = 30;            // bits per pixel

  localparam int IMG_WORDS   = N_IMAGES * TILE * TILE;     // 12288
  localparam int DIGIT_WORDS = N_DIGITS * DIGIT * DIGIT;   // 4000
  localparam int IMG_AW      = $clog2(IMG_WORDS);          // 14
  localparam int DIGIT_AW    = $clog2(DIGIT_WORDS);        // 12

  typedef logic [PIX_W-1:0] pix_t;         // {r[9:0], g[9:0], b[9:0]}

  // Image numbers of the 32x32 images.
  typedef enum logic [3:0] {
    IMG_ENEMY_A   = 4'd0,
    IMG_ENEMY_B   = 4'd1,
    IMG_PLAYER_1  = 4'd2,
    IMG_PLAYER_2  = 4'd3,
    IMG_STEEL     = 4'd4,
    IMG_WATER     = 4'd5,
    IMG_BRICK     = 4'd6,
    IMG_BONUS     = 4'd7,
    IMG_BULLET    = 4'd8,
    IMG_EXPLOSION = 4'd9,
    IMG_BASE      = 4'd10,
    IMG_SPARE     = 4'd11
  } img_e;

  // One movable object: a tank, a bonus, a bullet, an explosion or a digit.
  // (x, y) is its top-left pixel.
  typedef struct packed {
    logic       en;
    logic [3:0] img;
    logic [9:0] y;
    logic [9:0] x;
  } sprite_t;

  // One tile of scenery.
  typedef struct packed {
    logic       en;
    logic [3:0] img;
  } tile_t;

  // Playfield rectangle in tile units, inclusive bounds.
  typedef struct packed {
    logic [3:0] row_hi;
    logic [3:0] row_lo;
    logic [4:0] col_hi;
    logic [4:0] col_lo;
  } field_t;

  localparam pix_t  GREY          = {10'd512, 10'd512, 10'd512};
  localparam pix_t  BLACK         = '0;
  localparam field_t FIELD_DEFAULT = '{row_hi: 4'd13, row_lo: 4'd1,
                                       col_hi: 5'd13, col_lo: 5'd1};

  // Bus word for a sprite or digit slot: [9:0] x, [19:10] y, [23:20] image,
  // [31] enable.
  function automatic sprite_t word_to_sprite(logic [31:0] w);
    return '{en: w[31], img: w[23:20], y: w[19:10], x: w[9:0]};
  endfunction

  // ------------------------------------------------- VGA controller map
  // Word addresses on the 15-bit slave port.
  localparam logic [14:0] VA_IMG   = 15'h0000;   // .. 0x2FFF
  localparam logic [14:0] VA_DIGIT = 15'h4000;   // .. 0x4F9F
  localparam logic [14:0] VA_TILE  = 15'h5000;   // .. 0x512B
  localparam logic [14:0] VA_TANK  = 15'h5400;   // + index
  localparam logic [14:0] VA_FX    = 15'h5500;   // + index
  localparam logic [14:0] VA_INFO  = 15'h5600;   // + index
  localparam logic [14:0] VA_FIELD = 15'h5700;

  // ---------------------------------------------------------------- audio
  localparam int SAMPLE_W = 16;
  localparam int SFX_LEN  = 4000;          // 0.5 s at 8 kHz
  localparam int N_SFX    = 2;

  // Audio controller word addresses on the 14-bit slave port.
  localparam logic [13:0] AA_SFX    = 14'h0000;  // .. 0x1F3F
  localparam logic [13:0] AA_MUSIC  = 14'h2000;
  localparam logic [13:0] AA_CTRL   = 14'h2001;
  localparam logic [13:0] AA_PLAY   = 14'h2002;
  localparam logic [13:0] AA_STATUS = 14'h2003;

  // SSM2603 control words {reg[6:0], data[8:0]} written at start-up.
  localparam int N_CODEC_WORDS = 9;
  localparam logic [6:0] CODEC_I2C_ADDR = 7'b0011010;   // CSB = 0

  function automatic logic [15:0] codec_word(int i);
    unique case (i)
      0: return {7'h0F, 9'h000};   // R15 software reset
      1: return {7'h06, 9'h067};   // R6  power: DAC and output on
      2: return {7'h04, 9'h010};   // R4  analog path: DACSEL
      3: return {7'h05, 9'h000};   // R5  digital path: DAC unmuted
      4: return {7'h07, 9'h042};   // R7  master, 16-bit, I2S
      5: return {7'h08, 9'h00D};   // R8  USB mode, 8 kHz
      6: return {7'h02, 9'h079};   // R2  left DAC volume
      7: return {7'h03, 9'h079};   // R3  right DAC volume
      default: return {7'h09, 9'h001};   // R9  active
    endcase
  endfunction

endpackage
