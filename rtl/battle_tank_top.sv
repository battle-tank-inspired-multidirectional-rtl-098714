// battle_tank_top - FPGA fabric of the tank game.
//
// The game itself runs as software on the SoC's processor, which reaches
// the fabric over its Avalon bus. The fabric holds the two peripherals
// that software drives: the VGA controller, which draws the 640x480 screen
// from a tile map and sprite tables (see vga_controller), and the audio
// controller, which configures the SSM2603 codec and plays music and sound
// effects through it (see audio_controller). The two sit side by side,
// sharing only the 50 MHz clock and reset; each Avalon-MM slave port is a
// top-level port, ready to be wired to the processor's bus bridge. The
// I2C data pin is open drain; it appears as a pull-low enable and an input
// so the board-level pad can be a plain open-drain buffer.
module battle_tank_top (
  input  logic        clk,
  input  logic        rst,
  // VGA controller slave
  input  logic [14:0] vga_avs_address,
  input  logic        vga_avs_chipselect,
  input  logic        vga_avs_write,
  input  logic [31:0] vga_avs_writedata,
  // audio controller slave
  input  logic [13:0] aud_avs_address,
  input  logic        aud_avs_chipselect,
  input  logic        aud_avs_write,
  input  logic [31:0] aud_avs_writedata,
  input  logic        aud_avs_read,
  output logic [31:0] aud_avs_readdata,
  // VGA pins
  output logic [7:0]  VGA_R,
  output logic [7:0]  VGA_G,
  output logic [7:0]  VGA_B,
  output logic        VGA_CLK,
  output logic        VGA_HS,
  output logic        VGA_VS,
  output logic        VGA_BLANK_n,
  output logic        VGA_SYNC_n,
  // audio codec pins
  output logic        AUD_XCK,
  input  logic        AUD_BCLK,
  input  logic        AUD_DACLRCK,
  output logic        AUD_DACDAT,
  output logic        AUD_MUTE,
  output logic        AUD_I2C_SCLK,
  output logic        AUD_I2C_SDAT_oe,
  input  logic        AUD_I2C_SDAT_in
);

  vga_controller u_vga (
    .clk, .rst,
    .avs_address(vga_avs_address), .avs_write(vga_avs_write),
    .avs_writedata(vga_avs_writedata), .avs_chipselect(vga_avs_chipselect),
    .VGA_R, .VGA_G, .VGA_B, .VGA_CLK, .VGA_HS, .VGA_VS, .VGA_BLANK_n, .VGA_SYNC_n
  );

  audio_controller u_audio (
    .clk, .rst,
    .avs_address(aud_avs_address), .avs_chipselect(aud_avs_chipselect),
    .avs_write(aud_avs_write), .avs_writedata(aud_avs_writedata),
    .avs_read(aud_avs_read), .avs_readdata(aud_avs_readdata),
    .AUD_XCK, .AUD_BCLK, .AUD_DACLRCK, .AUD_DACDAT, .AUD_MUTE, .AUD_I2C_SCLK,
    .i2c_sda_oe(AUD_I2C_SDAT_oe), .i2c_sda_in(AUD_I2C_SDAT_in)
  );

endmodule
