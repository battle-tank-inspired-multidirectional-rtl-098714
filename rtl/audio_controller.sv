// audio_controller - background music and sound effects for the SSM2603.
//
// Sound reaches the codec as 16-bit mono samples at 8 kHz, sent in I2S
// format while the codec, in master mode, drives the bit and frame clocks.
// Two sources are mixed:
//   * background music (30 s, 480 kB) stays in the processor's DDR3
//     memory; software streams it into a sample FIFO and can switch the
//     music on or off;
//   * two sound effects (fire and explosion, 0.5 s = 4000 samples each,
//     16 kB together) live in a RAM inside the controller, loaded once by
//     software; a play command starts one of them from its first sample.
// At every frame the next music sample (0 if the music is off; 0 and an
// underrun count if the FIFO is empty) and the next effect sample (0 when
// no effect plays) are added with saturation, and the result is sent on
// both channels of the following frame. A play command while an effect is
// playing restarts with the new effect. After reset the controller writes
// the codec's control registers over I2C (i2c_codec_config) and keeps the
// output muted (AUD_MUTE low) until that has finished. AUD_XCK, the codec's
// master clock, is the system clock divided by XCK_DIV. Sample rate, word
// length, I2S format, master mode and the effect and music sizes follow the
// game's description; the mixing, the FIFO, the register map and the clock
// division are this design's own choices.
//
// Bus (Avalon-MM slave, word addresses, read latency 1):
//   0x0000-0x1F3F write: effect RAM, effect k at k*4000 (16-bit samples)
//   0x2000        write: push one music sample
//   0x2001        write: [0] music on
//   0x2002        write: [0] effect number to play
//   0x2003        read:  [9:0] FIFO level, [16] effect playing,
//                        [17] codec configured, [18] I2C ACK missing,
//                        [19] FIFO full, [31:24] music underruns (saturating)
module audio_controller
  import bt_pkg::*;
#(
  parameter int CLK_HZ     = 50_000_000,
  parameter int SCL_HZ     = 100_000,
  parameter int FIFO_DEPTH = 512,
  parameter int XCK_DIV    = 4
) (
  input  logic        clk,
  input  logic        rst,
  // Avalon-MM slave
  input  logic [13:0] avs_address,
  input  logic        avs_chipselect,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  input  logic        avs_read,
  output logic [31:0] avs_readdata,
  // codec
  output logic        AUD_XCK,
  input  logic        AUD_BCLK,
  input  logic        AUD_DACLRCK,
  output logic        AUD_DACDAT,
  output logic        AUD_MUTE,
  output logic        AUD_I2C_SCLK,
  output logic        i2c_sda_oe,
  input  logic        i2c_sda_in
);

  localparam int SFX_WORDS = SFX_LEN * N_SFX;      // 8000
  localparam int SAW       = $clog2(SFX_WORDS);    // 13
  localparam int FLW       = $clog2(FIFO_DEPTH) + 1;

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  logic wr;
  assign wr = avs_chipselect && avs_write;

  // ----------------------------------------------------- codec set-up
  logic cfg_done, cfg_nack;
  i2c_codec_config #(.CLK_HZ(CLK_HZ), .SCL_HZ(SCL_HZ)) u_cfg (
    .clk, .rst, .scl(AUD_I2C_SCLK), .sda_oe(i2c_sda_oe), .sda_in(i2c_sda_in),
    .done(cfg_done), .nack(cfg_nack));

  assign AUD_MUTE = cfg_done;

  // ------------------------------------------------------ master clock
  localparam int XW = (XCK_DIV > 2) ? $clog2(XCK_DIV) : 1;
  logic [XW-1:0] xcnt;
  always_ff @(posedge clk) begin
    if (rst) begin
      xcnt    <= '0;
      AUD_XCK <= 1'b0;
    end else if (xcnt == XW'(XCK_DIV / 2 - 1)) begin
      xcnt    <= '0;
      AUD_XCK <= !AUD_XCK;
    end else begin
      xcnt <= xcnt + 1'b1;
    end
  end

  // --------------------------------------------------------- music FIFO
  logic    frame_tick;
  logic    music_on;
  logic    fifo_pop, fifo_empty, fifo_full;
  sample_t fifo_dout;
  logic [FLW-1:0] fifo_level;

  sample_fifo #(.DEPTH(FIFO_DEPTH), .W(SAMPLE_W)) u_fifo (
    .clk, .rst, .push(wr && avs_address == AA_MUSIC), .din(avs_writedata[SAMPLE_W-1:0]),
    .pop(fifo_pop), .dout(fifo_dout), .empty(fifo_empty), .full(fifo_full),
    .level(fifo_level));

  assign fifo_pop = frame_tick && music_on && !fifo_empty;

  // ------------------------------------------------ sound-effect player
  logic [SAW-1:0] sfx_ptr, sfx_end;
  logic           sfx_playing, sfx_ready;
  logic [SAW-1:0] sfx_raddr [1];
  logic [SAMPLE_W-1:0] sfx_rdata [1];

  assign sfx_raddr[0] = sfx_ptr;

  mp_ram #(.DEPTH(SFX_WORDS), .WIDTH(SAMPLE_W), .NRD(1)) u_sfx (
    .clk, .we(wr && avs_address < 14'(SFX_WORDS)), .waddr(avs_address[SAW-1:0]),
    .wdata(avs_writedata[SAMPLE_W-1:0]), .re(1'b1), .raddr(sfx_raddr),
    .rdata(sfx_rdata));

  // sfx_ready: sfx_rdata already shows the sample at sfx_ptr
  always_ff @(posedge clk) begin
    if (rst) begin
      sfx_ptr     <= '0;
      sfx_end     <= '0;
      sfx_playing <= 1'b0;
      sfx_ready   <= 1'b0;
    end else if (wr && avs_address == AA_PLAY) begin
      sfx_ptr     <= avs_writedata[0] ? SAW'(SFX_LEN) : '0;
      sfx_end     <= avs_writedata[0] ? SAW'(2 * SFX_LEN - 1) : SAW'(SFX_LEN - 1);
      sfx_playing <= 1'b1;
      sfx_ready   <= 1'b0;
    end else begin
      sfx_ready <= 1'b1;
      if (frame_tick && sfx_playing && sfx_ready) begin
        if (sfx_ptr == sfx_end) sfx_playing <= 1'b0;
        else begin
          sfx_ptr   <= sfx_ptr + 1'b1;
          sfx_ready <= 1'b0;
        end
      end
    end
  end

  // -------------------------------------------------------------- mixer
  sample_t music_s, sfx_s, mix;
  logic signed [SAMPLE_W:0] sum;
  logic [7:0] underruns;

  always_comb begin
    music_s = fifo_pop ? fifo_dout : '0;
    sfx_s   = (sfx_playing && sfx_ready) ? sample_t'(sfx_rdata[0]) : '0;
    sum     = (SAMPLE_W+1)'(music_s) + (SAMPLE_W+1)'(sfx_s);
    if (sum > (SAMPLE_W+1)'(32767))       mix = 16'sh7FFF;
    else if (sum < -(SAMPLE_W+1)'(32768)) mix = 16'sh8000;
    else                                  mix = sum[SAMPLE_W-1:0];
  end

  sample_t out_s;
  always_ff @(posedge clk) begin
    if (rst) begin
      out_s     <= '0;
      music_on  <= 1'b0;
      underruns <= '0;
    end else begin
      if (frame_tick) begin
        out_s <= mix;
        if (music_on && fifo_empty && underruns != 8'hFF) underruns <= underruns + 1'b1;
      end
      if (wr && avs_address == AA_CTRL) music_on <= avs_writedata[0];
    end
  end

  i2s_tx #(.W(SAMPLE_W)) u_i2s (
    .clk, .rst, .bclk(AUD_BCLK), .lrclk(AUD_DACLRCK), .left(out_s), .right(out_s),
    .dacdat(AUD_DACDAT), .frame_tick);

  // ----------------------------------------------------------- status
  always_ff @(posedge clk) begin
    if (rst) avs_readdata <= '0;
    else if (avs_chipselect && avs_read) begin
      avs_readdata <= '0;
      if (avs_address == AA_STATUS)
        avs_readdata <= {underruns, 4'd0, fifo_full, cfg_nack, cfg_done, sfx_playing,
                         6'd0, 10'(fifo_level)};
    end
  end

endmodule
