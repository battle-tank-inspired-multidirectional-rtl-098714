// tb_battle_tank_top - end-to-end run of the game's FPGA fabric at its
// real sizes and clocks (no parameter changed).
//
// Video: software-style set-up of a game screen - all images and digits
// loaded, a 13x13 playfield in a grey frame with brick, steel and water
// tiles and the home base, two player tanks, four enemies and a bonus,
// bullets and an explosion, digits for stage, enemies and lives. The first
// two frames are checked pixel by pixel against the reference model
// (vga_ref.svh). During the vertical blanking between them a game step is
// applied: tanks move, a bullet advances, a brick is hit (its tile now
// shows another image), an explosion appears and the enemy count drops.
// Audio: the controller configures the codec model over I2C at 100 kHz;
// the model then runs its I2S clocks at 8 kHz (BCLK = 64 x 8 kHz). Music
// is streamed, the fire effect is played to its end while music plays,
// the explosion effect interrupts it, the music is allowed to run dry and
// is then switched off. A frame-level reference predicts every decoded
// sample. Each mechanism (every display layer winning, transparency,
// overlap, frame and field background, codec set-up, effect end, effect
// restart, saturation, underrun, music off) is counted and must occur.
`timescale 1ns/1ps
module tb_battle_tank_top;
  localparam int SFX_LEN = 4000;
  logic clk = 0, rst = 1;
  always #10 clk = !clk;

  logic [14:0] v_addr = '0;
  logic        v_cs = 0, v_wr = 0;
  logic [31:0] v_data = '0;
  logic [13:0] a_addr = '0;
  logic        a_cs = 0, a_wr = 0, a_rd = 0;
  logic [31:0] a_data = '0, a_q;
  logic [7:0]  R, G, B;
  logic        vclk, hs, vs, blank_n, sync_n;
  logic        xck, bclk, lrclk, dacdat, mute, scl, sda_oe, sda_in;

  battle_tank_top dut (
    .clk, .rst,
    .vga_avs_address(v_addr), .vga_avs_chipselect(v_cs), .vga_avs_write(v_wr),
    .vga_avs_writedata(v_data),
    .aud_avs_address(a_addr), .aud_avs_chipselect(a_cs), .aud_avs_write(a_wr),
    .aud_avs_writedata(a_data), .aud_avs_read(a_rd), .aud_avs_readdata(a_q),
    .VGA_R(R), .VGA_G(G), .VGA_B(B), .VGA_CLK(vclk), .VGA_HS(hs), .VGA_VS(vs),
    .VGA_BLANK_n(blank_n), .VGA_SYNC_n(sync_n),
    .AUD_XCK(xck), .AUD_BCLK(bclk), .AUD_DACLRCK(lrclk), .AUD_DACDAT(dacdat),
    .AUD_MUTE(mute), .AUD_I2C_SCLK(scl), .AUD_I2C_SDAT_oe(sda_oe), .AUD_I2C_SDAT_in(sda_in));

  ssm2603_model codec (.scl, .sda_oe, .sda_in, .always_on(1'b0), .bclk, .lrclk, .pbdat(dacdat));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ================================================================ video
  logic [31:0] r_tile [] = new[300];
  logic [31:0] r_tank [] = new[8];
  logic [31:0] r_fx   [] = new[8];
  logic [31:0] r_info [] = new[8];
  logic [31:0] r_field = {14'd0, 4'd13, 4'd1, 5'd13, 5'd1};

  `include "vga_ref.svh"

  task automatic vwr(logic [14:0] a, logic [31:0] d);
    @(negedge clk);
    v_addr = a; v_data = d; v_cs = 1; v_wr = 1;
    @(negedge clk);
    v_cs = 0; v_wr = 0;
  endtask

  function automatic logic [31:0] obj(bit en, int img, int x, int y);
    return {en, 7'd0, 4'(img), 10'(y), 10'(x)};
  endfunction
  task automatic tank(int i, logic [31:0] w); r_tank[i] = w; vwr(15'h5400 + 15'(i), w); endtask
  task automatic fx(int i, logic [31:0] w);   r_fx[i]   = w; vwr(15'h5500 + 15'(i), w); endtask
  task automatic info(int i, logic [31:0] w); r_info[i] = w; vwr(15'h5600 + 15'(i), w); endtask
  task automatic tile(int c, int r, int img);
    r_tile[r * 20 + c] = {1'b1, 7'd0, 4'(img), 20'd0};
    vwr(15'h5000 + 15'(r * 20 + c), r_tile[r * 20 + c]);
  endtask

  // image numbers
  localparam int ENEMY_A = 0, ENEMY_B = 1, PLAYER_1 = 2, PLAYER_2 = 3, STEEL = 4, WATER = 5,
                 BRICK = 6, BONUS = 7, BULLET = 8, EXPLOSION = 9, BASE = 10, SPARE = 11;

  task automatic build_scene();
    for (int i = 0; i < 300; i++) r_tile[i] = '0;
    for (int i = 0; i < 8; i++) begin r_tank[i] = '0; r_fx[i] = '0; r_info[i] = '0; end
    for (int c = 2; c <= 12; c += 2) tile(c, 3, BRICK);
    for (int c = 3; c <= 11; c += 4) tile(c, 6, STEEL);
    tile(4, 8, WATER); tile(5, 8, WATER); tile(9, 9, WATER); tile(10, 9, WATER);
    tile(6, 12, BRICK); tile(8, 12, BRICK); tile(6, 13, BRICK); tile(8, 13, BRICK);
    tile(7, 12, BRICK); tile(7, 13, BASE);
    tank(0, obj(1, PLAYER_1, 5 * 32, 13 * 32));
    tank(1, obj(1, PLAYER_2, 9 * 32, 13 * 32));
    tank(2, obj(1, ENEMY_A, 32, 32));
    tank(3, obj(1, ENEMY_B, 13 * 32, 32));
    tank(4, obj(1, ENEMY_A, 6 * 32 + 5, 4 * 32 + 20));
    tank(5, obj(1, ENEMY_B, 6 * 32 + 20, 4 * 32 + 30));   // overlaps tank 4
    tank(6, obj(1, BONUS, 4 * 32 + 10, 8 * 32 + 8));       // partly under water
    fx(0, obj(1, BULLET, 5 * 32 + 12, 12 * 32));
    fx(1, obj(1, BULLET, 32 + 12, 2 * 32 + 2));
    fx(2, obj(1, EXPLOSION, 6 * 32 + 10, 4 * 32 + 25));  // over the two enemies
    info(0, obj(1, 2, 15 * 32, 2 * 32));                   // enemies left: 20
    info(1, obj(1, 0, 15 * 32 + 20, 2 * 32));
    info(2, obj(1, 1, 15 * 32, 8 * 32));                   // player 1 lives: 1
    info(3, obj(1, 3, 15 * 32, 12 * 32));                  // stage 3
  endtask

  task automatic game_step();
    tank(0, obj(1, PLAYER_1, 5 * 32, 13 * 32 - 8));        // moves up
    fx(0, obj(1, BULLET, 5 * 32 + 12, 11 * 32));           // bullet advances
    tile(4, 3, SPARE);                                     // brick hit: damaged
    fx(3, obj(1, EXPLOSION, 4 * 32, 3 * 32));
    tank(3, obj(0, ENEMY_B, 13 * 32, 32));                 // enemy destroyed
    info(0, obj(1, 1, 15 * 32, 2 * 32));                   // enemies left: 19
    info(1, obj(1, 9, 15 * 32 + 20, 2 * 32));
  endtask

  int   frames_done = 0;
  bit   tracking = 0, pix_check = 1;
  int   pos = 0;
  logic vs_prev = 1;

  always @(posedge vclk) if (!rst) begin
    if (vs_prev && !vs) begin
      if (tracking) begin
        check(pos == 490 * 800 + 800 * 525, "frame length in pixels");
        frames_done++;
      end
      tracking = 1;
      pos = 490 * 800;
    end
    vs_prev = vs;
    if (tracking && frames_done < 3) begin
      int x, y;
      x = (pos % (800 * 525)) % 800;
      y = (pos % (800 * 525)) / 800;
      check(hs == !(x >= 656 && x < 752), "HSYNC");
      check(vs == !(y >= 490 && y < 492), "VSYNC");
      check(blank_n == (x < 640 && y < 480), "BLANK_n");
      if (x < 640 && y < 480) begin
        logic [29:0] e;
        e = expected_pix(x, y, 1);
        check({R, G, B} == {e[29:22], e[19:12], e[9:2]},
              $sformatf("pixel (%0d,%0d) got %h%h%h want %h", x, y, R, G, B, e));
      end
    end
    if (tracking) pos++;
  end

  bit video_done = 0;
  initial begin
    wait (!rst);
    for (int i = 0; i < 12; i++)
      for (int r = 0; r < 32; r++)
        for (int c = 0; c < 32; c++) vwr(15'(i * 1024 + r * 32 + c), 32'(img_pix(i, r, c)));
    for (int d = 0; d < 10; d++)
      for (int r = 0; r < 20; r++)
        for (int c = 0; c < 20; c++) vwr(15'h4000 + 15'(d * 400 + r * 20 + c), 32'(dig_pix(d, r, c)));
    build_scene();
    wait (frames_done == 1);
    game_step();
    wait (frames_done == 3);
    video_done = 1;
  end

  // ================================================================ audio
  task automatic awr(logic [13:0] a, logic [31:0] d);
    @(negedge clk);
    a_addr = a; a_data = d; a_cs = 1; a_wr = 1;
    @(negedge clk);
    a_cs = 0; a_wr = 0;
  endtask
  task automatic ard(logic [13:0] a, output logic [31:0] d);
    @(negedge clk);
    a_addr = a; a_cs = 1; a_rd = 1;
    @(negedge clk);
    a_cs = 0; a_rd = 0;
    d = a_q;
  endtask

  function automatic logic signed [15:0] sfx_val(int k, int n);
    // fire: a decaying saw; explosion: loud square wave
    if (k == 0) return 16'((n % 64) * 400 - 12800);
    else        return (n % 8 < 4) ? 16'sd28000 : -16'sd28000;
  endfunction

  logic signed [15:0] mq [$];
  logic signed [15:0] expect_q [$];
  logic signed [15:0] prev_out = 0;
  bit  r_music_on = 0, r_playing = 0;
  int  r_k = 0, r_n = 0;
  int  sat_pos = 0, sat_neg = 0, underruns = 0, sfx_ends = 0, restarts = 0, music_off_frames = 0;
  int  ticks = 0;

  // frame ticks rebuilt from the codec clocks (see tb_audio_controller)
  logic lr_r = 1'b1, lr_rp = 1'b1;
  int   tick_pending = 0;
  always @(posedge bclk) lr_r = lrclk;
  always @(negedge bclk) begin
    if (!lr_r && lr_rp) tick_pending = 6;
    lr_rp = lr_r;
  end

  always @(posedge clk) if (!rst && tick_pending > 0) begin
    int m, s, sum;
    logic signed [15:0] mix;
    tick_pending--;
    if (tick_pending == 0) begin
      m = 0; s = 0;
      if (r_music_on) begin
        if (mq.size() > 0) m = int'(mq.pop_front());
        else underruns++;
      end else music_off_frames++;
      if (r_playing) begin
        s = int'(sfx_val(r_k, r_n));
        r_n++;
        if (r_n == SFX_LEN) begin r_playing = 0; sfx_ends++; end
      end
      sum = m + s;
      if (sum > 32767) begin mix = 16'sh7FFF; sat_pos++; end
      else if (sum < -32768) begin mix = 16'sh8000; sat_neg++; end
      else mix = 16'(sum);
      expect_q.push_back(prev_out);
      prev_out = mix;
      ticks++;
    end
  end

  task automatic after_tick();
    int t;
    t = ticks;
    wait (ticks != t);
    repeat (10) @(posedge clk);
  endtask
  task automatic push_music(int n);
    for (int i = 0; i < n; i++) begin
      logic signed [15:0] v;
      v = 16'($signed($urandom_range(0, 16000)) - 8000);
      awr(14'h2000, 32'(v));
      mq.push_back(v);
    end
  endtask
  task automatic play(int k);
    awr(14'h2002, 32'(k));
    if (r_playing) restarts++;
    r_playing = 1; r_k = k; r_n = 0;
  endtask
  task automatic frames(int n, int feed);
    for (int i = 0; i < n; i++) begin
      after_tick();
      if (feed > 0) push_music(feed);
    end
  endtask

  int cfg_cycles = 0;
  always @(posedge clk) if (!rst && !mute) cfg_cycles++;

  initial begin
    logic [31:0] st;
    repeat (3) @(negedge clk);
    rst = 0;
    // effect RAM can be loaded while the codec is being configured
    for (int k = 0; k < 2; k++)
      for (int n = 0; n < SFX_LEN; n++) awr(14'(k * SFX_LEN + n), 32'(sfx_val(k, n)));
    check(mute == 1'b0, "muted while configuring");
    wait (mute == 1'b1);
    // 9 words x 120 quarter-bit times of 125 clocks at 100 kHz
    check(cfg_cycles >= 9 * 120 * 125 - 3 && cfg_cycles <= 9 * 120 * 125 + 3,
          $sformatf("codec set-up time %0d clocks", cfg_cycles));
    check(codec.words.size() == 9 && codec.regs[7] == 9'h042 && codec.regs[8] == 9'h00D &&
          codec.regs[9][0] && codec.timing_errors == 0, "codec registers and I2C timing");
    ard(14'h2003, st);
    check(st[17] && !st[18], "status: configured, no missing ACK");
    after_tick();
    push_music(100);
    after_tick();
    awr(14'h2001, 32'd1); r_music_on = 1;
    frames(10, 1);
    after_tick(); play(0);                // fire
    frames(SFX_LEN + 20, 1);              // plays to its end
    after_tick(); play(1);                // explosion
    frames(30, 1);
    after_tick(); play(1);                // another explosion restarts it
    frames(200, 0);                       // music runs dry
    ard(14'h2003, st);
    check(int'(st[31:24]) == (underruns > 255 ? 255 : underruns), "status: underruns");
    after_tick();
    awr(14'h2001, 32'd0); r_music_on = 0;
    frames(10, 0);
    #(64 * 1952);
    wait (video_done);
    // ------------------------------------------------------ results
    check(codec.rx_left.size() >= expect_q.size() - 1 && ticks > SFX_LEN, "audio frames decoded");
    for (int i = 0; i < expect_q.size() && i < codec.rx_left.size(); i++) begin
      check(codec.rx_left[i] == expect_q[i], $sformatf("sample %0d: got %h want %h",
            i, codec.rx_left[i], expect_q[i]));
      check(codec.rx_right[i] == expect_q[i], "right channel");
    end
    $display("video: frames=%0d fx=%0d tile=%0d tank=%0d info=%0d black=%0d grey=%0d clear=%0d overlap=%0d",
             frames_done, st_fx, st_tile, st_tank, st_info, st_black, st_grey, st_clear, st_overlap);
    $display("audio: frames=%0d sat_pos=%0d sat_neg=%0d underruns=%0d sfx_ends=%0d restarts=%0d music_off=%0d",
             ticks, sat_pos, sat_neg, underruns, sfx_ends, restarts, music_off_frames);
    check(st_fx > 0, "bullet/explosion layer shown");
    check(st_tile > 0, "scenery layer shown");
    check(st_tank > 0, "tank layer shown");
    check(st_info > 0, "digit layer shown");
    check(st_black > 0 && st_grey > 0, "playfield and grey frame shown");
    check(st_clear > 0, "transparent pixels fall through");
    check(st_overlap > 0, "objects overlap within a layer");
    check(sfx_ends > 0, "effect played to its end");
    check(restarts > 0, "effect restarted");
    check(sat_pos > 0 && sat_neg > 0, "mix saturated both ways");
    check(underruns > 0, "music underrun");
    check(music_off_frames > 0, "music switched off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
