// tb_audio_controller - end-to-end check of music, effects and codec set-up.
//
// The controller configures the codec model over I2C (250 kHz SCL here);
// the model starts its I2S clocks (BCLK 400 ns, 25.6 us frames) only once
// the Active register is written. The test bench then loads both effects,
// streams music, switches music on and off, plays effect 0 to its end,
// interrupts it with effect 1, and lets the FIFO run dry. A frame-level
// reference, stepped at every frame tick, pops music, steps the effect,
// adds with saturation and predicts every sample the codec model decodes
// (one frame later, on both channels). All bus writes happen a few clocks
// after a frame tick so their effect on the reference is unambiguous.
// Also checked: mute until configured, status register fields, underrun
// count and the AUD_XCK period. Counts: saturations both ways, underruns,
// effect endings, effect restarts, frames with music off.
`timescale 1ns/1ps
module tb_audio_controller;
  localparam int SFX_LEN = 4000;
  logic clk = 0, rst = 1;
  always #10 clk = !clk;

  logic [13:0] address = '0;
  logic        chipselect = 0, write = 0, read = 0;
  logic [31:0] writedata = '0, readdata;
  logic        xck, bclk, lrclk, dacdat, mute, scl, sda_oe, sda_in;

  audio_controller #(.CLK_HZ(50_000_000), .SCL_HZ(250_000)) dut (
    .clk, .rst, .avs_address(address), .avs_chipselect(chipselect), .avs_write(write),
    .avs_writedata(writedata), .avs_read(read), .avs_readdata(readdata),
    .AUD_XCK(xck), .AUD_BCLK(bclk), .AUD_DACLRCK(lrclk), .AUD_DACDAT(dacdat),
    .AUD_MUTE(mute), .AUD_I2C_SCLK(scl), .i2c_sda_oe(sda_oe), .i2c_sda_in(sda_in));

  ssm2603_model #(.BCLK_HALF_NS(200), .T_LOW_MIN(1300)) codec (
    .scl, .sda_oe, .sda_in, .always_on(1'b0), .bclk, .lrclk, .pbdat(dacdat));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------------------------------------------------- bus tasks
  task automatic wr(logic [13:0] a, logic [31:0] d);
    @(negedge clk);
    address = a; writedata = d; chipselect = 1; write = 1;
    @(negedge clk);
    chipselect = 0; write = 0;
  endtask
  task automatic rd(logic [13:0] a, output logic [31:0] d);
    @(negedge clk);
    address = a; chipselect = 1; read = 1;
    @(negedge clk);
    chipselect = 0; read = 0;
    d = readdata;
  endtask

  // -------------------------------------------------------- reference
  function automatic logic signed [15:0] sfx_val(int k, int n);
    if (k == 0) return 16'(n * 13 - 20000);
    else        return (n % 2 != 0) ? -16'sd30000 : 16'sd30000;
  endfunction

  logic signed [15:0] mq [$];
  logic signed [15:0] expect_q [$];
  logic signed [15:0] prev_out = 0;
  bit  r_music_on = 0, r_playing = 0;
  int  r_k = 0, r_n = 0;
  int  sat_pos = 0, sat_neg = 0, underruns = 0, sfx_ends = 0, restarts = 0, music_off_frames = 0;
  int  ticks = 0;

  // Frame ticks are rebuilt from the codec clocks: a left channel starts
  // at the second BCLK falling edge after LRC falls; the controller acts on
  // it a few clocks later (synchronisers), the reference 6 clocks later.
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
      v = 16'($signed($urandom_range(0, 32000)) - 16000);
      wr(14'h2000, 32'(v));
      mq.push_back(v);
    end
  endtask

  task automatic play(int k);
    wr(14'h2002, 32'(k));
    if (r_playing) restarts++;
    r_playing = 1; r_k = k; r_n = 0;
  endtask

  task automatic frames(int n, int feed);
    for (int i = 0; i < n; i++) begin
      after_tick();
      if (feed > 0) push_music(feed);
    end
  endtask

  // ------------------------------------------------------------ XCK
  realtime last_xck = 0;
  int xck_edges = 0;
  always @(posedge xck) begin
    if (xck_edges > 0) check($realtime - last_xck == 80.0, "AUD_XCK period 4 clocks");
    last_xck = $realtime;
    xck_edges++;
  end

  // ------------------------------------------------------------ flow
  initial begin
    logic [31:0] st;
    repeat (3) @(negedge clk);
    rst = 0;
    check(mute == 1'b0, "muted while configuring");
    wait (mute == 1'b1);
    rd(14'h2003, st);
    check(st[17] == 1'b1 && st[18] == 1'b0, "status: configured, all ACKed");
    check(codec.words.size() == 9 && codec.regs[9][0], "codec configured and active");
    // load the effects and some music while music is off
    for (int k = 0; k < 2; k++)
      for (int n = 0; n < SFX_LEN; n++) begin
        if (n % 500 == 0) after_tick();
        wr(14'(k * SFX_LEN + n), 32'(sfx_val(k, n)));
      end
    after_tick();
    push_music(200);
    rd(14'h2003, st);
    check(st[9:0] == 10'd200, "status: FIFO level");
    after_tick();
    wr(14'h2001, 32'd1);  r_music_on = 1;
    frames(20, 0);
    after_tick(); play(0);
    frames(4100, 1);                     // effect 0 runs to its end
    after_tick(); play(1);
    frames(50, 1);
    after_tick(); play(1);               // restart while playing
    frames(300, 0);                      // FIFO runs dry
    rd(14'h2003, st);
    check(int'(st[31:24]) == (underruns > 255 ? 255 : underruns), "status: underrun count");
    check(st[16] == 1'b1, "status: effect playing");
    after_tick();
    wr(14'h2001, 32'd0); r_music_on = 0;
    push_music(10);
    frames(20, 0);
    #(64 * 400);
    // compare the decoded stream with the reference
    check(codec.rx_left.size() >= expect_q.size() - 1, "all frames decoded");
    check(ticks > 4000, "frames ran");
    for (int i = 0; i < expect_q.size() && i < codec.rx_left.size(); i++) begin
      check(codec.rx_left[i] == expect_q[i], $sformatf("sample %0d: got %h want %h",
            i, codec.rx_left[i], expect_q[i]));
      check(codec.rx_right[i] == expect_q[i], "right channel");
    end
    $display("frames=%0d sat_pos=%0d sat_neg=%0d underruns=%0d sfx_ends=%0d restarts=%0d music_off=%0d",
             ticks, sat_pos, sat_neg, underruns, sfx_ends, restarts, music_off_frames);
    check(sat_pos > 0 && sat_neg > 0 && underruns > 0 && sfx_ends > 0 && restarts > 0 &&
          music_off_frames > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
