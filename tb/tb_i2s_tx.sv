// tb_i2s_tx - checks the I2S serialiser against the codec model.
//
// The codec model is the clock master (BCLK of 400 ns, 32 bit clocks per
// channel) and decodes PBDAT on BCLK rising edges, skipping the bit after
// each LRC edge. The test bench presents a new random left/right pair at
// every frame_tick and checks that the model receives exactly those pairs,
// in order, and that frame_tick comes once per frame (64 bit clocks).
`timescale 1ns/1ps
module tb_i2s_tx;
  logic clk = 0, rst = 1;
  always #10 clk = !clk;

  logic        bclk, lrclk, dacdat, frame_tick;
  logic [15:0] left = '0, right = '0;
  logic        sda_in;

  i2s_tx #(.W(16)) dut (.clk, .rst, .bclk, .lrclk, .left, .right, .dacdat, .frame_tick);

  ssm2603_model #(.BCLK_HALF_NS(200)) codec (
    .scl(1'b1), .sda_oe(1'b0), .sda_in, .always_on(1'b1), .bclk, .lrclk, .pbdat(dacdat));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [15:0] sent_l [$], sent_r [$];
  realtime     last_tick = 0;
  int          ticks = 0;

  // a new pair for every frame; the pair presented at a tick is sent in
  // that frame
  always @(posedge clk) if (frame_tick && !rst) begin
    sent_l.push_back(left);
    sent_r.push_back(right);
    if (ticks > 1) check($realtime - last_tick == 64 * 400.0, "frame_tick period");
    last_tick = $realtime;
    ticks++;
    left  <= 16'($urandom);
    right <= 16'($urandom);
  end

  initial begin
    left = 16'h8001; right = 16'h7FFE;
    repeat (3) @(negedge clk);
    rst = 0;
    wait (ticks == 200);
    // let the last frame finish
    #(64 * 400);
    check(codec.rx_left.size() >= 199, "frames received");
    for (int i = 0; i < codec.rx_left.size() && i < 199; i++)
      check(codec.rx_left[i] == sent_l[i], $sformatf("left sample %0d", i));
    for (int i = 0; i < codec.rx_right.size() && i < 199; i++)
      check(codec.rx_right[i] == sent_r[i], $sformatf("right sample %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
