// tb_i2c_codec_config - checks the codec set-up sequence on the I2C bus.
//
// The configurator runs with a 250 kHz SCL against the codec model, which
// acknowledges address 0011010, records each 16-bit control word and
// checks SCL high >= 600 ns and low >= 1.3 us. Checked: the nine words and
// their order (reset, power, analog path, digital path, interface =
// master/I2S/16-bit, 8 kHz rate, left and right volume, active), the
// decoded interface register fields, no missing ACK, and that done rises
// after 9 x 120 quarter-bit times. A second configurator whose SDA is
// never pulled low by any slave must report nack and still finish.
`timescale 1ns/1ps
module tb_i2c_codec_config;
  localparam int CLK_HZ = 50_000_000, SCL_HZ = 250_000;
  localparam int Q = CLK_HZ / (4 * SCL_HZ);        // 50 clocks
  logic clk = 0, rst = 1;
  always #10 clk = !clk;

  logic scl, sda_oe, sda_in, done, nack;
  logic scl2, sda_oe2, done2, nack2;
  logic bclk, lrclk;

  i2c_codec_config #(.CLK_HZ(CLK_HZ), .SCL_HZ(SCL_HZ)) dut (
    .clk, .rst, .scl, .sda_oe, .sda_in, .done, .nack);
  ssm2603_model codec (.scl, .sda_oe, .sda_in, .always_on(1'b0), .bclk, .lrclk, .pbdat(1'b0));

  // nobody acknowledges this one
  i2c_codec_config #(.CLK_HZ(CLK_HZ), .SCL_HZ(SCL_HZ)) dut_nobody (
    .clk, .rst, .scl(scl2), .sda_oe(sda_oe2), .sda_in(!sda_oe2), .done(done2), .nack(nack2));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  localparam logic [15:0] EXP [9] = '{16'h1E00, 16'h0C67, 16'h0810, 16'h0A00, 16'h0E42,
                                      16'h100D, 16'h0479, 16'h0679, 16'h1201};
  int cyc = 0, done_cyc = -1;
  always @(posedge clk) begin
    if (!rst) cyc++;
    if (done && done_cyc < 0) done_cyc = cyc;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    wait (done && done2);
    repeat (4 * Q) @(posedge clk);
    check(codec.words.size() == 9, "nine words written");
    for (int i = 0; i < 9 && i < codec.words.size(); i++)
      check(codec.words[i] == EXP[i], $sformatf("word %0d = %h", i, codec.words[i]));
    // R7: BCLKINV=0, MS=1, LRSWAP=0, LRP=0, WL=00 (16 bit), Format=10 (I2S)
    check(codec.regs[7][6] == 1'b1 && codec.regs[7][3:2] == 2'b00 && codec.regs[7][1:0] == 2'b10,
          "interface register fields");
    check(codec.regs[9][0] == 1'b1, "codec active");
    check(codec.timing_errors == 0, "SCL high/low times");
    check(codec.nacked == 0 && !nack, "all bytes acknowledged");
    check(nack2 && done2, "missing ACK reported");
    check(done_cyc >= 9 * 120 * Q - 3 && done_cyc <= 9 * 120 * Q + 3,
          $sformatf("sequence length %0d clocks", done_cyc));
    check(scl && !sda_oe, "bus released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
