// ssm2603_model - behavioural model of the SSM2603 audio codec, for
// simulation only.
//
// I2C side: a write-only slave at address 0011010. It acknowledges its
// address and each data byte by pulling SDA low during the ninth clock,
// and on STOP after two data bytes records the 16-bit control word in
// words[] and the 9-bit value in regs[word[15:9]]. It also checks that SCL
// high and low times are at least T_HIGH_MIN / T_LOW_MIN ns.
// I2S side: once register R9 bit 0 (Active) is set, or always_on is high,
// it acts as clock master: BCLK with a period of 2*BCLK_HALF_NS ns and LRC
// changing on BCLK falling edges every 32 bit clocks (LRC low = left).
// PBDAT is read on BCLK rising edges: the first bit after an LRC edge is
// ignored, the next 16 form the sample, pushed into rx_left / rx_right.
module ssm2603_model #(
  parameter int BCLK_HALF_NS = 976,
  parameter int T_HIGH_MIN   = 600,
  parameter int T_LOW_MIN    = 1300
) (
  input  logic scl,
  input  logic sda_oe,      // master pulls SDA low
  output logic sda_in,      // SDA as seen on the wire
  input  logic always_on,
  output logic bclk,
  output logic lrclk,
  input  logic pbdat
);

  logic        ack_pull = 1'b0;
  logic        sda;
  assign sda    = !(sda_oe || ack_pull);
  assign sda_in = sda;

  // ------------------------------------------------------------- I2C
  logic [15:0] words [$];
  logic [8:0]  regs [128];
  int          timing_errors = 0;
  int          nacked = 0;
  logic [7:0]  bytes [$];
  logic [7:0]  cur;
  int          nbits;
  logic        in_frame = 1'b0;
  logic        addressed = 1'b0;
  realtime     t_rise, t_fall;

  initial for (int i = 0; i < 128; i++) regs[i] = '0;

  // START / STOP
  always @(negedge sda) if (scl) begin
    in_frame  = 1'b1;
    addressed = 1'b0;
    nbits     = 0;
    bytes.delete();
  end
  always @(posedge sda) if (scl && in_frame) begin
    in_frame = 1'b0;
    if (addressed && bytes.size() == 3) begin
      words.push_back({bytes[1], bytes[2]});
      regs[bytes[1][7:1]] = {bytes[1][0], bytes[2]};
    end
  end

  always @(posedge scl) begin
    t_rise = $realtime;
    if (t_fall > 0 && ($realtime - t_fall) < T_LOW_MIN) timing_errors++;
    if (in_frame && !ack_pull) begin
      if (nbits < 8) begin
        cur = {cur[6:0], sda};
        nbits++;
      end
    end
  end

  always @(negedge scl) begin
    t_fall = $realtime;
    if (($realtime - t_rise) < T_HIGH_MIN) timing_errors++;
    if (ack_pull) begin
      ack_pull = 1'b0;
      nbits    = 0;
    end else if (in_frame && nbits == 8) begin
      bytes.push_back(cur);
      if (bytes.size() == 1) addressed = (cur == {7'b0011010, 1'b0});
      if (addressed) ack_pull = 1'b1;
      else begin nacked++; nbits = 0; end
    end
  end

  // ------------------------------------------------------------- I2S
  logic signed [15:0] rx_left [$];
  logic signed [15:0] rx_right [$];
  logic active;
  assign active = always_on || regs[9][0];

  initial begin
    bclk  = 1'b0;
    lrclk = 1'b1;
    while (!active) #(BCLK_HALF_NS);
    forever begin
      for (int half = 0; half < 2; half++) begin
        for (int b = 0; b < 32; b++) begin
          #(BCLK_HALF_NS) bclk = 1'b0;
          if (b == 0) lrclk = half[0];
          #(BCLK_HALF_NS) bclk = 1'b1;
        end
      end
    end
  end

  int          rbit = 0;
  logic        lr_last = 1'b1;
  logic [15:0] rsh;
  always @(posedge bclk) begin
    if (lrclk != lr_last) begin
      lr_last = lrclk;
      rbit    = 0;                    // don't-care bit
    end else begin
      rbit++;
      if (rbit <= 16) begin
        rsh = {rsh[14:0], pbdat};
        if (rbit == 16) begin
          if (!lrclk) rx_left.push_back(rsh);
          else        rx_right.push_back(rsh);
        end
      end
    end
  end

endmodule
