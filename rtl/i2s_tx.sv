// i2s_tx - I2S playback serialiser for a codec that is the clock master.
//
// The SSM2603 runs in master mode: it drives the bit clock BCLK and the
// frame clock DACLRCK, and reads PBDAT (our dacdat) on BCLK rising edges.
// In I2S format LRC low is the left channel; after each LRC edge one bit
// time is a don't-care bit, then the W-bit sample follows MSB first, and
// the rest of the channel half is padded (here with 0).
//
// BCLK and LRC are brought into the system clock domain with two
// flip-flops each. LRC is sampled at BCLK rising edges, when it is stable.
// At each BCLK falling edge the module compares the LRC value of the bit
// time that just ended with that of the bit time before it: if they
// differ, that bit time was the don't-care bit and the MSB goes out now.
// At the start of each left channel both samples are captured and
// frame_tick pulses for one clock, so the sample source can move on.
//
// Timing: dacdat changes about three system clocks after the BCLK falling
// edge reaches the pin, so BCLK must be slower than about CLK/8 (the codec's
// bit clock is a few MHz against a 50 MHz system clock).
module i2s_tx #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         bclk,
  input  logic         lrclk,
  input  logic [W-1:0] left,
  input  logic [W-1:0] right,
  output logic         dacdat,
  output logic         frame_tick
);

  logic [2:0]   bclk_s;
  logic [1:0]   lr_s;
  logic         rise, fall;
  logic         lr_bit, lr_bit_prev;   // LRC seen in the last two bit times
  logic [W-1:0] sh, r_hold;
  logic [$clog2(W+1)-1:0] left_bits;   // bits still to send

  always_ff @(posedge clk) begin
    bclk_s <= {bclk_s[1:0], bclk};
    lr_s   <= {lr_s[0], lrclk};
  end

  assign rise = bclk_s[1] && !bclk_s[2];
  assign fall = !bclk_s[1] && bclk_s[2];

  always_ff @(posedge clk) begin
    if (rst) begin
      lr_bit      <= 1'b1;
      lr_bit_prev <= 1'b1;
      sh          <= '0;
      r_hold      <= '0;
      left_bits   <= '0;
      dacdat      <= 1'b0;
      frame_tick  <= 1'b0;
    end else begin
      frame_tick <= 1'b0;
      if (rise) lr_bit <= lr_s[1];
      if (fall) begin
        lr_bit_prev <= lr_bit;
        if (lr_bit != lr_bit_prev) begin
          // the bit time just ended was the don't-care bit: send the MSB
          if (!lr_bit) begin
            dacdat     <= left[W-1];
            sh         <= {left[W-2:0], 1'b0};
            r_hold     <= right;
            frame_tick <= 1'b1;
          end else begin
            dacdat <= r_hold[W-1];
            sh     <= {r_hold[W-2:0], 1'b0};
          end
          left_bits <= ($bits(left_bits))'(W - 1);
        end else if (left_bits != 0) begin
          dacdat    <= sh[W-1];
          sh        <= {sh[W-2:0], 1'b0};
          left_bits <= left_bits - 1'b1;
        end else begin
          dacdat <= 1'b0;
        end
      end
    end
  end

endmodule
