// i2c_codec_config - writes the SSM2603 control registers after reset.
//
// The codec is set up over a two-wire (I2C) bus. Each control word is 16
// bits, MSB first: bits 15..9 the register address, bits 8..0 the data.
// One write is: START, device address 0011010 (CSB tied low) with R/W = 0,
// ACK, bits 15..8, ACK, bits 7..0, ACK, STOP. The words, listed in bt_pkg
// (codec_word), reset the codec, power the DAC and output, route the DAC
// to the output, select master mode, I2S and 16-bit samples and 8 kHz, set
// the output volume and finally activate the digital interface. The frame
// format comes from the game's description; the register values are this
// design's reading of the codec's register map.
//
// Each bit time is cut into four quarters of CLK_HZ / (4 * SCL_HZ) clocks:
// SCL low while SDA changes, SCL high for two quarters (the slave's ACK is
// read in the middle), SCL low again. At 100 kHz SCL is high and low for
// 5 us each, inside the codec's limits (526 kHz max, 600 ns high, 1.3 us
// low). SDA is open drain: sda_oe = 1 pulls the line low, otherwise it
// floats high through the board pull-up and sda_in reads it back. SCL is
// driven push-pull (the codec never stretches the clock).
//
// done rises after the last STOP and stays high. A missing ACK sets the
// sticky flag nack; the sequence still runs to the end.
module i2c_codec_config
  import bt_pkg::*;
#(
  parameter int CLK_HZ = 50_000_000,
  parameter int SCL_HZ = 100_000
) (
  input  logic clk,
  input  logic rst,
  output logic scl,
  output logic sda_oe,
  input  logic sda_in,
  output logic done,
  output logic nack
);

  localparam int QUARTER = CLK_HZ / (4 * SCL_HZ);
  localparam int QW      = $clog2(QUARTER + 1);
  localparam int NBITS   = 27;              // 3 bytes, each with an ACK slot

  typedef enum logic [2:0] {S_IDLE, S_START, S_BITS, S_STOP, S_DONE} state_e;

  state_e      state;
  logic [QW-1:0] qcnt;
  logic [1:0]  quarter;
  logic        qtick;
  logic [4:0]  bitn;                        // bit being sent, 0..26
  logic [NBITS-1:0] sh;                     // bits, MSB first; ACK slots = 1
  logic [$clog2(N_CODEC_WORDS+1)-1:0] word;
  logic        sda;                         // level we want on SDA

  assign qtick  = (qcnt == QW'(QUARTER - 1));
  assign sda_oe = !sda;

  function automatic logic [NBITS-1:0] frame(logic [15:0] w);
    return {CODEC_I2C_ADDR, 1'b0, 1'b1, w[15:8], 1'b1, w[7:0], 1'b1};
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      qcnt    <= '0;
      quarter <= '0;
      bitn    <= '0;
      sh      <= '0;
      word    <= '0;
      sda     <= 1'b1;
      scl     <= 1'b1;
      done    <= 1'b0;
      nack    <= 1'b0;
    end else begin
      qcnt <= qtick ? '0 : qcnt + 1'b1;
      if (qtick) begin
        quarter <= quarter + 1'b1;
        unique case (state)
          S_IDLE: begin
            // one idle bit time with the bus free
            if (quarter == 2'd3) begin
              state <= S_START;
              sh    <= frame(codec_word(int'(word)));
            end
          end
          S_START: begin
            unique case (quarter)
              2'd0, 2'd1: begin scl <= 1'b1; sda <= 1'b1; end
              2'd2:       begin scl <= 1'b1; sda <= 1'b0; end
              2'd3:       begin scl <= 1'b0; sda <= 1'b0;
                                state <= S_BITS; bitn <= '0; end
            endcase
          end
          S_BITS: begin
            unique case (quarter)
              2'd0: begin scl <= 1'b0; sda <= sh[NBITS-1]; end
              2'd1: scl <= 1'b1;
              2'd2: begin
                // ACK slots are bits 8, 17 and 26
                if ((bitn == 5'd8 || bitn == 5'd17 || bitn == 5'd26) && sda_in)
                  nack <= 1'b1;
              end
              2'd3: begin
                scl  <= 1'b0;
                sh   <= {sh[NBITS-2:0], 1'b1};
                bitn <= bitn + 1'b1;
                if (bitn == 5'(NBITS - 1)) state <= S_STOP;
              end
            endcase
          end
          S_STOP: begin
            unique case (quarter)
              2'd0: begin scl <= 1'b0; sda <= 1'b0; end
              2'd1: scl <= 1'b1;
              2'd2: sda <= 1'b1;
              2'd3: begin
                if (int'(word) == N_CODEC_WORDS - 1) begin
                  state <= S_DONE;
                  done  <= 1'b1;
                end else begin
                  word  <= word + 1'b1;
                  state <= S_IDLE;
                end
              end
            endcase
          end
          default: ;   // S_DONE: bus idle, both lines high
        endcase
      end
    end
  end

endmodule
