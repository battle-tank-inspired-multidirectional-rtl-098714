// sample_fifo - first-word-fall-through FIFO for streamed audio samples.
//
// The processor streams the background music from its DDR3 memory into
// this buffer; the audio mixer takes one sample per 8 kHz frame. DEPTH
// words of W bits in a circular array with read and write pointers one bit
// wider than the index, so full and empty are told apart by the top bit.
// The depth is a design choice (512 samples = 64 ms at 8 kHz).
//
// Timing: push and pop act at the clock edge; dout always shows the oldest
// word and is valid while empty is low. A push when full or a pop when
// empty is ignored (and flagged by an assertion in simulation). Push and
// pop in the same cycle are both performed.
module sample_fifo #(
  parameter int DEPTH = 512,
  parameter int W     = 16,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full,
  output logic [AW:0]  level
);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp;
  logic         do_push, do_pop;

  assign level   = wp - rp;
  assign empty   = (wp == rp);
  assign full    = (level == (AW+1)'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp[AW-1:0]] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(push && full))
    else $warning("sample_fifo: push while full dropped");
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(pop && empty))
    else $warning("sample_fifo: pop while empty ignored");

endmodule
