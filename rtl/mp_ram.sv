// mp_ram - memory with one write port and NRD read ports.
//
// The game's picture store: instantiated for the twelve 32x32 images
// (12288 words of 30 bits), for the ten 20x20 digits (4000 words) and, in
// the audio controller, for the two sound effects (8000 words of 16 bits).
// Software fills it over the bus. Several read ports let the bullet,
// scenery and tank layers fetch their pixel in the same pixel time (on an
// FPGA the tools duplicate the block RAM per read port, a design choice).
// The memory is not cleared at reset: software writes it before use.
// Addresses at or above DEPTH are ignored on writes and read as 0.
//
// Timing: a write takes effect at the clock edge with we high. Each read
// port returns mem[raddr] one clock after an edge with re high and holds
// its value while re is low.
module mp_ram #(
  parameter int DEPTH = 12288,
  parameter int WIDTH = 30,
  parameter int NRD   = 3,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr [NRD],
  output logic [WIDTH-1:0] rdata [NRD]
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (int'(waddr) < DEPTH)) mem[waddr] <= wdata;
  end

  for (genvar p = 0; p < NRD; p++) begin : g_rd
    always_ff @(posedge clk) begin
      if (re) rdata[p] <= (int'(raddr[p]) < DEPTH) ? mem[raddr[p]] : '0;
    end
  end

endmodule
