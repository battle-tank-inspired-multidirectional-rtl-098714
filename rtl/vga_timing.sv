// vga_timing - 640x480 raster counters and VGA sync signals.
//
// A divider turns the system clock into one pixel enable every PIX_DIV
// cycles (25 MHz from 50 MHz). On each enable the column counter advances
// through 800 pixel times per line (640 display, 16 front porch, 96 sync,
// 48 back porch) and the line counter through 525 lines (480, 10, 2, 33).
// HSYNC and VSYNC are active low during the sync intervals, as in the
// sync / back porch / display / front porch order of a VGA line. The
// porch and sync lengths are the common 640x480 at 60 Hz numbers (a design
// choice; only the 640x480 size is fixed by the game).
//
// Timing: hcount, vcount, active and the syncs are registers that change on
// the cycle after pix_en. vga_clk is low for the first half of each pixel
// period and high for the second, so a DAC clocked on its rising edge sees
// pixel data that was set up half a pixel earlier.
module vga_timing
  import bt_pkg::*;
#(
  parameter int PIX_DIV = 2
) (
  input  logic       clk,
  input  logic       rst,
  output logic       pix_en,
  output logic [9:0] hcount,
  output logic [9:0] vcount,
  output logic       active,
  output logic       hsync_n,
  output logic       vsync_n,
  output logic       vga_clk,
  output logic       frame_start
);

  localparam int DW = (PIX_DIV > 1) ? $clog2(PIX_DIV) : 1;

  logic [DW-1:0] div;

  always_ff @(posedge clk) begin
    if (rst) begin
      div     <= '0;
      vga_clk <= 1'b0;
    end else begin
      if (div == DW'(PIX_DIV - 1)) begin
        div     <= '0;
        vga_clk <= 1'b0;
      end else begin
        div     <= div + 1'b1;
        vga_clk <= (int'(div) + 1 >= PIX_DIV / 2);
      end
    end
  end

  assign pix_en = (div == DW'(PIX_DIV - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
    end else if (pix_en) begin
      if (hcount == 10'(H_TOTAL - 1)) begin
        hcount <= '0;
        vcount <= (vcount == 10'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
      end else begin
        hcount <= hcount + 1'b1;
      end
    end
  end

  always_comb begin
    active      = (hcount < 10'(H_ACTIVE)) && (vcount < 10'(V_ACTIVE));
    hsync_n     = !((hcount >= 10'(H_ACTIVE + H_FP)) &&
                    (hcount <  10'(H_ACTIVE + H_FP + H_SYNC)));
    vsync_n     = !((vcount >= 10'(V_ACTIVE + V_FP)) &&
                    (vcount <  10'(V_ACTIVE + V_FP + V_SYNC)));
    frame_start = pix_en && (hcount == '0) && (vcount == '0);
  end

endmodule
