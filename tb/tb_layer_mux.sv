// tb_layer_mux - checks the display layer priority.
//
// Drives every combination of the four layer hit flags, of zero (clear)
// and non-zero pixels on each layer and of the playfield flag, with random
// non-zero colours, and compares with the order bullets/explosions >
// scenery > tanks/bonus > digits > background (black inside the field,
// grey 512/512/512 outside).
`timescale 1ns/1ps
module tb_layer_mux;
  import bt_pkg::*;
  logic fx_hit, tile_hit, tank_hit, info_hit, in_field;
  pix_t fx_pix, tile_pix, tank_pix, info_pix, pix;

  layer_mux dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic pix_t rnd_pix();
    pix_t p;
    p = 30'($urandom);
    if (p == '0) p = 30'd1;
    return p;
  endfunction

  initial begin
    pix_t c [4];
    for (int rep = 0; rep < 20; rep++)
      for (int v = 0; v < 512; v++) begin
        pix_t e;
        logic [3:0] h, z;
        h = v[3:0]; z = v[7:4];
        for (int k = 0; k < 4; k++) c[k] = z[k] ? '0 : rnd_pix();
        {fx_hit, tile_hit, tank_hit, info_hit} = h;
        fx_pix = c[3]; tile_pix = c[2]; tank_pix = c[1]; info_pix = c[0];
        in_field = v[8];
        #1;
        e = in_field ? 30'd0 : {10'd512, 10'd512, 10'd512};
        for (int k = 0; k < 4; k++)
          if (h[k] && c[k] != '0) e = c[k];   // later k = higher layer
        check(pix == e, $sformatf("priority case %0d", v));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
