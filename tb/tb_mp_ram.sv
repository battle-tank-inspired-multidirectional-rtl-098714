// tb_mp_ram - checks the multi-read-port memory.
//
// Fills a 12288 x 30 memory with random words (a shadow copy in the test
// bench is the reference), then reads random addresses on all three ports
// at once and checks each port one clock later, including that the output
// holds while re is low and that a write to an address beyond DEPTH is
// ignored and such an address reads as 0.
`timescale 1ns/1ps
module tb_mp_ram;
  localparam int DEPTH = 12288, WIDTH = 30, NRD = 3, AW = 14;
  logic clk = 0;
  always #10 clk = !clk;

  logic             we = 0, re = 0;
  logic [AW-1:0]    waddr = '0;
  logic [WIDTH-1:0] wdata = '0;
  logic [AW-1:0]    raddr [NRD];
  logic [WIDTH-1:0] rdata [NRD];

  mp_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH), .NRD(NRD)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [WIDTH-1:0] shadow [DEPTH];
  logic [AW-1:0]    a [NRD];
  logic [WIDTH-1:0] held [NRD];

  initial begin
    for (int p = 0; p < NRD; p++) raddr[p] = '0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      shadow[i] = WIDTH'({$urandom, $urandom});
      we = 1; waddr = AW'(i); wdata = shadow[i];
      @(negedge clk);
    end
    // write beyond DEPTH: must be dropped
    waddr = AW'(DEPTH); wdata = '1;
    @(negedge clk);
    we = 0;
    for (int n = 0; n < 3000; n++) begin
      re = 1;
      for (int p = 0; p < NRD; p++) begin
        a[p] = AW'($urandom_range(0, DEPTH - 1));
        raddr[p] = a[p];
      end
      @(negedge clk);
      for (int p = 0; p < NRD; p++) check(rdata[p] == shadow[a[p]], $sformatf("port %0d read", p));
      // hold while re is low
      re = 0;
      for (int p = 0; p < NRD; p++) begin held[p] = rdata[p]; raddr[p] = ~a[p]; end
      @(negedge clk);
      for (int p = 0; p < NRD; p++) check(rdata[p] == held[p], "hold while re low");
    end
    re = 1; raddr[0] = AW'(DEPTH); raddr[1] = AW'(DEPTH + 5);
    @(negedge clk);
    check(rdata[0] == '0 && rdata[1] == '0, "out of range reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
