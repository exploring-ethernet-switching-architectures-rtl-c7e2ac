// tb_sdp_ram: self-checking test of the simple dual-port RAM.
//
// Each cycle a random write and a random read are issued (addresses drawn
// from the full depth, so reads often hit addresses written in the same or
// the previous cycle). A reference array models the memory: a read returns
// the contents before this cycle's write (read-before-write) one cycle later,
// and rdata must hold its value in cycles without a read. Parameters are the
// block defaults. Prints TB_RESULT; a watchdog stops a hung run.
`timescale 1ns/1ps
module tb_sdp_ram;
  localparam int DEPTH = 16, WIDTH = 8;
  logic clk = 1;
  always #10 clk = ~clk;

  logic we, re;
  logic [3:0] waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;
  int checks = 0, failures = 0;

  sdp_ram dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  logic [WIDTH-1:0] model [DEPTH];
  logic [WIDTH-1:0] exp_r;
  int n_same = 0;
  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    // fill every address first so reads are always defined
    for (int a = 0; a < DEPTH; a++) begin
      @(posedge clk); #1;
      we = 1; waddr = 4'(a); wdata = 8'($urandom); model[a] = wdata;
    end
    @(posedge clk); #1; we = 0;
    exp_r = rdata;
    for (int i = 0; i < 4000; i++) begin
      we = 1'($urandom); re = ($urandom_range(0, 3) != 0);
      waddr = 4'($urandom); raddr = ($urandom_range(0, 3) == 0) ? waddr : 4'($urandom);
      wdata = 8'($urandom);
      if (re) exp_r = model[raddr];
      if (we && re && waddr == raddr) n_same++;
      if (we) model[waddr] = wdata;
      @(posedge clk); #1;
      check(rdata == exp_r, $sformatf("cycle %0d: rdata %0h expected %0h", i, rdata, exp_r));
    end
    check(n_same > 100, "same-address read/write not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
