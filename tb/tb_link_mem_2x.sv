// tb_link_mem_2x: self-checking test of the double-clocked link memory.
//
// clk_fast runs at twice clk with aligned rising edges, as in the switch.
// Every core cycle both ports get a random operation (idle, read or write).
// The reference model applies port A first and port B second within a core
// cycle, which is the order the memory promises: A acts on the mid-cycle fast
// edge, B on the edge that ends the cycle. Read data of either port must show
// up in the next core cycle and hold until the port's next read. Parameters
// are the block defaults. Prints TB_RESULT; a watchdog stops a hung run.
`timescale 1ns/1ps
module tb_link_mem_2x;
  localparam int DEPTH = 16, WIDTH = 4;
  logic clk = 1, clk_fast = 1;
  always #10 clk = ~clk;
  always #5 clk_fast = ~clk_fast;

  logic a_en, a_we, b_en, b_we;
  logic [3:0] a_addr, b_addr;
  logic [WIDTH-1:0] a_wdata, a_rdata, b_wdata, b_rdata;
  int checks = 0, failures = 0;

  link_mem_2x dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  logic [WIDTH-1:0] model [DEPTH];
  logic [WIDTH-1:0] exp_a, exp_b;
  int n_ab = 0, n_ba = 0;
  initial begin
    a_en = 0; a_we = 0; b_en = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    @(posedge clk); #1;
    // fill through both ports, two addresses per core cycle
    for (int a = 0; a < DEPTH; a += 2) begin
      a_en = 1; a_we = 1; a_addr = 4'(a);     a_wdata = 4'($urandom); model[a] = a_wdata;
      b_en = 1; b_we = 1; b_addr = 4'(a + 1); b_wdata = 4'($urandom); model[a+1] = b_wdata;
      @(posedge clk); #1;
    end
    a_en = 0; b_en = 0;
    @(posedge clk); #1;
    exp_a = a_rdata; exp_b = b_rdata;
    for (int i = 0; i < 4000; i++) begin
      a_en = 1'($urandom); a_we = 1'($urandom); a_addr = 4'($urandom); a_wdata = 4'($urandom);
      b_en = 1'($urandom); b_we = 1'($urandom); b_wdata = 4'($urandom);
      b_addr = ($urandom_range(0, 2) == 0) ? a_addr : 4'($urandom);
      if (a_en && a_we && b_en && !b_we && a_addr == b_addr) n_ab++;
      if (b_en && b_we && a_en && !a_we && a_addr == b_addr) n_ba++;
      // port A first ...
      if (a_en && !a_we) exp_a = model[a_addr];
      if (a_en && a_we)  model[a_addr] = a_wdata;
      // ... then port B
      if (b_en && !b_we) exp_b = model[b_addr];
      if (b_en && b_we)  model[b_addr] = b_wdata;
      @(posedge clk); #1;
      check(a_rdata == exp_a, $sformatf("cycle %0d: a_rdata %0h expected %0h", i, a_rdata, exp_a));
      check(b_rdata == exp_b, $sformatf("cycle %0d: b_rdata %0h expected %0h", i, b_rdata, exp_b));
    end
    // the write of one port must be seen by a same-cycle read of the other only A->B
    check(n_ab > 50 && n_ba > 50, "same-address cross-port accesses not exercised");
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
