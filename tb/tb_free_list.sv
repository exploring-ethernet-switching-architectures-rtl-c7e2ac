// tb_free_list: self-checking test of the free list kept in a link memory.
//
// The free list drives port A of a link_mem_2x (DEPTH 16, as a small
// instance of the switch's lists); the testbench uses port B the way the
// buffer manager does, to link the entries of a chain before it is given
// back. A reference FIFO of free addresses predicts every pop_addr: after
// initialisation the order is 0..15 and each appended chain joins the tail
// in chain order. Random traffic mixes single pops, pops on consecutive
// cycles (including draining the list to zero), appends of chains of 1..6
// entries (to an empty list, to a list of one entry and to longer lists) and
// appends held off by a simultaneous pop. count is compared every cycle.
// Prints TB_RESULT; a watchdog stops a hung run.
`timescale 1ns/1ps
module tb_free_list;
  localparam int DEPTH = 16;
  logic clk = 1, clk_fast = 1, rst = 1;
  always #10 clk = ~clk;
  always #5 clk_fast = ~clk_fast;

  logic init_done, pop, app_req, app_ack;
  logic [3:0] pop_addr, app_first, app_last;
  logic [4:0] count, app_n;
  logic a_en, a_we, b_en, b_we;
  logic [3:0] a_addr, a_wdata, a_rdata, b_addr, b_wdata, b_rdata;
  int checks = 0, failures = 0;

  free_list dut (
    .clk, .rst, .init_done, .pop, .pop_addr, .count, .app_req, .app_first, .app_last,
    .app_n, .app_ack, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata);
  link_mem_2x #(.DEPTH(DEPTH), .WIDTH(4)) u_link (
    .clk, .clk_fast, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  int freeq[$];   // model of the free list, head first
  int used[$];    // entries the testbench holds
  int chain[$];
  int n_empty_app = 0, n_one_app = 0, n_wait_app = 0, n_zero = 0, n_b2b = 0;
  bit last_pop = 0;

  initial begin
    pop = 0; app_req = 0; app_first = 0; app_last = 0; app_n = 0;
    b_en = 0; b_we = 0; b_addr = 0; b_wdata = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    while (!init_done) begin @(posedge clk); #1; end
    for (int a = 0; a < DEPTH; a++) freeq.push_back(a);
    for (int i = 0; i < 6000; i++) begin
      check(int'(count) == freeq.size(), $sformatf("count %0d expected %0d", count, freeq.size()));
      if (freeq.size() > 0 && ($urandom_range(0, 2) != 0 || used.size() == 0)) begin
        // pop; consecutive pops happen often
        pop = 1;
        check(int'(pop_addr) == freeq[0], $sformatf("pop_addr %0d expected %0d", pop_addr, freeq[0]));
        if (last_pop) n_b2b++;
        used.push_back(freeq.pop_front());
        if (freeq.size() == 0) n_zero++;
        last_pop = 1;
        @(posedge clk); #1; pop = 0;
      end else if (used.size() > 0) begin
        // give back a chain of random used entries
        automatic int n = $urandom_range(1, (used.size() < 6) ? used.size() : 6);
        last_pop = 0;
        chain = {};
        for (int k = 0; k < n; k++) begin
          automatic int j = $urandom_range(0, used.size() - 1);
          chain.push_back(used[j]); used.delete(j);
        end
        for (int k = 0; k + 1 < n; k++) begin
          b_en = 1; b_we = 1; b_addr = 4'(chain[k]); b_wdata = 4'(chain[k + 1]);
          @(posedge clk); #1;
        end
        b_en = 0; b_we = 0;
        app_req = 1; app_first = 4'(chain[0]); app_last = 4'(chain[n - 1]); app_n = 5'(n);
        if (freeq.size() == 0) n_empty_app++;
        if (freeq.size() == 1) n_one_app++;
        // sometimes pop in the same cycle: the pop wins and the append waits
        if (freeq.size() > 0 && $urandom_range(0, 3) == 0) begin
          pop = 1; #0;
          check(!app_ack, "append acknowledged during a pop");
          check(int'(pop_addr) == freeq[0], "pop_addr during a held append");
          used.push_back(freeq.pop_front());
          n_wait_app++;
          @(posedge clk); #1; pop = 0;
        end
        #0;
        check(app_ack, "append not acknowledged");
        foreach (chain[k]) freeq.push_back(chain[k]);
        @(posedge clk); #1; app_req = 0;
      end
    end
    check(n_empty_app > 5 && n_one_app > 5 && n_wait_app > 50 && n_zero > 5 && n_b2b > 500,
          $sformatf("coverage empty=%0d one=%0d wait=%0d zero=%0d b2b=%0d",
                    n_empty_app, n_one_app, n_wait_app, n_zero, n_b2b));
    $display("coverage empty=%0d one=%0d wait=%0d zero=%0d b2b=%0d", n_empty_app, n_one_app, n_wait_app, n_zero, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
