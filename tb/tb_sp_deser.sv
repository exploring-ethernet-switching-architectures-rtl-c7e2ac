// tb_sp_deser: self-checking test of the serial-to-parallel converter.
//
// Phase 1 sends 300 frames of random length (1..400 bytes) with random gaps.
// The consumer is ready at once for cells inside a frame (as the buffer
// manager must be to meet its deadline) but after a frame's last cell it
// waits a random number of cycles shorter than the gap that follows, so the
// converter has to keep the finished cell. Every cell is compared with the
// frame it came from: byte contents, first/last flags, valid byte count and
// no loss flag. Phase 2 keeps the consumer stalled through a 130-byte frame:
// its cells are overrun and the only cell handed on (the 8-byte tail) must
// carry out_lost; the next frame must pass clean. Parameters are the block
// defaults (61-byte cells). Prints TB_RESULT; a watchdog stops a hung run.
`timescale 1ns/1ps
module tb_sp_deser;
  localparam int C = 61;
  logic clk = 1, rst = 1;
  always #10 clk = ~clk;

  logic [7:0] in_data;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic out_valid, out_first, out_last, out_lost, out_ready;
  logic [C*8-1:0] out_data;
  logic [5:0] out_nbytes;
  int checks = 0, failures = 0;

  sp_deser dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  // expected cells, built by the driver
  typedef struct { logic [C*8-1:0] data; bit first, last; int nb; } cell_t;
  cell_t exp_q[$];
  int hold = 0;          // cycles the consumer still refuses a tail cell
  bit stall_all = 0;     // phase 2: never ready
  bit expect_lost = 0;
  int n_cells = 0, n_held = 0, n_lost = 0;

  assign out_ready = !stall_all && !(out_valid && out_last && hold > 0);

  always @(posedge clk) begin
    if (hold > 0 && out_valid && out_last) begin hold <= hold - 1; n_held++; end
    if (out_valid && out_ready) begin
      cell_t e;
      n_cells++;
      if (expect_lost) begin
        check(out_lost && out_last && out_nbytes == 8, "overrun frame: tail cell not flagged lost");
        n_lost += int'(out_lost);
        expect_lost = 0;
        void'(exp_q.pop_front());
      end else if (exp_q.size() == 0) begin
        check(0, "cell without expectation");
      end else begin
        e = exp_q.pop_front();
        check(!out_lost, "unexpected lost flag");
        check(out_first == e.first && out_last == e.last && int'(out_nbytes) == e.nb,
              $sformatf("cell flags f%0d l%0d n%0d expected f%0d l%0d n%0d",
                        out_first, out_last, out_nbytes, e.first, e.last, e.nb));
        for (int k = 0; k < e.nb; k++)
          check(out_data[8*k +: 8] == e.data[8*k +: 8], $sformatf("byte %0d of a cell", k));
      end
    end
  end

  task automatic send(int len, int gap, int tail_hold);
    cell_t e;
    e.data = '0; e.first = 1;
    for (int k = 0; k < len; k++) begin
      @(posedge clk); #1;
      in_valid = 1; in_first = (k == 0); in_last = (k == len - 1); in_data = 8'($urandom);
      e.data[8*(k % C) +: 8] = in_data;
      if (k % C == C - 1 || k == len - 1) begin
        e.last = (k == len - 1); e.nb = k % C + 1;
        exp_q.push_back(e);
        e.data = '0; e.first = 0;
        if (k == len - 1) hold = tail_hold;
      end
    end
    @(posedge clk); #1;
    in_valid = 0; in_first = 0; in_last = 0;
    repeat (gap) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 300; i++) begin
      automatic int g = $urandom_range(1, 20);
      send($urandom_range(1, 400), g, $urandom_range(0, g - 1));
    end
    repeat (30) @(posedge clk);
    check(exp_q.size() == 0, $sformatf("%0d cells never delivered", exp_q.size()));
    // phase 2: overrun
    #1 stall_all = 1;
    send(130, 5, 0);
    exp_q.delete();
    exp_q.push_back('{data: '0, first: 0, last: 1, nb: 8});
    expect_lost = 1;
    #1 stall_all = 0;
    repeat (3) @(posedge clk);
    check(!expect_lost, "overrun frame: no cell handed on");
    send(70, 5, 0);
    repeat (10) @(posedge clk);
    check(exp_q.size() == 0, "frame after an overrun not delivered");
    check(n_held > 100, $sformatf("held tail cells only %0d", n_held));
    check(n_lost == 1, "lost flag count");
    $display("cells=%0d held=%0d", n_cells, n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
