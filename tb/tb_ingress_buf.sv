// tb_ingress_buf: self-checking test of the one-cell ingress buffer.
//
// A producer offers random cells (random data, flags, byte count and loss
// flag) and keeps each one until in_ready accepts it; a consumer takes the
// held cell with random in_take. A reference queue checks that every
// accepted cell comes out once, unchanged and in order, that in_ready is
// exactly "empty or taken now", and that the buffer never holds more than one
// cell. Cells are also offered in the very cycle the held one is taken, so
// back-to-back hand-over is covered. Parameters are the block defaults.
// Prints TB_RESULT; a watchdog stops a hung run.
`timescale 1ns/1ps
module tb_ingress_buf;
  localparam int C = 61;
  logic clk = 1, rst = 1;
  always #10 clk = ~clk;

  logic in_valid, in_first, in_last, in_lost, in_ready;
  logic [C*8-1:0] in_data, out_data;
  logic [5:0] in_nbytes, out_nbytes;
  logic out_valid, out_first, out_last, out_lost, in_take;
  int checks = 0, failures = 0;

  ingress_buf dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  typedef struct { logic [C*8-1:0] d; logic f, l, lo; logic [5:0] n; } cell_t;
  cell_t q[$];
  int n_acc = 0, n_take = 0, n_b2b = 0;

  function automatic cell_t rnd_cell();
    cell_t c;
    for (int k = 0; k < C; k++) c.d[8*k +: 8] = 8'($urandom);
    c.f = 1'($urandom); c.l = 1'($urandom); c.lo = ($urandom_range(0, 7) == 0);
    c.n = 6'($urandom_range(1, C));
    return c;
  endfunction

  cell_t cur;
  initial begin
    in_valid = 0; in_take = 0; in_data = '0; in_first = 0; in_last = 0; in_lost = 0; in_nbytes = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    cur = rnd_cell();
    for (int i = 0; i < 5000; i++) begin
      // drive this cycle
      in_valid = ($urandom_range(0, 2) != 0);
      in_data = cur.d; in_first = cur.f; in_last = cur.l; in_lost = cur.lo; in_nbytes = cur.n;
      in_take = out_valid && ($urandom_range(0, 2) != 0);
      #1;
      check(in_ready == (!out_valid || in_take), "in_ready");
      if (out_valid) begin
        check(q.size() == 1, $sformatf("holds %0d cells", q.size()));
        check(out_data == q[0].d && out_first == q[0].f && out_last == q[0].l &&
              out_lost == q[0].lo && out_nbytes == q[0].n, "cell changed in the buffer");
      end else check(q.size() == 0, "cell vanished");
      if (in_take) begin void'(q.pop_front()); n_take++; end
      if (in_valid && in_ready) begin
        q.push_back(cur); n_acc++;
        if (in_take) n_b2b++;
        cur = rnd_cell();
      end
      @(posedge clk); #1;
    end
    check(n_acc > 1000 && n_b2b > 100, $sformatf("coverage acc=%0d b2b=%0d", n_acc, n_b2b));
    $display("accepted=%0d taken=%0d back_to_back=%0d", n_acc, n_take, n_b2b);
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
