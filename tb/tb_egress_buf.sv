// tb_egress_buf: self-checking test of the one-frame egress buffer.
//
// 400 frames of 1..DEPTH words are written one word per cycle (with random
// pauses, as the buffer manager may interleave other work) and read with a
// random rd_take. Checks: can_accept is low from the first word until the
// last word of the frame has left; rd_valid only rises once the whole frame
// is in; the words come out unchanged and in order; the buffer is empty
// again after each frame. Parameters: DEPTH = 25 (one 1522-byte frame of
// 61-byte cells) and an 8-bit word standing in for a cell. Prints TB_RESULT;
// a watchdog stops a hung run.
`timescale 1ns/1ps
module tb_egress_buf;
  localparam int DEPTH = 25, WIDTH = 8;
  logic clk = 1, rst = 1;
  always #10 clk = ~clk;

  logic can_accept, wr_en, wr_last, rd_valid, rd_take;
  logic [WIDTH-1:0] wr_data, rd_data;
  int checks = 0, failures = 0;

  egress_buf dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  logic [WIDTH-1:0] fr[$];
  int n_full = 0;
  initial begin
    wr_en = 0; wr_last = 0; wr_data = 0; rd_take = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 400; i++) begin
      int len, k;
      len = (i % 10 == 0) ? DEPTH : $urandom_range(1, DEPTH);
      k = 0;
      fr = {};
      check(can_accept, "not accepting when empty");
      while (k < len) begin
        wr_en = ($urandom_range(0, 3) != 0);
        wr_data = 8'($urandom); wr_last = (k == len - 1);
        if (wr_en) begin fr.push_back(wr_data); k++; end
        @(posedge clk); #1;
        wr_en = 0; wr_last = 0;
        check(can_accept == (k == 0), "can_accept wrong while a frame is written");
        check(rd_valid == (k == len), "rd_valid before the frame is complete");
      end
      if (len == DEPTH) n_full++;
      k = 0;
      while (k < len) begin
        rd_take = 1'($urandom);
        check(rd_valid, "rd_valid dropped inside the frame");
        if (rd_take) begin
          check(rd_data == fr[k], $sformatf("frame %0d word %0d: %0h expected %0h", i, k, rd_data, fr[k]));
          k++;
        end
        @(posedge clk); #1;
        rd_take = 0;
      end
      check(!rd_valid && can_accept, "buffer not empty after the frame");
    end
    check(n_full > 10, "full frames not exercised");
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
