// tb_ps_ser: self-checking test of the parallel-to-serial converter.
//
// 300 frames of random length (1..1522 bytes) are cut into 61-byte cells and
// offered to the converter. In the first half the next cell is always
// available, as the one-frame egress buffer guarantees in the switch: every
// frame must then leave as one unbroken byte stream. In the second half
// cells appear after random delays, which may leave gaps. In both, the
// received bytes and first/last flags must equal the frames sent, and
// cell_take may only be given for an offered cell. Parameters are the block
// defaults. Prints TB_RESULT; a watchdog stops a hung run.
`timescale 1ns/1ps
module tb_ps_ser;
  localparam int C = 61;
  logic clk = 1, rst = 1;
  always #10 clk = ~clk;

  logic cell_valid, cell_first, cell_last, cell_take;
  logic [C*8-1:0] cell_data;
  logic [5:0] cell_nbytes;
  logic [7:0] tx_data;
  logic tx_valid, tx_first, tx_last;
  int checks = 0, failures = 0;

  ps_ser dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  byte unsigned exp_b[$];
  bit           exp_f[$], exp_l[$];
  bit           gapless = 1;
  int           n_gaps_in_frame = 0, n_bytes = 0;
  bit           in_frame = 0;

  // receiver
  always @(posedge clk) if (!rst) begin
    if (tx_valid) begin
      n_bytes++;
      if (exp_b.size() == 0) check(0, "unexpected byte");
      else begin
        byte unsigned b;
        bit f, l;
        b = exp_b.pop_front(); f = exp_f.pop_front(); l = exp_l.pop_front();
        check(tx_data == b && tx_first == f && tx_last == l,
              $sformatf("byte %0h f%0d l%0d expected %0h f%0d l%0d", tx_data, tx_first, tx_last, b, f, l));
      end
      in_frame = !tx_last;
    end else if (in_frame && gapless) begin
      n_gaps_in_frame++;
    end
  end

  initial begin
    cell_valid = 0; cell_first = 0; cell_last = 0; cell_data = '0; cell_nbytes = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 300; i++) begin
      automatic int len = (i % 7 == 0) ? 1522 : $urandom_range(1, 1522);
      automatic int ncell = (len + C - 1) / C;
      if (i == 150) gapless = 0;
      for (int c = 0; c < ncell; c++) begin
        automatic int nb = (c == ncell - 1) ? len - c * C : C;
        if (!gapless) begin
          cell_valid = 0;
          repeat ($urandom_range(0, 80)) @(posedge clk);
          #1;
        end
        cell_valid = 1; cell_first = (c == 0); cell_last = (c == ncell - 1);
        cell_nbytes = 6'(nb);
        for (int k = 0; k < C; k++) cell_data[8*k +: 8] = 8'($urandom);
        for (int k = 0; k < nb; k++) begin
          exp_b.push_back(cell_data[8*k +: 8]); exp_f.push_back(c == 0 && k == 0);
          exp_l.push_back(c == ncell - 1 && k == nb - 1);
        end
        do begin @(posedge clk); end while (!cell_take);
        #1;
      end
      cell_valid = 0;
      if ($urandom_range(0, 1) != 0) repeat ($urandom_range(1, 20)) @(posedge clk);
      #1;
    end
    repeat (2000) @(posedge clk);
    check(exp_b.size() == 0, $sformatf("%0d bytes never sent", exp_b.size()));
    check(n_gaps_in_frame == 0, $sformatf("%0d gaps inside frames with cells available", n_gaps_in_frame));
    check(n_bytes > 100000, "too few bytes");
    $display("bytes=%0d", n_bytes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cell_take only for an offered cell
  always @(posedge clk) if (!rst && cell_take) check(cell_valid, "take without a cell");

  initial begin
    #100000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
