// tb_sw_pkg: self-checking test of the sizing functions in sw_pkg.
//
// The functions that size the switch are compared with numbers worked out
// by hand from the sizing rules: the cells of a maximum frame, the cell
// memory depth (one maximum frame per port in the loop and (N+1)N/2 frames'
// worth for the outputs, Eq. 3.4), the header memory depth (a minimum frame
// per header, Eq. 3.6) and the cell-size condition of Eq. 3.2, whose
// smallest valid cell is 42 bytes for 4 ports (the text quotes 41, one less
// than the equation gives: 4 + ceil(1522/41) = 42 > 41) and 45 bytes for 10.
// A sweep over cell sizes 8..200 and 2..16 ports checks the condition
// against a direct count of cell-fill time. Prints TB_RESULT; the watchdog
// only guards the form.
`timescale 1ns/1ps
module tb_sw_pkg;
  import sw_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  function automatic int min_cell(int n);
    for (int c = 1; c < 2000; c++) if (cell_timing_ok(n, 1522, c)) return c;
    return -1;
  endfunction

  initial begin
    check(max_pkt_cells(1522, 61) == 25, "cells of a 1522-byte frame at 61 bytes");
    check(max_pkt_cells(1522, 153) == 10, "cells of a 1522-byte frame at 153 bytes");
    check(max_pkt_cells(64, 61) == 2, "cells of a minimum frame");
    check(cell_mem_depth(4, 1522, 61) == 350, "cell memory, 4 ports");
    check(cell_mem_depth(10, 1522, 153) == 650, "cell memory, 10 ports");
    check(hdr_mem_depth(350, 61) == 175, "header memory, 4 ports");
    check(hdr_mem_depth(650, 153) == 650, "header memory, 10 ports");
    check(min_cell(4) == 42, $sformatf("smallest cell for 4 ports %0d", min_cell(4)));
    check(min_cell(10) == 45, $sformatf("smallest cell for 10 ports %0d", min_cell(10)));
    check(cell_timing_ok(DEF_N_PORTS, DEF_MAX_PKT_BYTES, DEF_CELL_BYTES), "defaults violate Eq. 3.2");
    for (int n = 2; n <= 16; n++)
      for (int c = 8; c <= 200; c++)
        check(cell_timing_ok(n, 1522, c) == (n + (1522 + c - 1) / c <= c), "Eq. 3.2 sweep");
    check(idx_w(1) == 1 && idx_w(2) == 1 && idx_w(3) == 2 && idx_w(350) == 9 && idx_w(512) == 9,
          "index widths");
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
