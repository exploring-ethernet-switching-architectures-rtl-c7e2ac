// tb_buffer_mgr: self-checking test of the shared-memory buffer manager.
//
// The buffer manager is run in a small configuration (4 ports, 8-byte cells,
// 40-byte maximum frame = 5 cells, 70 cells, 24 headers, only 6 queue
// entries) so that every drop reason is reachable in a short run. The
// testbench plays all surrounding blocks at cell level:
//   ingress   per port a producer offers the cells of its frames and holds
//             each one until in_take;
//   loop      the frame sent to egress index N is collected and returned one
//             cell per clock on lp_* with the destination mask and priority
//             written in its first cell (standing in for packet processing);
//   egress    per port a consumer takes one whole frame, then stays busy for
//             a while as the serializer would.
// Each cell carries its frame id, cell index, mask, priority and source, so
// every received frame is checked for completeness, contents, correct output
// port, no duplicates and order within (source, output, priority).
// Phases: 1 light random traffic, no drop allowed; 2 a frame with a lost
// cell, a frame whose next frame starts with a lost flag, an over-long frame
// and a filtered frame (empty mask); 3 overload with slow outputs and
// multicast, which must drop for a full memory, for the class guarantees and
// for an empty queue memory. At the end every frame must have reached all or
// none of its outputs, the frames reaching none must match the drop events,
// and every cell, header and queue entry must be free again.
// Prints TB_RESULT; a watchdog stops a hung run.
`timescale 1ns/1ps
module tb_buffer_mgr;
  localparam int N = 4, C = 8, MAXB = 40, PC = 5, NCELLS = 70, NHDRS = 24, NQ = 6;
  localparam int CB = C * 8;
  logic clk = 1, clk_fast = 1, rst = 1;
  always #10 clk = ~clk;
  always #5 clk_fast = ~clk_fast;

  logic init_done;
  logic [N-1:0] in_valid, in_first, in_last, in_lost, in_take;
  logic [CB-1:0] in_data [N];
  logic [3:0] in_nbytes [N];
  logic lp_valid, lp_first, lp_last;
  logic [CB-1:0] lp_data;
  logic [3:0] lp_nbytes;
  logic [N-1:0] lp_dst;
  logic [1:0] lp_prio;
  logic [N:0] eg_can_accept, eg_wr;
  logic [CB-1:0] eg_data;
  logic eg_first, eg_last;
  logic [3:0] eg_nbytes;
  logic [1:0] eg_src;
  logic ev_drop_full, ev_drop_guar, ev_drop_queue, ev_drop_lost, ev_drop_filter;
  logic ev_loop_first, ev_out_wait, ev_mcast_keep;
  int checks = 0, failures = 0;

  buffer_mgr #(.N_PORTS(N), .CELL_BYTES(C), .MAX_PKT_BYTES(MAXB), .N_PRIO(4),
               .N_CELLS(NCELLS), .N_HDRS(NHDRS), .N_QENT(NQ)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  // ---------------- frames ----------------
  typedef struct { logic [CB-1:0] d; bit f, l, lost; int nb; } cell_t;
  int          next_id = 1;
  int          f_mask [int], f_got [int], f_ncell [int], f_src [int], f_prio [int];
  cell_t       inq [N][$];

  function automatic logic [CB-1:0] cell_data(int id, int k, int mask, int prio, int src);
    logic [CB-1:0] d;
    d[7:0] = 8'(id); d[15:8] = 8'(id >> 8); d[23:16] = 8'(k); d[31:24] = 8'(mask);
    d[39:32] = 8'(prio); d[47:40] = 8'(src); d[55:48] = 8'(id * 3 + k); d[63:56] = 8'(id >> 16);
    return d;
  endfunction

  // queue a frame; skip >= 0 drops that cell in the ingress (the next cell
  // is flagged lost); the frame's id is returned
  function automatic int add_frame(int src, int ncell, int mask, int prio, int skip = -1);
    int id = next_id++;
    bit lost_next = 0;
    f_mask[id] = mask; f_got[id] = 0; f_ncell[id] = ncell; f_src[id] = src; f_prio[id] = prio;
    for (int k = 0; k < ncell; k++) begin
      cell_t c;
      c.d = cell_data(id, k, mask, prio, src);
      c.f = (k == 0); c.l = (k == ncell - 1); c.nb = (k == ncell - 1) ? 1 + (id % C) : C;
      c.lost = lost_next; lost_next = 0;
      if (k == skip) lost_next = 1;
      else inq[src].push_back(c);
    end
    // a lost last cell: the next cell of this port carries the flag
    if (lost_next) pend_lost[src] = 1;
    return id;
  endfunction
  bit pend_lost [N];

  // ---------------- ingress producers ----------------
  always_comb
    for (int p = 0; p < N; p++) begin
      in_valid[p] = inq[p].size() != 0 && init_done;
      in_data[p]  = (inq[p].size() != 0) ? inq[p][0].d : '0;
      in_first[p] = (inq[p].size() != 0) && inq[p][0].f;
      in_last[p]  = (inq[p].size() != 0) && inq[p][0].l;
      in_lost[p]  = (inq[p].size() != 0) && (inq[p][0].lost || pend_lost[p]);
      in_nbytes[p] = (inq[p].size() != 0) ? 4'(inq[p][0].nb) : 4'd0;
    end
  // the testbench samples at the clock edge and changes its state 1 ns later
  logic [N-1:0] tk;
  always @(posedge clk) begin
    tk = in_take & in_valid;
    #1;
    for (int p = 0; p < N; p++)
      if (tk[p]) begin
        if (inq[p].size() != 0) void'(inq[p].pop_front());
        pend_lost[p] = 0;
      end
  end

  // ---------------- loop (packet processing stand-in) ----------------
  cell_t lbuf[$];
  bit    l_busy = 0, l_sending = 0;
  int    l_idx = 0;
  assign eg_can_accept[N] = !l_busy;
  logic          lw, lf, ll;
  logic [CB-1:0] ld;
  logic [3:0]    lnb;
  logic [1:0]    lsrc;
  always @(posedge clk) if (!rst) begin
    lw = eg_wr[N]; ld = eg_data; lf = eg_first; ll = eg_last; lnb = eg_nbytes; lsrc = eg_src;
    #1;
    if (l_sending) begin
      l_idx++;
      if (l_idx == lbuf.size()) begin l_sending = 0; l_busy = 0; lbuf = {}; end
    end
    if (lw) begin
      cell_t c;
      c.d = ld; c.f = lf; c.l = ll; c.nb = int'(lnb); c.lost = 0;
      check(c.d[47:40] == 8'(lsrc), "loop: eg_src differs from the frame's source");
      lbuf.push_back(c); l_busy = 1;
      if (ll) begin l_sending = 1; l_idx = 0; end
    end
  end
  always_comb begin
    lp_valid = l_sending && l_idx < lbuf.size();
    lp_data  = lp_valid ? lbuf[l_idx].d : '0;
    lp_first = lp_valid && lbuf[l_idx].f;
    lp_last  = lp_valid && lbuf[l_idx].l;
    lp_nbytes = lp_valid ? 4'(lbuf[l_idx].nb) : 4'd0;
    lp_dst   = lp_valid ? N'(lbuf[0].d[31:24]) : '0;
    lp_prio  = lp_valid ? 2'(lbuf[0].d[33:32]) : '0;
  end

  // ---------------- egress consumers ----------------
  int  o_busy [N];
  int  o_slow = 1;
  cell_t obuf [N][$];
  int  last_id [N][N][4];
  int  n_frames_out = 0;
  for (genvar p = 0; p < N; p++) begin : g_out
    assign eg_can_accept[p] = o_busy[p] == 0;
    cell_t c;
    logic  w;
    always @(posedge clk) if (!rst) begin
      w = eg_wr[p];
      c.d = eg_data; c.f = eg_first; c.l = eg_last; c.nb = int'(eg_nbytes); c.lost = 0;
      #1;
      if (o_busy[p] > 1) o_busy[p]--;
      else if (o_busy[p] == 1 && obuf[p].size() == 0) o_busy[p] = 0;
      if (w) begin
        if (obuf[p].size() == 0) check(o_busy[p] == 0, "frame written to a busy egress buffer");
        obuf[p].push_back(c);
        o_busy[p] = 1;
        if (c.l) begin
          int id, k;
          id = int'(obuf[p][0].d[15:0]) | (int'(obuf[p][0].d[63:56]) << 16);
          n_frames_out++;
          if (!f_mask.exists(id)) check(0, $sformatf("port %0d: unknown frame", p));
          else begin
            check(obuf[p].size() == f_ncell[id], $sformatf("frame %0d: %0d cells of %0d", id, obuf[p].size(), f_ncell[id]));
            k = 0;
            foreach (obuf[p][j]) begin
              check(obuf[p][j].d == cell_data(id, j, f_mask[id], f_prio[id], f_src[id]) &&
                    obuf[p][j].f == (j == 0) && obuf[p][j].l == (j == f_ncell[id] - 1) &&
                    obuf[p][j].nb == ((j == f_ncell[id] - 1) ? 1 + (id % C) : C),
                    $sformatf("frame %0d cell %0d wrong on port %0d", id, j, p));
            end
            check(((f_mask[id] >> p) & 1) == 1, $sformatf("frame %0d on wrong port %0d", id, p));
            check(((f_got[id] >> p) & 1) == 0, $sformatf("frame %0d twice on port %0d", id, p));
            f_got[id] |= 1 << p;
            check(id > last_id[p][f_src[id]][f_prio[id]], $sformatf("frame %0d out of order", id));
            last_id[p][f_src[id]][f_prio[id]] = id;
          end
          obuf[p] = {};
          o_busy[p] = 1 + $urandom_range(0, o_slow);
        end
      end
    end
  end

  // ---------------- events ----------------
  int n_full = 0, n_guar = 0, n_queue = 0, n_lost = 0, n_filter = 0, n_lf = 0, n_wait = 0, n_mc = 0;
  always @(posedge clk) if (!rst) begin
    n_full += int'(ev_drop_full); n_guar += int'(ev_drop_guar); n_queue += int'(ev_drop_queue);
    n_lost += int'(ev_drop_lost); n_filter += int'(ev_drop_filter);
    n_lf += int'(ev_loop_first); n_wait += int'(ev_out_wait); n_mc += int'(ev_mcast_keep);
  end
  function automatic int drops();
    return n_full + n_guar + n_queue + n_lost + n_filter;
  endfunction

  task automatic wait_idle();
    int q = 0;
    while (q < 300) begin
      @(posedge clk);
      if (|eg_wr || |in_valid || lp_valid || l_busy) q = 0; else q++;
    end
    #2;
  endtask

  function automatic int rnd_mask(int src, bit multi);
    int m;
    do m = multi ? $urandom_range(1, (1 << N) - 1) : (1 << $urandom_range(0, N - 1));
    while ((m & ~(1 << src)) == 0);
    return m & ~(1 << src);
  endfunction

  int id_lost1, id_lost2, id_after, id_long, id_filt, d0;
  initial begin
    for (int a = 0; a < N; a++) begin
      o_busy[a] = 0; pend_lost[a] = 0;
      for (int b = 0; b < N; b++) for (int c = 0; c < 4; c++) last_id[a][b][c] = 0;
    end
    repeat (4) @(posedge clk);
    #1 rst = 0;
    wait (init_done);
    @(posedge clk); #2;
    // 1 light traffic
    for (int i = 0; i < 150; i++) begin
      automatic int s = $urandom_range(0, N - 1);
      void'(add_frame(s, $urandom_range(1, PC), rnd_mask(s, 0), $urandom_range(0, 3)));
      repeat (40) @(posedge clk);
      #2;
    end
    wait_idle();
    check(drops() == 0, $sformatf("light traffic: %0d drops (full %0d guar %0d queue %0d lost %0d)", drops(), n_full, n_guar, n_queue, n_lost));
    // 2 lost cells, over-long frame, filtered frame
    d0 = drops();
    id_lost1 = add_frame(0, 4, 2, 0, 1);          // middle cell lost
    wait_idle();
    id_lost2 = add_frame(1, 3, 4, 0, 2);          // last cell lost ...
    id_after = add_frame(1, 2, 4, 0);             // ... flagged on this frame's first cell
    wait_idle();
    id_long  = add_frame(2, PC + 2, 1, 0);
    id_filt  = add_frame(3, 2, 0, 0);
    wait_idle();
    check(f_got[id_lost1] == 0 && f_got[id_lost2] == 0, "frame with a lost cell delivered");
    check(f_got[id_after] == 4, "frame after a lost cell not delivered");
    check(f_got[id_long] == 0, "over-long frame delivered");
    check(n_lost - 0 == 3 && n_filter == 1, $sformatf("lost %0d filter %0d", n_lost, n_filter));
    // 3 overload with slow outputs, multicast included
    o_slow = 60;
    for (int i = 0; i < 600; i++) begin
      automatic int s = $urandom_range(0, N - 1);
      automatic int nc = (i % 3 == 0) ? 1 : $urandom_range(1, PC);
      void'(add_frame(s, nc, rnd_mask(s, i % 2 == 0), $urandom_range(0, 3)));
      if (i % 4 == 3) begin @(posedge clk); #2; end
    end
    wait_idle();
    o_slow = 1;
    // traffic after the overload must pass
    d0 = drops();
    for (int s = 0; s < N; s++) begin
      void'(add_frame(s, 3, rnd_mask(s, 1), 1));
      wait_idle();
    end
    check(drops() == d0, "frames dropped after the overload");

    // accounting
    begin
      int none = 0, partial = 0;
      foreach (f_mask[id]) begin
        if (f_got[id] == 0) none++;
        else if (f_got[id] != f_mask[id]) partial++;
      end
      check(partial == 0, $sformatf("%0d frames reached only part of their outputs", partial));
      check(none == drops(), $sformatf("%0d frames missing, %0d drop events", none, drops()));
    end
    check(dut.cf_count == NCELLS, $sformatf("cells free %0d", dut.cf_count));
    check(dut.hf_count == NHDRS, $sformatf("headers free %0d", dut.hf_count));
    check(dut.qf_count == NQ, $sformatf("queue entries free %0d", dut.qf_count));
    $display("frames out=%0d full=%0d guar=%0d queue=%0d lost=%0d filter=%0d loop_first=%0d out_wait=%0d mcast=%0d",
             n_frames_out, n_full, n_guar, n_queue, n_lost, n_filter, n_lf, n_wait, n_mc);
    check(n_full > 0, "no memory-full drop");
    check(n_guar > 0, "no guarantee drop");
    check(n_queue > 0, "no queue-memory drop");
    check(n_lf > 0 && n_wait > 0 && n_mc > 0, "loop priority, output wait or multicast not seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
