// tb_switch_10port: end-to-end test of the ten-port configuration
// (N_PORTS = 10, CELL_BYTES = 153; every other size derived from them:
// 650 cells, 650 headers, 1300 queue entries).
//
// It runs the loss-free phases of the four-port test at ten ports:
//   1 learning   every port floods one broadcast at the same moment; each
//                copy must reach the nine other ports (90 frames).
//   2 mesh       full overlap: in round k every port sends to port k mod 10
//                (the port whose turn it is sends to the next one), lengths
//                64..764 bytes and every fifth round 1522 bytes, random
//                802.1Q priority. No frame may be dropped.
//   2b min size  every port sends 100 64-byte frames to its neighbour, one
//                every 180 cycles (42 % of line rate); nothing may be dropped.
// Then normal traffic must pass and every cell, header and queue entry must
// be free again. Frames are compared byte for byte, checked for destination,
// duplicates and order per (source, priority); flooding, loop priority,
// output waits, multicast and priority overtaking must each occur. The drop
// mechanisms are covered by the four-port test and tb_buffer_mgr.
//
// Interface and timing are those of tb_switch_top: clk 20 ns, clk_fast 10 ns,
// one byte per clock on every port, 12 idle clocks between frames, a
// watchdog ends the run. From the paper: the ten-port configuration with
// 153-byte cells. My own choices: the traffic and the pacing of the
// minimum-size frames, needed because of the per-cell cost of my buffer
// manager.
module tb_switch_10port;
  localparam int N  = 10;
  localparam int IFG = 12;

  logic clk = 1'b1, clk_fast = 1'b1, rst = 1'b1;
  always #10 clk = ~clk;
  always #5  clk_fast = ~clk_fast;

  logic [7:0] rx_data [N];
  logic [N-1:0] rx_valid, rx_first, rx_last;
  logic [7:0] tx_data [N];
  logic [N-1:0] tx_valid, tx_first, tx_last;
  logic init_done;
  logic ev_drop_full, ev_drop_guar, ev_drop_queue, ev_drop_lost, ev_drop_filter;
  logic ev_loop_first, ev_out_wait, ev_mcast_keep, ev_flood;

  switch_top #(.N_PORTS(10), .CELL_BYTES(153)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // ---------------- frames ----------------
  typedef byte unsigned frame_t[$];
  frame_t     sent   [int];        // by id
  int         exp_m  [int];        // expected destination mask
  int         got_m  [int];        // received mask
  int         f_src  [int];
  int         f_prio [int];
  longint     f_time [int];
  int         next_id = 1;
  frame_t     txq [N][$];
  int         txq_id [N][$];

  function automatic frame_t make_frame(int src, int dst_port, int len, int prio, int id);
    frame_t f;
    byte unsigned dm[6], sm[6];
    for (int k = 0; k < 6; k++) begin
      dm[k] = (dst_port < 0) ? 8'hFF : ((k == 0) ? 8'h02 : (k == 5) ? byte'(dst_port + 1) : 8'h00);
      sm[k] = (k == 0) ? 8'h02 : (k == 5) ? byte'(src + 1) : 8'h00;
    end
    for (int k = 0; k < len; k++) begin
      byte unsigned b;
      if (k < 6) b = dm[k];
      else if (k < 12) b = sm[k-6];
      else if (k == 12) b = (prio > 0) ? 8'h81 : 8'h08;
      else if (k == 13) b = 8'h00;
      else if (k == 14) b = byte'(prio << 6);
      else if (k == 15) b = 8'h01;
      else if (k < 20) b = byte'(id >> (8 * (k - 16)));
      else b = byte'(id * 7 + k * 13);
      f.push_back(b);
    end
    return f;
  endfunction

  // queue a frame; dst_port < 0 is a broadcast; mask is the expected receivers
  task automatic send(int src, int dst_port, int len, int prio, int mask);
    int id = next_id++;
    frame_t f = make_frame(src, dst_port, len, prio, id);
    sent[id] = f; exp_m[id] = mask; got_m[id] = 0; f_src[id] = src; f_prio[id] = prio;
    txq[src].push_back(f); txq_id[src].push_back(id);
  endtask

  // ---------------- drivers ----------------
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  frame_t cur_f [N];
  int     cur_k [N];
  int     gap   [N];
  always @(posedge clk) begin
    for (int p = 0; p < N; p++) begin
      rx_valid[p] <= 1'b0; rx_first[p] <= 1'b0; rx_last[p] <= 1'b0;
      if (rst || !init_done) begin
        cur_k[p] = -1; gap[p] = 0;
      end else if (cur_k[p] >= 0) begin
        rx_valid[p] <= 1'b1; rx_first[p] <= (cur_k[p] == 0);
        rx_last[p]  <= (cur_k[p] == cur_f[p].size() - 1);
        rx_data[p]  <= cur_f[p][cur_k[p]];
        cur_k[p]++;
        if (cur_k[p] == cur_f[p].size()) begin cur_k[p] = -1; gap[p] = IFG; end
      end else if (gap[p] > 0) begin
        gap[p]--;
      end else if (txq[p].size() != 0) begin
        int id;
        cur_f[p] = txq[p].pop_front();
        id = txq_id[p].pop_front();
        f_time[id] = cyc;
        rx_valid[p] <= 1'b1; rx_first[p] <= 1'b1; rx_last[p] <= (cur_f[p].size() == 1);
        rx_data[p] <= cur_f[p][0];
        cur_k[p] = (cur_f[p].size() == 1) ? -1 : 1;
      end
    end
  end

  // ---------------- receivers ----------------
  int rx_frames = 0, n_overtake = 0, n_bad = 0;
  int last_id [N][N][4];
  int last_prio [N];
  longint last_time [N];
  byte unsigned rxbuf [N][2048];
  int rxlen [N];

  for (genvar p = 0; p < N; p++) begin : g_rcv
    always @(posedge clk) begin
      if (!rst && tx_valid[p]) begin
        if (tx_first[p]) rxlen[p] = 0;
        if (rxlen[p] < 2048) rxbuf[p][rxlen[p]] = tx_data[p];
        rxlen[p]++;
        if (tx_last[p]) begin
          frame_t f;
          int id;
          f = {};
          for (int k = 0; k < rxlen[p] && k < 2048; k++) f.push_back(rxbuf[p][k]);
          id = (f.size() >= 20) ? int'({f[19], f[18], f[17], f[16]}) : -1;
          rx_frames++;
          if (!sent.exists(id)) begin
            check(0, $sformatf("port %0d got unknown frame (len %0d)", p, f.size()));
          end else begin
            if (f != sent[id] && failures < 3) begin
              $display("got len %0d exp len %0d", f.size(), sent[id].size());
              for (int k = 0; k < 70 && k < f.size(); k++) $write("%02x%s", f[k], (k < sent[id].size() && f[k]==sent[id][k]) ? " " : "*");
              $display("");
            end
            check(f == sent[id], $sformatf("frame %0d corrupted on port %0d", id, p));
            check(((exp_m[id] >> p) & 1) == 1, $sformatf("frame %0d not expected on port %0d", id, p));
            check(((got_m[id] >> p) & 1) == 0, $sformatf("frame %0d twice on port %0d", id, p));
            got_m[id] |= (1 << p);
            check(id > last_id[p][f_src[id]][f_prio[id]],
                  $sformatf("frame %0d out of order on port %0d", id, p));
            last_id[p][f_src[id]][f_prio[id]] = id;
            if (f_prio[id] > last_prio[p] && f_time[id] > last_time[p]) n_overtake++;
            last_prio[p] = f_prio[id]; last_time[p] = f_time[id];
          end
        end
      end
    end
  end

  // ---------------- event counters ----------------
  int n_full = 0, n_guar = 0, n_queue = 0, n_lost = 0, n_filter = 0;
  int n_loopfirst = 0, n_wait = 0, n_mcast = 0, n_flood = 0, n_stall_in = 0;
  always @(posedge clk) if (!rst) begin
    n_full += int'(ev_drop_full); n_guar += int'(ev_drop_guar); n_queue += int'(ev_drop_queue);
    n_lost += int'(ev_drop_lost); n_filter += int'(ev_drop_filter);
    n_loopfirst += int'(ev_loop_first); n_wait += int'(ev_out_wait);
    n_mcast += int'(ev_mcast_keep); n_flood += int'(ev_flood);
    // a port cell waited in its ingress buffer for the buffer manager
    n_stall_in += int'(|(dut.ib_valid & ~dut.ib_take));
  end

  function automatic int drops();
    return n_full + n_guar + n_queue + n_lost + n_filter;
  endfunction

  function automatic bit txq_busy();
    for (int p = 0; p < N; p++) if (txq[p].size() != 0) return 1;
    return 0;
  endfunction

  task automatic wait_idle(int quiet);
    int q = 0;
    while (q < quiet) begin
      @(posedge clk);
      if (|tx_valid || |rx_valid || txq_busy()) q = 0;
      else q++;
    end
  endtask

  function automatic int all_but(int p);
    return ((1 << N) - 1) & ~(1 << p);
  endfunction

  // ---------------- stimulus ----------------
  int mesh_first, mesh_last, d0;
  longint t_mesh0, t_mesh1;
  initial begin
    for (int a = 0; a < N; a++) begin
      last_prio[a] = 0; last_time[a] = 0;
      for (int b = 0; b < N; b++) for (int c = 0; c < 4; c++) last_id[a][b][c] = 0;
    end
    repeat (5) @(posedge clk);
    rst <= 0;
    wait (init_done);
    @(posedge clk);

    // 1 learning
    for (int p = 0; p < N; p++) send(p, -1, 64, 0, all_but(p));
    wait_idle(2000);
    check(rx_frames == N * (N - 1), $sformatf("learning: %0d frames received (drops f%0d g%0d l%0d fi%0d)", rx_frames, n_full, n_guar, n_lost, n_filter));

    // 2 mesh
    mesh_first = next_id; d0 = drops(); t_mesh0 = cyc;
    for (int k = 0; k < 40; k++) begin
      for (int p = 0; p < N; p++) begin
        automatic int d = k % N;
        automatic int len = (k % 5 == 4) ? 1522 : 64 + $urandom_range(0, 700);
        automatic int pr = $urandom_range(0, 3);
        if (d == p) d = (d + 1) % N;
        send(p, d, len, pr, 1 << d);
      end
    end
    mesh_last = next_id - 1;
    wait_idle(3000);
    t_mesh1 = cyc;
    check(drops() == d0, $sformatf("mesh: %0d frames dropped", drops() - d0));
    for (int id = mesh_first; id <= mesh_last; id++)
      check(got_m[id] == exp_m[id], $sformatf("mesh frame %0d: mask %0h of %0h", id, got_m[id], exp_m[id]));
    $display("mesh: %0d frames in %0d cycles", mesh_last - mesh_first + 1, t_mesh1 - t_mesh0);

    // 2b minimum frames at half line rate: every port sends a 64-byte frame
    // to its neighbour every 180 cycles; nothing may drop. Full line rate
    // (one frame per 76 cycles on all ten ports) is beyond the buffer
    // manager, which needs about 14 cycles per single-cell frame.
    d0 = drops(); mesh_first = next_id; t_mesh0 = cyc;
    for (int k = 0; k < 100; k++) begin
      for (int p = 0; p < N; p++) send(p, (p + 1) % N, 64, k % 4, 1 << ((p + 1) % N));
      repeat (180) @(posedge clk);
    end
    mesh_last = next_id - 1;
    wait_idle(2000);
    check(drops() == d0, $sformatf("min size: %0d frames dropped", drops() - d0));
    for (int id = mesh_first; id <= mesh_last; id++)
      check(got_m[id] == exp_m[id], $sformatf("min-size frame %0d missing", id));
    $display("min size: %0d frames of 64 bytes in %0d cycles", mesh_last - mesh_first + 1, cyc - t_mesh0 - 2000);

    // after all of it the switch must still forward normally
    for (int p = 0; p < N; p++) send(p, (p + 1) % N, 200, 1, 1 << ((p + 1) % N));
    wait_idle(3000);
    for (int id = next_id - N; id < next_id; id++)
      check(got_m[id] == exp_m[id], $sformatf("final frame %0d: mask %0h", id, got_m[id]));
    // memory fully returned: every cell, header and queue entry free again
    check(int'(dut.u_bm.cf_count) == int'(dut.u_bm.N_CELLS), $sformatf("cells free %0d", dut.u_bm.cf_count));
    check(int'(dut.u_bm.hf_count) == int'(dut.u_bm.N_HDRS), $sformatf("headers free %0d", dut.u_bm.hf_count));
    check(int'(dut.u_bm.qf_count) == int'(dut.u_bm.N_QENT), $sformatf("queue entries free %0d", dut.u_bm.qf_count));

    $display("events: flood=%0d filter=%0d full=%0d guar=%0d queue=%0d lost=%0d loop_first=%0d out_wait=%0d mcast=%0d overtake=%0d in_stall=%0d frames=%0d",
             n_flood, n_filter, n_full, n_guar, n_queue, n_lost, n_loopfirst, n_wait, n_mcast,
             n_overtake, n_stall_in, rx_frames);
    check(n_flood > 0, "flood never happened");
    check(n_loopfirst > 0, "loop priority never happened");
    check(n_wait > 0, "output wait never happened");
    check(n_mcast > 0, "multicast retention never happened");
    check(n_overtake > 0, "strict priority never overtook");
    check(drops() == 0, $sformatf("%0d frames dropped", drops()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
