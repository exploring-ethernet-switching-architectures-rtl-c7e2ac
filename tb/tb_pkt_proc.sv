// tb_pkt_proc: self-checking test of the packet processing block.
//
// 3000 frames of 1..4 cells are sent back to back, one cell per clock as the
// loop egress buffer delivers them. Source and destination MACs come from a
// pool of 24 hosts (more than the 16 table entries, so entries are replaced),
// hosts sometimes move to another port, and some frames go to broadcast or
// multicast addresses or carry an 802.1Q tag with a random PCP. A reference
// model of the table (same learning and round-robin replacement rules)
// predicts the destination mask, flood flag and priority of every frame.
// Every output cell must equal the input cell of the previous clock, with the
// predicted decision. Coverage counters require hits, misses, floods,
// filtering, replacements and tagged frames. Parameters are the block
// defaults. Prints TB_RESULT; a watchdog stops a hung run.
`timescale 1ns/1ps
module tb_pkt_proc;
  localparam int N = 4, C = 61, E = 16, HOSTS = 24;
  logic clk = 1, rst = 1;
  always #10 clk = ~clk;

  logic in_valid, in_first, in_last, out_valid, out_first, out_last, out_flood;
  logic [C*8-1:0] in_data, out_data;
  logic [5:0] in_nbytes, out_nbytes;
  logic [1:0] in_src, out_prio;
  logic [N-1:0] out_dst;
  int checks = 0, failures = 0;

  pkt_proc dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  // reference table
  logic [47:0] m_mac [E];
  int          m_port [E];
  bit          m_vld [E];
  int          m_repl = 0;
  int          host_port [HOSTS];

  function automatic logic [47:0] host_mac(int h);
    return {8'h02, 8'h00, 8'h5e, 8'h00, 8'h10, 8'(h)};
  endfunction

  // previous-cycle input, to compare with the output
  logic [C*8-1:0] p_data; logic p_valid = 0, p_first, p_last; logic [5:0] p_nb;
  logic [N-1:0] e_dst, c_dst; logic [1:0] e_prio, c_prio; logic e_flood, c_flood;
  int n_hit = 0, n_miss = 0, n_bcast = 0, n_filter = 0, n_repl = 0, n_tag = 0, n_cells = 0;

  // sampled mid-cycle: the outputs then show the cell driven one clock earlier
  always @(negedge clk) if (!rst) begin
    if (p_valid) begin
      n_cells++;
      check(out_valid, "cell missing at the output");
      check(out_data == p_data && out_first == p_first && out_last == p_last && out_nbytes == p_nb,
            "cell changed");
      check(out_dst == e_dst && out_flood == e_flood && out_prio == e_prio,
            $sformatf("decision dst %b flood %0d prio %0d expected %b %0d %0d",
                      out_dst, out_flood, out_prio, e_dst, e_flood, e_prio));
    end else check(!out_valid, "output without input");
  end

  initial begin
    in_valid = 0; in_first = 0; in_last = 0; in_data = '0; in_nbytes = 0; in_src = 0;
    for (int h = 0; h < HOSTS; h++) host_port[h] = h % N;
    for (int e = 0; e < E; e++) m_vld[e] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 3000; i++) begin
      automatic int s = $urandom_range(0, HOSTS - 1);
      automatic int d = $urandom_range(0, HOSTS - 1);
      automatic int kind = $urandom_range(0, 19);
      automatic int ncell = $urandom_range(1, 4);
      automatic int pcp = $urandom_range(0, 7);
      automatic bit tag = $urandom_range(0, 2) == 0;
      automatic logic [47:0] dm, sm;
      automatic int src, hit_e, s_e;
      automatic logic [N-1:0] dst;
      automatic bit flood;
      if (kind == 0) host_port[s] = $urandom_range(0, N - 1);     // host moved
      src = host_port[s];
      sm = host_mac(s);
      dm = (kind == 1) ? 48'hffffffffffff : (kind == 2) ? 48'h01005e000001 : host_mac(d);
      // reference decision (before learning this frame)
      hit_e = -1; s_e = -1;
      for (int e = 0; e < E; e++) begin
        if (m_vld[e] && m_mac[e] == dm && hit_e < 0) hit_e = e;
        if (m_vld[e] && m_mac[e] == sm && s_e < 0) s_e = e;
      end
      flood = dm[40] || hit_e < 0;
      if (flood) dst = {N{1'b1}} & ~(N'(1) << src);
      else if (m_port[hit_e] == src) dst = '0;
      else dst = N'(1) << m_port[hit_e];
      if (dm[40]) n_bcast++; else if (hit_e < 0) n_miss++; else n_hit++;
      if (!flood && dst == '0) n_filter++;
      c_dst = dst; c_flood = flood; c_prio = tag ? 2'(pcp >> 1) : 2'd0;
      if (tag) n_tag++;
      // reference learning
      if (s_e >= 0) m_port[s_e] = src;
      else begin
        if (m_vld[m_repl]) n_repl++;
        m_mac[m_repl] = sm; m_port[m_repl] = src; m_vld[m_repl] = 1;
        m_repl = (m_repl + 1) % E;
      end
      // drive the cells back to back
      for (int c = 0; c < ncell; c++) begin
        for (int k = 0; k < C; k++) in_data[8*k +: 8] = 8'($urandom);
        if (c == 0) begin
          for (int k = 0; k < 6; k++) begin
            in_data[8*k +: 8] = dm[47-8*k -: 8];
            in_data[8*(6+k) +: 8] = sm[47-8*k -: 8];
          end
          in_data[8*12 +: 8] = tag ? 8'h81 : 8'h08;
          in_data[8*13 +: 8] = 8'h00;
          in_data[8*14 +: 8] = {3'(pcp), 5'(0)};
        end
        in_valid = 1; in_first = (c == 0); in_last = (c == ncell - 1); in_src = 2'(src);
        in_nbytes = 6'((c == ncell - 1) ? $urandom_range(1, C) : C);
        @(posedge clk);
        p_valid = 1; p_data = in_data; p_first = in_first; p_last = in_last; p_nb = in_nbytes;
        e_dst = c_dst; e_flood = c_flood; e_prio = c_prio;
        #1;
      end
      if ($urandom_range(0, 3) == 0) begin
        in_valid = 0;
        @(posedge clk); p_valid = 0; #1;
      end
    end
    in_valid = 0;
    @(posedge clk); p_valid = 0;
    repeat (3) @(posedge clk);
    check(n_hit > 300 && n_miss > 100 && n_bcast > 100 && n_filter > 50 && n_repl > 50 && n_tag > 300,
          "coverage");
    $display("cells=%0d hit=%0d miss=%0d group=%0d filter=%0d replaced=%0d tagged=%0d",
             n_cells, n_hit, n_miss, n_bcast, n_filter, n_repl, n_tag);
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
