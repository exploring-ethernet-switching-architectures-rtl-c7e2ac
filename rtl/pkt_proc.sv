// pkt_proc: minimal packet processing (address lookup and priority) in the
// loop between the two passes of a frame through the buffer manager.
//
// A frame arrives one cell per clock from its egress buffer, tagged with the
// port it was received on, and every cell is returned one clock later with
// the frame's destination port mask and priority attached. The decision is
// made from the first cell, which holds the Ethernet header:
//   bytes 0..5   destination MAC, bytes 6..11 source MAC (byte 0 first on the
//                wire, most significant);
//   lookup       a content-addressable table of CAM_ENTRIES {MAC, port}
//                entries is searched with the destination MAC; a hit on
//                another port sends the frame there, a hit on the receiving
//                port filters it (empty mask, the buffer manager drops it),
//                a miss or a group address floods to every port except the
//                receiving one;
//   learning     the source MAC is written with the receiving port, updating
//                a matching entry or else replacing entries in round-robin
//                order;
//   priority     a frame carrying an IEEE 802.1Q tag (bytes 12..13 = 8100h)
//                gets the two upper bits of its PCP field as priority
//                (3 highest), any other frame priority 0.
// Learning, lookup and flooding are the basic L2 switch algorithm; the table
// size, replacement order and priority rule are this design's own choices.
// No frame modification is done. Latency is one clock; there is no stall.
module pkt_proc #(
  parameter int unsigned N_PORTS     = sw_pkg::DEF_N_PORTS,
  parameter int unsigned CELL_BYTES  = sw_pkg::DEF_CELL_BYTES,
  parameter int unsigned N_PRIO      = sw_pkg::DEF_N_PRIO,
  parameter int unsigned CAM_ENTRIES = 16,
  localparam int unsigned VB_W = $clog2(CELL_BYTES + 1),
  localparam int unsigned PW   = sw_pkg::idx_w(N_PORTS),
  localparam int unsigned PRW  = sw_pkg::idx_w(N_PRIO),
  localparam int unsigned EW   = sw_pkg::idx_w(CAM_ENTRIES)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic [CELL_BYTES*8-1:0] in_data,
  input  logic                    in_first,
  input  logic                    in_last,
  input  logic [VB_W-1:0]         in_nbytes,
  input  logic [PW-1:0]           in_src,
  output logic                    out_valid,
  output logic [CELL_BYTES*8-1:0] out_data,
  output logic                    out_first,
  output logic                    out_last,
  output logic [VB_W-1:0]         out_nbytes,
  output logic [N_PORTS-1:0]      out_dst,
  output logic [PRW-1:0]          out_prio,
  output logic                    out_flood     // decision of this frame was a flood
);

  logic [47:0]        cam_mac  [CAM_ENTRIES];
  logic [PW-1:0]      cam_port [CAM_ENTRIES];
  logic [CAM_ENTRIES-1:0] cam_vld_q;
  logic [EW-1:0]      repl_q;

  logic [47:0] dmac, smac;
  logic [15:0] etype;
  logic [2:0]  pcp;

  function automatic logic [7:0] byte_at(input logic [CELL_BYTES*8-1:0] d, input int unsigned k);
    return d[k*8 +: 8];
  endfunction

  always_comb begin
    for (int k = 0; k < 6; k++) begin
      dmac[47-8*k -: 8] = byte_at(in_data, k);
      smac[47-8*k -: 8] = byte_at(in_data, 6 + k);
    end
    etype = {byte_at(in_data, 12), byte_at(in_data, 13)};
    pcp   = byte_at(in_data, 14)[7:5];
  end

  // search
  logic          d_hit, s_hit;
  logic [PW-1:0] d_port;
  logic [EW-1:0] s_idx;
  always_comb begin
    d_hit = 1'b0; d_port = '0; s_hit = 1'b0; s_idx = '0;
    for (int e = 0; e < CAM_ENTRIES; e++) begin
      if (cam_vld_q[e] && cam_mac[e] == dmac && !d_hit) begin d_hit = 1'b1; d_port = cam_port[e]; end
      if (cam_vld_q[e] && cam_mac[e] == smac && !s_hit) begin s_hit = 1'b1; s_idx = EW'(e); end
    end
  end

  logic [N_PORTS-1:0] all_but_src, dst_new;
  logic               flood_new;
  logic [PRW-1:0]     prio_new;
  always_comb begin
    all_but_src = '1;
    all_but_src[in_src] = 1'b0;
    flood_new = dmac[40] || !d_hit;         // group address or unknown
    if (flood_new)               dst_new = all_but_src;
    else if (d_port == in_src)   dst_new = '0;
    else begin dst_new = '0; dst_new[d_port] = 1'b1; end
    prio_new = (etype == 16'h8100) ? PRW'(pcp >> (3 - PRW)) : '0;
  end

  logic [N_PORTS-1:0] dst_q;
  logic [PRW-1:0]     prio_q;
  logic               flood_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      cam_vld_q <= '0;
      repl_q    <= '0;
      out_valid <= 1'b0;
      dst_q <= '0; prio_q <= '0; flood_q <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid && in_first) begin
        dst_q <= dst_new; prio_q <= prio_new; flood_q <= flood_new;
        // learn the source address (group source addresses are not learnt)
        if (!smac[40]) begin
          if (s_hit) cam_port[s_idx] <= in_src;
          else begin
            cam_mac[repl_q]   <= smac;
            cam_port[repl_q]  <= in_src;
            cam_vld_q[repl_q] <= 1'b1;
            repl_q <= (repl_q == EW'(CAM_ENTRIES - 1)) ? '0 : repl_q + EW'(1);
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    out_data   <= in_data;
    out_first  <= in_first;
    out_last   <= in_last;
    out_nbytes <= in_nbytes;
  end

  // the decision of the first cell is presented with every cell of the frame
  assign out_dst   = dst_q;
  assign out_prio  = prio_q;
  assign out_flood = flood_q;

endmodule
