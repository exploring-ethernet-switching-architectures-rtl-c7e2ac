// switch_top: area-efficient low-end Layer-2 Ethernet switch.
//
// Every port receives and sends one byte per core clock (8-bit bus, 12.5 MHz
// in the reference configuration, 100 Mbit/s per port). A frame travels:
//   rx bytes -> sp_deser (bytes to CELL_BYTES cells) -> ingress_buf (one
//   cell) -> buffer_mgr (shared memory, first pass) -> egress_buf of the loop
//   -> pkt_proc (MAC lookup/learning, priority) -> buffer_mgr (second pass,
//   queued per destination and priority) -> egress_buf of the port (one
//   whole frame) -> ps_ser (cells to bytes) -> tx bytes.
// The buffer manager keeps both passes in one memory, so the loop through
// packet processing is just one more input and output of it. clk_fast must
// run at twice clk with rising edges aligned to clk's; it clocks the link
// memories. rst is synchronous to clk. After reset the buffer manager
// initialises its free lists (init_done); bytes received before that are
// lost. rx_first/rx_last mark a frame's first and last byte; a frame must be
// at least 2 bytes and at most MAX_PKT_BYTES bytes long. The ev_* outputs
// pulse for one clock on each drop and on the other events of the buffer
// manager (see buffer_mgr).
// Timing: a frame is forwarded store-and-forward twice over (it must be
// complete in the buffer manager before it goes to packet processing, and
// complete in the egress buffer before the first byte leaves), so the first
// byte leaves a few cells' time after the last byte came in. A finished cell waits in sp_deser while
// the ingress buffer is full, which absorbs the short last cell of a frame.
// The structure follows the architecture; pkt_proc is a minimal stand-in for
// full packet processing, as in the architecture's own evaluation. The
// sp_deser hand-shake and the event outputs are this design's own.
module switch_top
  import sw_pkg::*;
#(
  parameter int unsigned N_PORTS       = DEF_N_PORTS,
  parameter int unsigned CELL_BYTES    = DEF_CELL_BYTES,
  parameter int unsigned MAX_PKT_BYTES = DEF_MAX_PKT_BYTES,
  parameter int unsigned N_PRIO        = DEF_N_PRIO,
  parameter int unsigned N_CELLS       = cell_mem_depth(N_PORTS, MAX_PKT_BYTES, CELL_BYTES),
  localparam int unsigned PRW = idx_w(N_PRIO)
) (
  input  logic               clk,
  input  logic               clk_fast,
  input  logic               rst,
  output logic               init_done,
  input  logic [7:0]         rx_data  [N_PORTS],
  input  logic [N_PORTS-1:0] rx_valid,
  input  logic [N_PORTS-1:0] rx_first,
  input  logic [N_PORTS-1:0] rx_last,
  output logic [7:0]         tx_data  [N_PORTS],
  output logic [N_PORTS-1:0] tx_valid,
  output logic [N_PORTS-1:0] tx_first,
  output logic [N_PORTS-1:0] tx_last,
  output logic               ev_drop_full,
  output logic               ev_drop_guar,
  output logic               ev_drop_queue,
  output logic               ev_drop_lost,
  output logic               ev_drop_filter,
  output logic               ev_loop_first,
  output logic               ev_out_wait,
  output logic               ev_mcast_keep,
  output logic               ev_flood       // a frame left packet processing as a flood
);

  localparam int unsigned PC   = max_pkt_cells(MAX_PKT_BYTES, CELL_BYTES);
  localparam int unsigned CB   = CELL_BYTES * 8;
  localparam int unsigned VB_W = $clog2(CELL_BYTES + 1);
  localparam int unsigned PW   = idx_w(N_PORTS);
  localparam int unsigned EW   = CB + 2 + VB_W + PW;   // egress word

  // the cell size must satisfy Eq. 3.2, or port cells can be overwritten in
  // their one-cell ingress buffers while a loop frame is being written
  if (!cell_timing_ok(N_PORTS, MAX_PKT_BYTES, CELL_BYTES)) begin : g_bad_cell_size
    $error("CELL_BYTES too small for N_PORTS (Eq. 3.2)");
  end

  typedef struct packed {
    logic [CB-1:0]   data;
    logic            first;
    logic            last;
    logic [VB_W-1:0] nbytes;
    logic [PW-1:0]   src;
  } eg_word_t;

  // serial to parallel and ingress buffers
  logic [N_PORTS-1:0] sp_valid, sp_first, sp_last, sp_lost, sp_ready;
  logic [CB-1:0]      sp_data   [N_PORTS];
  logic [VB_W-1:0]    sp_nbytes [N_PORTS];
  logic [N_PORTS-1:0] ib_valid, ib_first, ib_last, ib_lost, ib_take;
  logic [CB-1:0]      ib_data   [N_PORTS];
  logic [VB_W-1:0]    ib_nbytes [N_PORTS];

  for (genvar p = 0; p < N_PORTS; p++) begin : g_in
    sp_deser #(.CELL_BYTES(CELL_BYTES)) u_sp (
      .clk, .rst, .in_data(rx_data[p]), .in_valid(rx_valid[p]), .in_first(rx_first[p]),
      .in_last(rx_last[p]), .out_valid(sp_valid[p]), .out_data(sp_data[p]),
      .out_first(sp_first[p]), .out_last(sp_last[p]), .out_nbytes(sp_nbytes[p]),
      .out_lost(sp_lost[p]), .out_ready(sp_ready[p]));
    ingress_buf #(.CELL_BYTES(CELL_BYTES)) u_ib (
      .clk, .rst, .in_valid(sp_valid[p]), .in_data(sp_data[p]), .in_first(sp_first[p]),
      .in_last(sp_last[p]), .in_nbytes(sp_nbytes[p]), .in_lost(sp_lost[p]),
      .in_ready(sp_ready[p]), .out_valid(ib_valid[p]),
      .out_data(ib_data[p]), .out_first(ib_first[p]), .out_last(ib_last[p]),
      .out_nbytes(ib_nbytes[p]), .out_lost(ib_lost[p]), .in_take(ib_take[p]));
  end

  // buffer manager
  logic               lp_valid, lp_first, lp_last;
  logic [CB-1:0]      lp_data;
  logic [VB_W-1:0]    lp_nbytes;
  logic [N_PORTS-1:0] lp_dst;
  logic [PRW-1:0]     lp_prio;
  logic [N_PORTS:0]   eg_can_accept, eg_wr;
  eg_word_t           eg_w;

  buffer_mgr #(.N_PORTS(N_PORTS), .CELL_BYTES(CELL_BYTES), .MAX_PKT_BYTES(MAX_PKT_BYTES),
               .N_PRIO(N_PRIO), .N_CELLS(N_CELLS)) u_bm (
    .clk, .clk_fast, .rst, .init_done,
    .in_valid(ib_valid), .in_data(ib_data), .in_first(ib_first), .in_last(ib_last),
    .in_nbytes(ib_nbytes), .in_lost(ib_lost), .in_take(ib_take),
    .lp_valid, .lp_data, .lp_first, .lp_last, .lp_nbytes, .lp_dst, .lp_prio,
    .eg_can_accept, .eg_wr, .eg_data(eg_w.data), .eg_first(eg_w.first), .eg_last(eg_w.last),
    .eg_nbytes(eg_w.nbytes), .eg_src(eg_w.src),
    .ev_drop_full, .ev_drop_guar, .ev_drop_queue, .ev_drop_lost, .ev_drop_filter,
    .ev_loop_first, .ev_out_wait, .ev_mcast_keep);

  // egress buffers; index N_PORTS feeds packet processing
  eg_word_t           eb_rd   [N_PORTS+1];
  logic [N_PORTS:0]   eb_valid, eb_take;

  for (genvar o = 0; o <= N_PORTS; o++) begin : g_eg
    egress_buf #(.DEPTH(PC), .WIDTH(EW)) u_eb (
      .clk, .rst, .can_accept(eg_can_accept[o]), .wr_en(eg_wr[o]), .wr_data(eg_w),
      .wr_last(eg_w.last), .rd_valid(eb_valid[o]), .rd_data(eb_rd[o]), .rd_take(eb_take[o]));
  end

  // packet processing takes a whole frame on consecutive clocks
  assign eb_take[N_PORTS] = eb_valid[N_PORTS];
  logic pp_flood;
  pkt_proc #(.N_PORTS(N_PORTS), .CELL_BYTES(CELL_BYTES), .N_PRIO(N_PRIO)) u_pp (
    .clk, .rst, .in_valid(eb_valid[N_PORTS]), .in_data(eb_rd[N_PORTS].data),
    .in_first(eb_rd[N_PORTS].first), .in_last(eb_rd[N_PORTS].last),
    .in_nbytes(eb_rd[N_PORTS].nbytes), .in_src(eb_rd[N_PORTS].src),
    .out_valid(lp_valid), .out_data(lp_data), .out_first(lp_first), .out_last(lp_last),
    .out_nbytes(lp_nbytes), .out_dst(lp_dst), .out_prio(lp_prio), .out_flood(pp_flood));
  assign ev_flood = lp_valid && lp_first && pp_flood;

  // parallel to serial
  for (genvar p = 0; p < N_PORTS; p++) begin : g_out
    ps_ser #(.CELL_BYTES(CELL_BYTES)) u_ps (
      .clk, .rst, .cell_valid(eb_valid[p]), .cell_data(eb_rd[p].data),
      .cell_first(eb_rd[p].first), .cell_last(eb_rd[p].last), .cell_nbytes(eb_rd[p].nbytes),
      .cell_take(eb_take[p]), .tx_data(tx_data[p]), .tx_valid(tx_valid[p]),
      .tx_first(tx_first[p]), .tx_last(tx_last[p]));
  end

endmodule
