// buffer_mgr: shared-memory, linked-list buffer manager of the switch.
//
// One physical memory holds both the ingress cell buffer (frames waiting for
// the packet-processing loop) and the egress cell buffer (frames waiting for
// their output ports). Every frame passes through twice: it is written from
// its ingress port, read out to the packet-processing loop (target N_PORTS),
// written again when it comes back with its destination mask and priority,
// and finally read out to each destination port. The loop is handled like
// one more input and one more output, so the same write and read logic serves
// both passes.
//
// Memories (all entries linked through link memories that also hold the
// free lists, see free_list and link_mem_2x):
//   cell data   N_CELLS x CELL_BYTES bytes      cell link   N_CELLS pointers
//   header      N_HDRS headers (hdr_t)          header link N_HDRS pointers
//   queue data  N_QENT header addresses         queue link  N_QENT pointers
// The header link memory also chains the frames waiting for the loop (one
// FIFO); the queue memories hold N_PORTS x N_PRIO output queues, which lets a
// flooded frame sit in several queues while its cells are stored once.
//
// Input side, one cell per clock. A cell from the loop is taken whenever it
// is offered, because the loop cannot be stalled; otherwise the ingress
// buffers are served round robin (in_take). Frames from different sources
// arrive interleaved: each source has its own open frame (header address,
// first and last cell, cell count). A first cell allocates a header and a
// cell; each further cell allocates a cell and links it behind the previous
// one; the last cell writes the header and queues the frame (to the loop, or
// to every destination queue of its priority). A frame is dropped, its
// stored cells freed with one free-list append and its remaining cells
// ignored, when
//   - no cell or no header is free (ev_drop_full),
//   - its class limit is reached (ev_drop_guar): ingress frames may use at
//     most CBI_RESERVE cells, egress frames the rest; among egress frames
//     each output is guaranteed GUAR cells and beyond that they share what
//     is left,
//   - the queue memory cannot take its entries (ev_drop_queue),
//   - a cell of it was lost in an ingress buffer or it is longer than the
//     maximum frame (ev_drop_lost),
//   - the loop gave it no destination (ev_drop_filter).
// Ingress frames are never dropped for lack of space caused by egress
// traffic, because the two classes cannot use each other's cells.
//
// Output side, one frame at a time. The loop is served first when its
// egress buffer is empty and a frame waits; otherwise the output ports whose
// egress buffers are empty are served round robin, and for a port the
// highest non-empty priority queue (strict priority, N_PRIO-1 highest). The
// frame's header is read and its cells are copied into the egress buffer, one
// per clock while the cell link memory's port B is not taken by the input
// side. After the last cell the queue entry is freed and the port is removed
// from the header's destination mask; when the mask is empty, or after the
// loop pass, the cells and the header are freed.
//
// Port use per core clock: cell link A = cell free list, B = links of frames
// (input writes, output reads; input first); header link A = header free
// list, B = loop FIFO; queue link A = queue free list, B = output queues.
// The input side always wins a conflict, the output side and the freeing of
// memory wait. All link memories run on clk_fast (twice clk, edges aligned).
//
// The architecture gives the memories, the two passes, the header fields,
// the free lists in the link memories, the one-cell-per-clock input with
// priority for the loop, the drop reasons and the strict priority queues.
// The exact admission rule, the freeing queues, the per-output guarantee
// size, the order of the output scheduler and the cell count kept in the
// header are this design's choices.
module buffer_mgr
  import sw_pkg::*;
#(
  parameter int unsigned N_PORTS       = DEF_N_PORTS,
  parameter int unsigned CELL_BYTES    = DEF_CELL_BYTES,
  parameter int unsigned MAX_PKT_BYTES = DEF_MAX_PKT_BYTES,
  parameter int unsigned N_PRIO        = DEF_N_PRIO,
  parameter int unsigned N_CELLS       = cell_mem_depth(N_PORTS, MAX_PKT_BYTES, CELL_BYTES),
  parameter int unsigned N_HDRS        = hdr_mem_depth(N_CELLS, CELL_BYTES),
  parameter int unsigned N_QENT        = 2 * N_HDRS,
  parameter int unsigned CBI_RESERVE   = N_PORTS * max_pkt_cells(MAX_PKT_BYTES, CELL_BYTES),
  parameter int unsigned GUAR          = max_pkt_cells(MAX_PKT_BYTES, CELL_BYTES),
  localparam int unsigned PC   = max_pkt_cells(MAX_PKT_BYTES, CELL_BYTES),
  localparam int unsigned NS   = N_PORTS + 1,
  localparam int unsigned LP   = N_PORTS,
  localparam int unsigned CB   = CELL_BYTES * 8,
  localparam int unsigned VB_W = $clog2(CELL_BYTES + 1),
  localparam int unsigned PW   = idx_w(N_PORTS),
  localparam int unsigned SW   = idx_w(NS),
  localparam int unsigned PRW  = idx_w(N_PRIO)
) (
  input  logic                 clk,
  input  logic                 clk_fast,
  input  logic                 rst,
  output logic                 init_done,
  // ingress buffers
  input  logic [N_PORTS-1:0]   in_valid,
  input  logic [CB-1:0]        in_data   [N_PORTS],
  input  logic [N_PORTS-1:0]   in_first,
  input  logic [N_PORTS-1:0]   in_last,
  input  logic [VB_W-1:0]      in_nbytes [N_PORTS],
  input  logic [N_PORTS-1:0]   in_lost,
  output logic [N_PORTS-1:0]   in_take,
  // return of the packet-processing loop (one cell per clock, no stall)
  input  logic                 lp_valid,
  input  logic [CB-1:0]        lp_data,
  input  logic                 lp_first,
  input  logic                 lp_last,
  input  logic [VB_W-1:0]      lp_nbytes,
  input  logic [N_PORTS-1:0]   lp_dst,
  input  logic [PRW-1:0]       lp_prio,
  // egress buffers: index N_PORTS is the packet-processing loop
  input  logic [N_PORTS:0]     eg_can_accept,
  output logic [N_PORTS:0]     eg_wr,
  output logic [CB-1:0]        eg_data,
  output logic                 eg_first,
  output logic                 eg_last,
  output logic [VB_W-1:0]      eg_nbytes,
  output logic [PW-1:0]        eg_src,
  // events, one-clock pulses
  output logic                 ev_drop_full,
  output logic                 ev_drop_guar,
  output logic                 ev_drop_queue,
  output logic                 ev_drop_lost,
  output logic                 ev_drop_filter,
  output logic                 ev_loop_first,  // a waiting port cell yielded to the loop
  output logic                 ev_out_wait,    // output side waited for a memory port
  output logic                 ev_mcast_keep   // a frame stays stored for further outputs
);

  localparam int unsigned CAW = idx_w(N_CELLS);
  localparam int unsigned HAW = idx_w(N_HDRS);
  localparam int unsigned QAW = idx_w(N_QENT);
  localparam int unsigned CCW = $clog2(N_CELLS + 1);
  localparam int unsigned HCW = $clog2(N_HDRS + 1);
  localparam int unsigned QCW = $clog2(N_QENT + 1);
  localparam int unsigned NCW = $clog2(PC + 1);
  localparam int unsigned NQ  = N_PORTS * N_PRIO;
  localparam int unsigned CBE_CELLS = N_CELLS - CBI_RESERVE;
  localparam int unsigned SHARED    = CBE_CELLS - N_PORTS * GUAR;
  localparam int unsigned FD  = 16;   // depth of the freeing queues
  localparam int unsigned FDW = $clog2(FD);
  // depth of the enqueue job queue: a power of two, at least N_PORTS so
  // that one broadcast from every port fits
  localparam int unsigned JD  = (N_PORTS <= 4) ? 4 : (1 << $clog2(N_PORTS));
  localparam int unsigned JDW = $clog2(JD);

  // header: the seven fields of a stored frame
  typedef struct packed {
    logic [N_PORTS-1:0] dst;     // destination ports still to be served
    logic [SW-1:0]      src;     // source (N_PORTS = the loop)
    logic [VB_W-1:0]    vbytes;  // valid bytes of the last cell
    logic [CAW-1:0]     last;    // last cell
    logic [CAW-1:0]     first;   // first cell
    logic               ready;   // all cells stored
    logic [PRW-1:0]     prio;
    logic [NCW-1:0]     ncells;
  } hdr_t;
  localparam int unsigned HW = $bits(hdr_t);

  typedef struct packed {
    logic [CAW-1:0] first;
    logic [CAW-1:0] last;
    logic [NCW-1:0] n;
    logic [HAW-1:0] hdr;
  } free_job_t;

  // selected input cell
  logic               sel_valid, sel_is_lp;
  logic [SW-1:0]      sel;
  logic [CB-1:0]      sel_data;
  logic               sel_first, sel_last, sel_lost;
  logic [VB_W-1:0]    sel_nb;
  logic [N_PORTS-1:0] sel_dst;
  logic [PRW-1:0]     sel_prio;

  // ------------------------------------------------------------------
  // memories
  // ------------------------------------------------------------------
  logic           cm_we, cm_re;
  logic [CAW-1:0] cm_waddr, cm_raddr;
  logic [CB-1:0]  cm_rdata;
  sdp_ram #(.DEPTH(N_CELLS), .WIDTH(CB)) u_cell_mem (
    .clk, .we(cm_we), .waddr(cm_waddr), .wdata(sel_data), .re(cm_re), .raddr(cm_raddr), .rdata(cm_rdata));

  logic           hm_we, hm_re;
  logic [HAW-1:0] hm_waddr, hm_raddr;
  hdr_t           hm_wdata, hm_rdata;
  sdp_ram #(.DEPTH(N_HDRS), .WIDTH(HW)) u_hdr_mem (
    .clk, .we(hm_we), .waddr(hm_waddr), .wdata(hm_wdata), .re(hm_re), .raddr(hm_raddr), .rdata(hm_rdata));

  logic           qm_we, qm_re;
  logic [QAW-1:0] qm_waddr, qm_raddr;
  logic [HAW-1:0] qm_wdata, qm_rdata;
  sdp_ram #(.DEPTH(N_QENT), .WIDTH(HAW)) u_queue_mem (
    .clk, .we(qm_we), .waddr(qm_waddr), .wdata(qm_wdata), .re(qm_re), .raddr(qm_raddr), .rdata(qm_rdata));

  // cell link memory and cell free list
  logic           cl_a_en, cl_a_we, cl_b_en, cl_b_we;
  logic [CAW-1:0] cl_a_addr, cl_a_wdata, cl_a_rdata, cl_b_addr, cl_b_wdata, cl_b_rdata;
  link_mem_2x #(.DEPTH(N_CELLS), .WIDTH(CAW)) u_cell_link (
    .clk, .clk_fast,
    .a_en(cl_a_en), .a_we(cl_a_we), .a_addr(cl_a_addr), .a_wdata(cl_a_wdata), .a_rdata(cl_a_rdata),
    .b_en(cl_b_en), .b_we(cl_b_we), .b_addr(cl_b_addr), .b_wdata(cl_b_wdata), .b_rdata(cl_b_rdata));

  logic           cf_init, cf_pop, cf_app_req, cf_app_ack;
  logic [CAW-1:0] cf_addr;
  logic [CCW-1:0] cf_count;
  free_job_t      cfree_head;
  free_list #(.DEPTH(N_CELLS)) u_cell_free (
    .clk, .rst, .init_done(cf_init), .pop(cf_pop), .pop_addr(cf_addr), .count(cf_count),
    .app_req(cf_app_req), .app_first(cfree_head.first), .app_last(cfree_head.last),
    .app_n(CCW'(cfree_head.n)), .app_ack(cf_app_ack),
    .a_en(cl_a_en), .a_we(cl_a_we), .a_addr(cl_a_addr), .a_wdata(cl_a_wdata), .a_rdata(cl_a_rdata));

  // header link memory and header free list
  logic           hl_a_en, hl_a_we, hl_b_en, hl_b_we;
  logic [HAW-1:0] hl_a_addr, hl_a_wdata, hl_a_rdata, hl_b_addr, hl_b_wdata, hl_b_rdata;
  link_mem_2x #(.DEPTH(N_HDRS), .WIDTH(HAW)) u_hdr_link (
    .clk, .clk_fast,
    .a_en(hl_a_en), .a_we(hl_a_we), .a_addr(hl_a_addr), .a_wdata(hl_a_wdata), .a_rdata(hl_a_rdata),
    .b_en(hl_b_en), .b_we(hl_b_we), .b_addr(hl_b_addr), .b_wdata(hl_b_wdata), .b_rdata(hl_b_rdata));

  logic           hf_init, hf_pop, hf_app_req, hf_app_ack;
  logic [HAW-1:0] hf_addr;
  logic [HCW-1:0] hf_count;
  logic [HAW-1:0] hfree_head;
  free_list #(.DEPTH(N_HDRS)) u_hdr_free (
    .clk, .rst, .init_done(hf_init), .pop(hf_pop), .pop_addr(hf_addr), .count(hf_count),
    .app_req(hf_app_req), .app_first(hfree_head), .app_last(hfree_head), .app_n(HCW'(1)),
    .app_ack(hf_app_ack),
    .a_en(hl_a_en), .a_we(hl_a_we), .a_addr(hl_a_addr), .a_wdata(hl_a_wdata), .a_rdata(hl_a_rdata));

  // queue link memory and queue-entry free list
  logic           ql_a_en, ql_a_we, ql_b_en, ql_b_we;
  logic [QAW-1:0] ql_a_addr, ql_a_wdata, ql_a_rdata, ql_b_addr, ql_b_wdata, ql_b_rdata;
  link_mem_2x #(.DEPTH(N_QENT), .WIDTH(QAW)) u_queue_link (
    .clk, .clk_fast,
    .a_en(ql_a_en), .a_we(ql_a_we), .a_addr(ql_a_addr), .a_wdata(ql_a_wdata), .a_rdata(ql_a_rdata),
    .b_en(ql_b_en), .b_we(ql_b_we), .b_addr(ql_b_addr), .b_wdata(ql_b_wdata), .b_rdata(ql_b_rdata));

  logic           qf_init, qf_pop, qf_app_req, qf_app_ack;
  logic [QAW-1:0] qf_addr;
  logic [QCW-1:0] qf_count;
  logic [QAW-1:0] o_qe_q;
  free_list #(.DEPTH(N_QENT)) u_queue_free (
    .clk, .rst, .init_done(qf_init), .pop(qf_pop), .pop_addr(qf_addr), .count(qf_count),
    .app_req(qf_app_req), .app_first(o_qe_q), .app_last(o_qe_q), .app_n(QCW'(1)),
    .app_ack(qf_app_ack),
    .a_en(ql_a_en), .a_we(ql_a_we), .a_addr(ql_a_addr), .a_wdata(ql_a_wdata), .a_rdata(ql_a_rdata));

  assign init_done = cf_init && hf_init && qf_init;

  // ------------------------------------------------------------------
  // state
  // ------------------------------------------------------------------
  // open frame of each source
  logic               st_active [NS];
  logic               st_drop   [NS];
  logic [HAW-1:0]     st_hdr    [NS];
  logic [CAW-1:0]     st_first  [NS];
  logic [CAW-1:0]     st_last   [NS];
  logic [NCW-1:0]     st_n      [NS];
  logic [N_PORTS-1:0] st_dst    [NS];
  logic [PRW-1:0]     st_prio   [NS];

  // occupancy by class
  logic [CCW-1:0] cbi_used_q, cbe_phys_q;
  logic [CCW-1:0] used_q [N_PORTS];

  // loop FIFO (frames waiting for packet processing)
  logic [HAW-1:0] lq_head_q, lq_tail_q;
  logic [HCW-1:0] lq_cnt_q;

  // output queues, index port*N_PRIO + prio
  logic [QAW-1:0] oq_head_q [NQ];
  logic [QAW-1:0] oq_tail_q [NQ];
  logic [QCW-1:0] oq_cnt_q  [NQ];

  // freeing queue (cell chains and their headers)
  free_job_t      fq_mem [FD];
  logic [FDW-1:0] fq_rp_q, fq_wp_q;
  logic [FDW:0]   fq_cnt_q;

  // enqueue jobs: frames back from the loop waiting to be put in queues
  logic [HAW-1:0]     jb_hdr  [JD];
  logic [N_PORTS-1:0] jb_dst  [JD];
  logic [PRW-1:0]     jb_prio [JD];
  logic [JDW-1:0]     jb_rp_q, jb_wp_q;
  logic [JDW:0]       jb_cnt_q;
  logic [N_PORTS-1:0] jb_done_q;
  logic [QCW-1:0]     q_resv_q;

  logic [PW-1:0] in_rr_q;

  // ------------------------------------------------------------------
  // input side
  // ------------------------------------------------------------------

  always_comb begin
    sel_valid = 1'b0; sel_is_lp = 1'b0; sel = '0; in_take = '0;
    sel_data = lp_data; sel_first = lp_first; sel_last = lp_last; sel_lost = 1'b0;
    sel_nb = lp_nbytes; sel_dst = lp_dst; sel_prio = lp_prio;
    ev_loop_first = 1'b0;
    if (init_done) begin
      if (lp_valid) begin
        sel_valid = 1'b1; sel_is_lp = 1'b1; sel = SW'(LP);
        ev_loop_first = |in_valid;
      end else begin
        for (int k = 0; k < N_PORTS; k++) begin
          automatic logic [PW-1:0] p = PW'((32'(in_rr_q) + 32'(k)) % N_PORTS);
          if (!sel_valid && in_valid[p]) begin
            sel_valid = 1'b1; sel = SW'(p); in_take[p] = 1'b1;
          end
        end
        if (sel_valid) begin
          sel_data  = in_data[sel[PW-1:0]];
          sel_first = in_first[sel[PW-1:0]];
          sel_last  = in_last[sel[PW-1:0]];
          sel_lost  = in_lost[sel[PW-1:0]];
          sel_nb    = in_nbytes[sel[PW-1:0]];
          sel_dst   = '0;
          sel_prio  = '0;
        end
      end
    end
  end

  // admission
  logic [N_PORTS-1:0] cell_dst;
  logic [CCW+3:0]     shared_used;
  logic [PW:0]        n_over;
  logic               cbi_ok, cbe_ok, class_ok, cell_ok, hdr_ok, len_ok;
  always_comb begin
    cell_dst    = sel_first ? sel_dst : st_dst[sel];
    shared_used = '0;
    n_over      = '0;
    for (int p = 0; p < N_PORTS; p++) begin
      if (32'(used_q[p]) > GUAR) shared_used = shared_used + (CCW+4)'(32'(used_q[p]) - GUAR);
      if (cell_dst[p] && 32'(used_q[p]) >= GUAR) n_over = n_over + 1'b1;
    end
    cbi_ok   = 32'(cbi_used_q) < CBI_RESERVE;
    cbe_ok   = (32'(cbe_phys_q) < CBE_CELLS) && (32'(shared_used) + 32'(n_over) <= SHARED);
    class_ok = sel_is_lp ? cbe_ok : cbi_ok;
    cell_ok  = cf_count != '0;
    hdr_ok   = hf_count != '0;
    len_ok   = 32'(st_n[sel]) < PC;
  end

  // decision for the selected cell
  logic           abort_old;    // the open frame of this source is given up
  logic           acc_cell;     // the cell is stored
  logic           acc_hdr;      // a header is allocated
  logic           complete;     // the cell completes an accepted frame
  logic           drop_cur;     // the frame being built now is dropped
  logic           link_wr;      // link the cell behind the previous one
  logic           to_loop_q;    // a complete ingress frame joins the loop FIFO
  logic           to_jobs;      // a complete loop frame goes to the job queue
  logic [CAW-1:0] cur_first;
  logic [NCW-1:0] cur_n;
  logic [HAW-1:0] cur_hdr;
  logic [N_PORTS-1:0] cur_dst;
  logic [PRW-1:0] cur_prio;
  logic [PW:0]    dst_cnt;
  logic           q_ok;
  logic           d_full, d_guar, d_queue, d_lost, d_filter;

  always_comb begin
    abort_old = 1'b0; acc_cell = 1'b0; acc_hdr = 1'b0; complete = 1'b0; drop_cur = 1'b0;
    link_wr = 1'b0; to_loop_q = 1'b0; to_jobs = 1'b0;
    d_full = 1'b0; d_guar = 1'b0; d_queue = 1'b0; d_lost = 1'b0; d_filter = 1'b0;
    cur_first = st_first[sel]; cur_n = st_n[sel]; cur_hdr = st_hdr[sel];
    cur_dst = st_dst[sel]; cur_prio = st_prio[sel];
    dst_cnt = '0;
    for (int p = 0; p < N_PORTS; p++) dst_cnt = dst_cnt + (PW+1)'(cell_dst[p]);
    q_ok = (32'(qf_count) >= 32'(q_resv_q) + 32'(dst_cnt)) && (32'(jb_cnt_q) < JD);
    if (sel_valid) begin
      if ((sel_first || sel_lost) && st_active[sel]) begin
        abort_old = 1'b1;
        d_lost    = 1'b1;
      end
      if (sel_first) begin
        cur_first = cf_addr; cur_n = NCW'(1); cur_hdr = hf_addr;
        cur_dst = sel_dst; cur_prio = sel_prio;
        if (sel_is_lp && sel_dst == '0) d_filter = 1'b1;
        else if (!cell_ok || !hdr_ok)  d_full = 1'b1;
        else if (!class_ok)            d_guar = 1'b1;
        else begin acc_cell = 1'b1; acc_hdr = 1'b1; end
      end else if (sel_lost) begin
        d_lost = 1'b1;
      end else if (st_active[sel]) begin
        cur_n = st_n[sel] + NCW'(1);
        if (!len_ok)         begin d_lost = 1'b1; drop_cur = 1'b1; end
        else if (!cell_ok)   begin d_full = 1'b1; drop_cur = 1'b1; end
        else if (!class_ok)  begin d_guar = 1'b1; drop_cur = 1'b1; end
        else begin acc_cell = 1'b1; link_wr = 1'b1; end
        if (drop_cur) cur_n = st_n[sel];
      end
      if (acc_cell && sel_last) begin
        if (!sel_is_lp) begin
          complete = 1'b1; to_loop_q = 1'b1;
        end else if (q_ok) begin
          complete = 1'b1; to_jobs = 1'b1;
        end else begin
          d_queue = 1'b1; drop_cur = 1'b1;
        end
      end
    end
  end

  assign cf_pop = acc_cell;
  assign hf_pop = acc_hdr;
  assign cm_we    = acc_cell;
  assign cm_waddr = cf_addr;

  // cell link port B: input writes, output reads
  logic           o_cl_rd;
  logic [CAW-1:0] o_cl_addr;
  always_comb begin
    cl_b_en = 1'b0; cl_b_we = 1'b0; cl_b_addr = o_cl_addr; cl_b_wdata = cf_addr;
    if (link_wr) begin
      cl_b_en = 1'b1; cl_b_we = 1'b1; cl_b_addr = st_last[sel];
    end else if (o_cl_rd) begin
      cl_b_en = 1'b1;
    end
  end

  // header link port B: loop FIFO
  logic lq_enq_b;   // enqueue needs port B
  logic o_lq_deq;   // output side dequeues the loop FIFO this cycle
  logic o_lq_rd;    // ... and reads the successor of the head
  assign lq_enq_b = to_loop_q && (lq_cnt_q != '0);
  always_comb begin
    hl_b_en = 1'b0; hl_b_we = 1'b0; hl_b_addr = lq_head_q; hl_b_wdata = cur_hdr;
    if (lq_enq_b) begin
      hl_b_en = 1'b1; hl_b_we = 1'b1; hl_b_addr = lq_tail_q;
    end else if (o_lq_rd) begin
      hl_b_en = 1'b1;
    end
  end

  // header memory write port: input side first, then output side
  logic o_hm_wr;
  hdr_t o_hm_wdata;
  logic [HAW-1:0] o_hm_waddr;
  always_comb begin
    hm_we = 1'b0; hm_waddr = o_hm_waddr; hm_wdata = o_hm_wdata;
    if (complete) begin
      hm_we = 1'b1; hm_waddr = cur_hdr;
      hm_wdata = '{dst: cur_dst, src: sel, vbytes: sel_nb, last: cf_addr, first: cur_first,
                   ready: 1'b1, prio: cur_prio, ncells: cur_n};
    end else if (o_hm_wr) begin
      hm_we = 1'b1;
    end
  end

  // ------------------------------------------------------------------
  // output side
  // ------------------------------------------------------------------
  typedef enum logic [2:0] {O_IDLE, O_DEQ, O_DEQ2, O_HDR, O_CELL, O_FIN1, O_FIN2} ostate_t;
  ostate_t         o_st_q;
  logic [SW-1:0]   o_tgt_q;
  logic [PRW-1:0]  o_pr_q;
  logic [HAW-1:0]  o_h_q;
  hdr_t            o_hdr_q;
  logic [CAW-1:0]  o_cur_q, o_rda_q;
  logic            o_rd_q, o_hupd_q;
  logic [NCW-1:0]  o_idx_q;
  logic [PW-1:0]   o_rr_q;

  logic            o_pick;
  logic [SW-1:0]   o_pick_tgt;
  logic [PRW-1:0]  o_pick_pr;
  logic            o_qdeq;         // dequeue of an output queue this cycle
  logic [PW-1:0]   o_port;
  logic [$clog2(NQ)-1:0] o_qi;
  logic            o_push_free;    // output side pushes a freeing job
  logic            o_done_port;    // a port transfer finishes, counters drop
  logic            o_done_loop;
  logic [N_PORTS-1:0] o_rem;
  logic            o_last_cell;

  assign o_port = o_tgt_q[PW-1:0];
  assign o_qi   = $clog2(NQ)'(32'(o_port) * N_PRIO + 32'(o_pr_q));
  assign o_rem  = o_hdr_q.dst & ~(N_PORTS'(1) << o_port);
  assign o_last_cell = (o_rda_q == o_hdr_q.last);

  always_comb begin
    o_pick = 1'b0; o_pick_tgt = SW'(LP); o_pick_pr = '0;
    if (lq_cnt_q != '0 && eg_can_accept[LP]) begin
      o_pick = 1'b1;
    end else begin
      for (int k = 0; k < N_PORTS; k++) begin
        automatic int unsigned p = (32'(o_rr_q) + 32'(k)) % N_PORTS;
        if (!o_pick && eg_can_accept[p]) begin
          for (int r = 0; r < N_PRIO; r++) begin
            if (oq_cnt_q[p * N_PRIO + r] != '0) begin
              o_pick = 1'b1; o_pick_tgt = SW'(p); o_pick_pr = PRW'(r);
            end
          end
        end
      end
    end
  end

  logic fq_space_out;
  assign fq_space_out = 32'(fq_cnt_q) + 3 <= FD;

  always_comb begin
    o_cl_rd = 1'b0; o_cl_addr = o_cur_q;
    o_lq_deq = 1'b0; o_lq_rd = 1'b0; o_qdeq = 1'b0;
    cm_re = 1'b0; cm_raddr = o_cur_q;
    hm_re = 1'b0; hm_raddr = lq_head_q;
    qm_re = 1'b0; qm_raddr = oq_head_q[o_qi];
    o_hm_wr = 1'b0; o_hm_waddr = o_h_q; o_hm_wdata = o_hdr_q; o_hm_wdata.dst = o_rem;
    eg_wr = '0; eg_data = cm_rdata; eg_first = (o_idx_q == '0); eg_last = o_last_cell;
    eg_nbytes = o_last_cell ? o_hdr_q.vbytes : VB_W'(CELL_BYTES);
    eg_src = o_hdr_q.src[PW-1:0];
    qf_app_req = 1'b0; o_push_free = 1'b0; o_done_port = 1'b0; o_done_loop = 1'b0;
    ev_out_wait = 1'b0; ev_mcast_keep = 1'b0;
    case (o_st_q)
      O_DEQ: begin
        if (o_tgt_q == SW'(LP)) begin
          if (lq_cnt_q >= HCW'(2) && lq_enq_b) ev_out_wait = 1'b1;
          else begin
            o_lq_deq = 1'b1; o_lq_rd = (lq_cnt_q >= HCW'(2));
            hm_re = 1'b1; hm_raddr = lq_head_q;
          end
        end else begin
          o_qdeq = 1'b1; qm_re = 1'b1; qm_raddr = oq_head_q[o_qi];
        end
      end
      O_DEQ2: begin
        if (o_tgt_q != SW'(LP)) begin hm_re = 1'b1; hm_raddr = qm_rdata; end
      end
      O_CELL: begin
        if (o_rd_q) begin
          eg_wr[o_tgt_q] = 1'b1;
          if (!o_last_cell) begin
            o_cl_addr = cl_b_rdata; cm_raddr = cl_b_rdata;
            if (!link_wr) begin o_cl_rd = 1'b1; cm_re = 1'b1; end
            else ev_out_wait = 1'b1;
          end
        end else begin
          if (!link_wr) begin o_cl_rd = 1'b1; cm_re = 1'b1; end
          else ev_out_wait = 1'b1;
        end
      end
      O_FIN1: begin
        if (o_tgt_q == SW'(LP)) begin
          if (fq_space_out) begin o_push_free = 1'b1; o_done_loop = 1'b1; end
          else ev_out_wait = 1'b1;
        end else begin
          qf_app_req = 1'b1;
          if (!qf_app_ack) ev_out_wait = 1'b1;
        end
      end
      O_FIN2: begin
        if (o_rem == '0) begin
          if (fq_space_out) begin o_push_free = 1'b1; o_done_port = 1'b1; end
          else ev_out_wait = 1'b1;
        end else if (!complete) begin
          o_hm_wr = 1'b1; o_done_port = 1'b1; ev_mcast_keep = 1'b1;
        end else ev_out_wait = 1'b1;
      end
      default: ;
    endcase
  end

  // queue link port B: output dequeue reads first, then enqueue writes
  logic               jb_go;        // enqueue one entry this cycle
  logic [PW-1:0]      jb_port;
  logic [N_PORTS-1:0] jb_left;
  logic [$clog2(NQ)-1:0] jb_qi;
  logic               o_q_rd;
  assign o_q_rd = o_qdeq && (oq_cnt_q[o_qi] >= QCW'(2));
  always_comb begin
    jb_left = jb_dst[jb_rp_q] & ~jb_done_q;
    jb_port = '0;
    for (int p = N_PORTS - 1; p >= 0; p--) if (jb_left[p]) jb_port = PW'(p);
    jb_qi = $clog2(NQ)'(32'(jb_port) * N_PRIO + 32'(jb_prio[jb_rp_q]));
    jb_go = (jb_cnt_q != '0) && !o_qdeq && (qf_count != '0);
    qf_pop = jb_go;
    qm_we = jb_go; qm_waddr = qf_addr; qm_wdata = jb_hdr[jb_rp_q];
    ql_b_en = 1'b0; ql_b_we = 1'b0; ql_b_addr = oq_head_q[o_qi]; ql_b_wdata = qf_addr;
    if (o_q_rd) begin
      ql_b_en = 1'b1;
    end else if (jb_go && oq_cnt_q[jb_qi] != '0) begin
      ql_b_en = 1'b1; ql_b_we = 1'b1; ql_b_addr = oq_tail_q[jb_qi];
    end
  end

  // freeing queue drain
  assign cfree_head = fq_mem[fq_rp_q];
  assign hfree_head = cfree_head.hdr;
  // a job is done when both its cells and its header are back; the two
  // appends may happen in different cycles
  logic fq_c_done_q, fq_h_done_q;
  assign cf_app_req = (fq_cnt_q != '0) && !fq_c_done_q;
  assign hf_app_req = (fq_cnt_q != '0) && !fq_h_done_q;
  logic fq_pop;
  assign fq_pop = (fq_cnt_q != '0) && (fq_c_done_q || cf_app_ack) && (fq_h_done_q || hf_app_ack);

  // ------------------------------------------------------------------
  // sequential
  // ------------------------------------------------------------------
  free_job_t push0, push1, push2;
  assign push0 = '{first: st_first[sel], last: st_last[sel], n: st_n[sel], hdr: st_hdr[sel]};
  assign push1 = '{first: cur_first, last: acc_cell ? cf_addr : st_last[sel], n: cur_n, hdr: cur_hdr};
  assign push2 = '{first: o_hdr_q.first, last: o_hdr_q.last, n: o_hdr_q.ncells, hdr: o_h_q};

  always_ff @(posedge clk) begin
    automatic logic [FDW:0] np;
    if (rst) begin
      fq_rp_q <= '0; fq_wp_q <= '0; fq_cnt_q <= '0; fq_c_done_q <= 1'b0; fq_h_done_q <= 1'b0;
    end else begin
      np = '0;
      if (abort_old)   begin fq_mem[fq_wp_q + FDW'(np)] <= push0; np = np + 1'b1; end
      if (drop_cur)    begin fq_mem[fq_wp_q + FDW'(np)] <= push1; np = np + 1'b1; end
      if (o_push_free) begin fq_mem[fq_wp_q + FDW'(np)] <= push2; np = np + 1'b1; end
      fq_wp_q  <= fq_wp_q + FDW'(np);
      fq_cnt_q <= fq_cnt_q + np - (FDW+1)'(fq_pop);
      if (fq_pop) begin
        fq_rp_q <= fq_rp_q + FDW'(1);
        fq_c_done_q <= 1'b0; fq_h_done_q <= 1'b0;
      end else begin
        if (cf_app_ack) fq_c_done_q <= 1'b1;
        if (hf_app_ack) fq_h_done_q <= 1'b1;
      end
    end
  end

  // per-source state, round robin, loop FIFO
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < NS; s++) begin
        st_active[s] <= 1'b0; st_drop[s] <= 1'b0; st_n[s] <= '0;
        st_first[s] <= '0; st_last[s] <= '0; st_hdr[s] <= '0; st_dst[s] <= '0; st_prio[s] <= '0;
      end
      in_rr_q <= '0;
      lq_cnt_q <= '0; lq_head_q <= '0; lq_tail_q <= '0;
    end else begin
      if (sel_valid && !sel_is_lp)
        in_rr_q <= (sel[PW-1:0] == PW'(N_PORTS - 1)) ? '0 : sel[PW-1:0] + PW'(1);
      if (sel_valid) begin
        if (acc_cell) begin
          st_active[sel] <= !sel_last;
          st_drop[sel]   <= 1'b0;
          st_last[sel]   <= cf_addr;
          st_n[sel]      <= cur_n;
          if (sel_first) begin
            st_first[sel] <= cf_addr; st_hdr[sel] <= hf_addr;
            st_dst[sel] <= sel_dst; st_prio[sel] <= sel_prio;
          end
          if (drop_cur) st_active[sel] <= 1'b0;
        end else begin
          st_active[sel] <= 1'b0;
          // cells of a frame that is not stored are ignored up to its last cell
          st_drop[sel]   <= !sel_last && (sel_first || sel_lost || st_active[sel] || st_drop[sel]);
        end
      end
      // loop FIFO
      if (to_loop_q) begin
        lq_tail_q <= cur_hdr;
        if (lq_cnt_q == '0 || (o_lq_deq && lq_cnt_q == HCW'(1))) lq_head_q <= cur_hdr;
      end
      if (o_st_q == O_DEQ2 && o_tgt_q == SW'(LP) && o_hupd_q) lq_head_q <= hl_b_rdata;
      lq_cnt_q <= lq_cnt_q + HCW'(to_loop_q) - HCW'(o_lq_deq);
    end
  end

  // occupancy counters
  always_ff @(posedge clk) begin
    automatic int signed dc, dp;
    automatic int signed du [N_PORTS];
    if (rst) begin
      cbi_used_q <= '0; cbe_phys_q <= '0;
      for (int p = 0; p < N_PORTS; p++) used_q[p] <= '0;
    end else begin
      dc = 0; dp = 0;
      for (int p = 0; p < N_PORTS; p++) du[p] = 0;
      if (acc_cell) begin
        if (!sel_is_lp) dc = dc + 1;
        else begin
          dp = dp + 1;
          for (int p = 0; p < N_PORTS; p++) if (cell_dst[p]) du[p] = du[p] + 1;
        end
      end
      if (abort_old) begin
        if (!sel_is_lp) dc = dc - int'(st_n[sel]);
        else begin
          dp = dp - int'(st_n[sel]);
          for (int p = 0; p < N_PORTS; p++) if (st_dst[sel][p]) du[p] = du[p] - int'(st_n[sel]);
        end
      end
      if (drop_cur) begin
        if (!sel_is_lp) dc = dc - int'(cur_n);
        else begin
          dp = dp - int'(cur_n);
          for (int p = 0; p < N_PORTS; p++) if (cur_dst[p]) du[p] = du[p] - int'(cur_n);
        end
      end
      if (o_done_loop) dc = dc - int'(o_hdr_q.ncells);
      if (o_done_port) begin
        du[o_port] = du[o_port] - int'(o_hdr_q.ncells);
        if (o_rem == '0) dp = dp - int'(o_hdr_q.ncells);
      end
      cbi_used_q <= CCW'(int'(cbi_used_q) + dc);
      cbe_phys_q <= CCW'(int'(cbe_phys_q) + dp);
      for (int p = 0; p < N_PORTS; p++) used_q[p] <= CCW'(int'(used_q[p]) + du[p]);
    end
  end

  // enqueue jobs and output queues
  always_ff @(posedge clk) begin
    if (rst) begin
      jb_rp_q <= '0; jb_wp_q <= '0; jb_cnt_q <= '0; jb_done_q <= '0; q_resv_q <= '0;
      for (int q = 0; q < NQ; q++) begin oq_cnt_q[q] <= '0; oq_head_q[q] <= '0; oq_tail_q[q] <= '0; end
    end else begin
      if (to_jobs) begin
        jb_hdr[jb_wp_q] <= cur_hdr; jb_dst[jb_wp_q] <= cur_dst; jb_prio[jb_wp_q] <= cur_prio;
        jb_wp_q <= jb_wp_q + JDW'(1);
      end
      if (jb_go) begin
        if (oq_cnt_q[jb_qi] == '0) oq_head_q[jb_qi] <= qf_addr;
        oq_tail_q[jb_qi] <= qf_addr;
        if ((jb_left & ~(N_PORTS'(1) << jb_port)) == '0) begin
          jb_done_q <= '0; jb_rp_q <= jb_rp_q + JDW'(1);
        end else begin
          jb_done_q[jb_port] <= 1'b1;
        end
      end
      jb_cnt_q <= jb_cnt_q + (JDW+1)'(to_jobs)
                - (JDW+1)'(jb_go && ((jb_left & ~(N_PORTS'(1) << jb_port)) == '0));
      q_resv_q <= q_resv_q + (to_jobs ? QCW'(dst_cnt) : '0) - QCW'(jb_go);
      // queue counts: enqueue and dequeue never touch one queue in one cycle
      for (int q = 0; q < NQ; q++)
        oq_cnt_q[q] <= oq_cnt_q[q] + QCW'(jb_go && jb_qi == $clog2(NQ)'(q))
                                   - QCW'(o_qdeq && o_qi == $clog2(NQ)'(q));
      if (o_st_q == O_DEQ2 && o_tgt_q != SW'(LP) && o_hupd_q) oq_head_q[o_qi] <= ql_b_rdata;
    end
  end

  // output state machine
  always_ff @(posedge clk) begin
    if (rst) begin
      o_st_q <= O_IDLE; o_tgt_q <= '0; o_pr_q <= '0; o_rd_q <= 1'b0; o_hupd_q <= 1'b0;
      o_idx_q <= '0; o_rr_q <= '0; o_h_q <= '0; o_cur_q <= '0; o_rda_q <= '0; o_qe_q <= '0;
      o_hdr_q <= '0;
    end else begin
      case (o_st_q)
        O_IDLE: if (o_pick && init_done) begin
          o_tgt_q <= o_pick_tgt; o_pr_q <= o_pick_pr; o_st_q <= O_DEQ;
          if (o_pick_tgt != SW'(LP))
            o_rr_q <= (o_pick_tgt[PW-1:0] == PW'(N_PORTS - 1)) ? '0 : o_pick_tgt[PW-1:0] + PW'(1);
        end
        O_DEQ: begin
          if (o_tgt_q == SW'(LP)) begin
            if (o_lq_deq) begin
              o_h_q <= lq_head_q; o_hupd_q <= o_lq_rd; o_st_q <= O_DEQ2;
            end
          end else begin
            o_qe_q <= oq_head_q[o_qi]; o_hupd_q <= o_q_rd; o_st_q <= O_DEQ2;
          end
        end
        O_DEQ2: begin
          if (o_tgt_q == SW'(LP)) begin
            o_hdr_q <= hm_rdata; o_cur_q <= hm_rdata.first; o_st_q <= O_CELL;
          end else begin
            o_h_q <= qm_rdata; o_st_q <= O_HDR;
          end
          o_rd_q <= 1'b0; o_idx_q <= '0;
        end
        O_HDR: begin
          o_hdr_q <= hm_rdata; o_cur_q <= hm_rdata.first; o_st_q <= O_CELL;
        end
        O_CELL: begin
          if (o_rd_q) begin
            o_idx_q <= o_idx_q + NCW'(1);
            if (o_last_cell) begin
              o_rd_q <= 1'b0; o_st_q <= O_FIN1;
            end else if (o_cl_rd) begin
              o_rda_q <= cl_b_rdata;
            end else begin
              o_cur_q <= cl_b_rdata; o_rd_q <= 1'b0;
            end
          end else if (o_cl_rd) begin
            o_rda_q <= o_cur_q; o_rd_q <= 1'b1;
          end
        end
        O_FIN1: begin
          if (o_tgt_q == SW'(LP)) begin
            if (o_push_free) o_st_q <= O_IDLE;
          end else if (qf_app_ack) o_st_q <= O_FIN2;
        end
        O_FIN2: if (o_push_free || o_hm_wr) o_st_q <= O_IDLE;
        default: o_st_q <= O_IDLE;
      endcase
    end
  end

  assign ev_drop_full   = d_full;
  assign ev_drop_guar   = d_guar;
  assign ev_drop_queue  = d_queue;
  assign ev_drop_lost   = d_lost;
  assign ev_drop_filter = d_filter;

  // rules of the design
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (32'(fq_cnt_q) <= FD) else $error("freeing queue overflow");
      if (o_st_q == O_CELL && o_idx_q == '0) assert (o_hdr_q.ready) else $error("frame not ready");
      if (lp_valid) assert (init_done) else $error("loop cell before initialisation");
    end
  end

endmodule
