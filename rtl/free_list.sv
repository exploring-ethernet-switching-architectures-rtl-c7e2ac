// free_list: list of free entries kept inside a link memory.
//
// The free entries of a memory (cells, headers or queue entries) form a
// linked list in the same link memory that links the used entries, which
// works because an entry is never free and used at once. Only the head and
// tail addresses are held in registers. This block owns port A of a
// link_mem_2x.
//   pop      take the head entry (pop_addr) this cycle; allowed while
//            count > 0. One pop per cycle is sustained: the successor of the
//            head is prefetched (next_q), and the link read for the entry
//            after it is in flight while the head is used.
//   append   give back a whole chain first..last of n entries that is
//            already linked in the memory, with one write:
//            link[tail] = first, tail = last. A whole frame is freed at the
//            cost of freeing one cell. Pops take precedence; app_ack shows
//            the cycle the append happened in.
// After reset the block spends DEPTH cycles writing link[i] = i + 1 through
// port A (init_done low) and then holds every entry. Head and tail registers
// and the chain append follow the architecture; the prefetch of the head's
// successor and the initialisation sequence are this design's.
module free_list #(
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW = sw_pkg::idx_w(DEPTH),
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst,
  output logic          init_done,
  input  logic          pop,
  output logic [AW-1:0] pop_addr,
  output logic [CW-1:0] count,
  input  logic          app_req,
  input  logic [AW-1:0] app_first,
  input  logic [AW-1:0] app_last,
  input  logic [CW-1:0] app_n,
  output logic          app_ack,
  // port A of the link memory
  output logic          a_en,
  output logic          a_we,
  output logic [AW-1:0] a_addr,
  output logic [AW-1:0] a_wdata,
  input  logic [AW-1:0] a_rdata
);

  logic [AW-1:0] head_q, next_q, tail_q, init_q;
  logic          pend_q;
  logic [AW-1:0] next_eff;
  logic          do_pop;

  assign next_eff = pend_q ? a_rdata : next_q;
  assign pop_addr = head_q;
  assign do_pop   = init_done && pop && (count != '0);
  assign app_ack  = init_done && app_req && !do_pop;

  always_comb begin
    a_en = 1'b0; a_we = 1'b0; a_addr = '0; a_wdata = '0;
    if (!init_done) begin
      a_en = 1'b1; a_we = 1'b1; a_addr = init_q;
      a_wdata = (init_q == AW'(DEPTH - 1)) ? '0 : init_q + AW'(1);
    end else if (do_pop) begin
      if (count >= CW'(3)) begin a_en = 1'b1; a_addr = next_eff; end
    end else if (app_ack) begin
      if (count == '0) begin
        if (app_n >= CW'(2)) begin a_en = 1'b1; a_addr = app_first; end
      end else begin
        a_en = 1'b1; a_we = 1'b1; a_addr = tail_q; a_wdata = app_first;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      init_done <= 1'b0;
      init_q    <= '0;
      head_q    <= '0;
      next_q    <= AW'(1);
      tail_q    <= AW'(DEPTH - 1);
      count     <= '0;
      pend_q    <= 1'b0;
    end else if (!init_done) begin
      init_q <= init_q + AW'(1);
      if (init_q == AW'(DEPTH - 1)) begin
        init_done <= 1'b1;
        count     <= CW'(DEPTH);
      end
    end else if (do_pop) begin
      count <= count - CW'(1);
      if (count >= CW'(2)) head_q <= next_eff;
      pend_q <= (count >= CW'(3));
    end else if (app_ack) begin
      count  <= count + app_n;
      tail_q <= app_last;
      if (count == '0) begin
        head_q <= app_first;
        pend_q <= (app_n >= CW'(2));
      end else if (count == CW'(1)) begin
        next_q <= app_first;
        pend_q <= 1'b0;
      end else if (pend_q) begin
        next_q <= a_rdata;
        pend_q <= 1'b0;
      end
    end else if (pend_q) begin
      next_q <= a_rdata;
      pend_q <= 1'b0;
    end
  end

  // an append must never make the list hold more than every entry
  always_ff @(posedge clk)
    if (!rst && app_ack)
      assert (32'(count) + 32'(app_n) <= DEPTH) else $error("free_list overflow");

endmodule
