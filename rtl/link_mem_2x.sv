// link_mem_2x: link memory clocked at twice the core clock.
//
// A single-port array of DEPTH words is accessed on every edge of clk_fast,
// which runs at twice the frequency of clk with rising edges aligned to clk's
// rising edges. Each core cycle therefore holds two accesses: port A in the
// first half of the cycle (at the clk_fast edge between two clk edges) and
// port B in the second half (at the edge shared with the next clk edge). To
// the core logic this looks like a two-port memory: both requests of cycle k
// are taken from signals held stable through cycle k, A happens before B (a
// B read sees an A write of the same cycle), and the read words of cycle k
// appear on a_rdata / b_rdata in cycle k+1 and hold until the next read of
// that port. This is how one memory can keep both the free list and the
// links of cells in a packet (or of queues).
// The half-cycle phase is found without a reset: a toggle flop in the clk
// domain is compared with a copy taken on each clk_fast edge; the two differ
// only at the mid-cycle edge. This detector and the register that holds the
// A result until the cycle boundary are this design's own choice.
module link_mem_2x #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 4,
  localparam int unsigned AW = sw_pkg::idx_w(DEPTH)
) (
  input  logic             clk,
  input  logic             clk_fast,
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic             tog_q;      // core domain: toggles every core cycle
  logic             tog_seen_q; // fast domain: last sampled tog_q
  logic [WIDTH-1:0] a_hold_q;   // A result until the cycle boundary
  logic             mid;

  always_ff @(posedge clk) tog_q <= ~tog_q;

  assign mid = (tog_q != tog_seen_q);

  always_ff @(posedge clk_fast) begin
    tog_seen_q <= tog_q;
    if (mid) begin
      if (a_en) begin
        if (a_we) mem[a_addr] <= a_wdata;
        else      a_hold_q    <= mem[a_addr];
      end
    end else begin
      if (b_en) begin
        if (b_we) mem[b_addr] <= b_wdata;
        else      b_rdata     <= mem[b_addr];
      end
      a_rdata <= a_hold_q;
    end
  end

endmodule
