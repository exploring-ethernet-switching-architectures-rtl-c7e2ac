// sdp_ram: simple dual-port synchronous memory (one write port, one read
// port, one clock).
//
// Used for the three data memories of the buffer manager: cell data, packet
// headers and output-queue entries. A read issued in cycle k (re = 1) shows its
// word on rdata in cycle k+1 and rdata then holds until the next read. A read
// and a write of the same address in one cycle return the old word. The
// contents are not reset: every word is written before it is read. The
// architecture builds these memories from compiled memory instances; this
// array is the behaviour such an instance has.
module sdp_ram #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW = sw_pkg::idx_w(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
