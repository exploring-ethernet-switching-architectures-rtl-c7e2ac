// egress_buf: per-output buffer holding one whole frame.
//
// The buffer manager copies a frame into it cell by cell, possibly with
// pauses, and may only start a frame while can_accept is high (buffer empty).
// The frame becomes readable (rd_valid) once its last cell (wr_last) has been
// written, and then every cell is available back to back, so the consumer
// gets the frame without gaps: a port's parallel-to-serial converter has a
// hard deadline for each next cell, and the packet-processing loop needs a
// frame's cells on consecutive cycles. DEPTH is one maximum frame in cells.
// WIDTH is the width of one stored word (cell data plus its flags). Reads
// are combinational from the array: rd_data is the oldest word, rd_take pops
// it. Whole-frame capacity follows the architecture; waiting for the complete
// frame before releasing it is this design's way of meeting the deadlines.
module egress_buf #(
  parameter int unsigned DEPTH = 25,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW = sw_pkg::idx_w(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  output logic             can_accept,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             wr_last,
  output logic             rd_valid,
  output logic [WIDTH-1:0] rd_data,
  input  logic             rd_take
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp_q, rp_q;
  logic             complete_q, busy_q;

  assign can_accept = !busy_q;
  assign rd_valid   = complete_q;
  assign rd_data    = mem[rp_q];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wp_q] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp_q <= '0; rp_q <= '0; complete_q <= 1'b0; busy_q <= 1'b0;
    end else begin
      if (wr_en) begin
        busy_q <= 1'b1;
        wp_q   <= wp_q + AW'(1);
        if (wr_last) complete_q <= 1'b1;
      end
      if (rd_take && complete_q) begin
        if (rp_q + AW'(1) == wp_q) begin
          // last word of the frame leaves: buffer empty again
          rp_q <= '0; wp_q <= '0; complete_q <= 1'b0; busy_q <= 1'b0;
        end else begin
          rp_q <= rp_q + AW'(1);
        end
      end
    end
  end

  always_ff @(posedge clk)
    if (!rst && wr_en)
      assert (!complete_q && 32'(wp_q) < DEPTH) else $error("egress_buf overflow");

endmodule
