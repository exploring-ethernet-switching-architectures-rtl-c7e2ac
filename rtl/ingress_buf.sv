// ingress_buf: the one-cell buffer between a port's serial-to-parallel
// converter and the shared buffer manager.
//
// The buffer manager writes one cell per clock and serves the ports in turn,
// so a finished cell waits here until in_take is asserted. Only one cell is
// held: frames may reach the buffer manager interleaved cell by cell, so the
// cell is written into shared memory long before the frame is complete. The
// converter offers a cell with in_valid and it is moved in when in_ready is
// high, i.e. when the buffer is empty or its cell is taken in the same cycle.
// Until then the converter keeps the cell; cells the converter had to give up
// arrive flagged in_lost, which is passed on with the next cell so the buffer
// manager drops the incomplete frame. in_take is only meaningful while
// out_valid is high; a moved-in cell is visible on the outputs one cycle later.
module ingress_buf #(
  parameter int unsigned CELL_BYTES = sw_pkg::DEF_CELL_BYTES,
  localparam int unsigned VB_W = $clog2(CELL_BYTES + 1)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic [CELL_BYTES*8-1:0] in_data,
  input  logic                    in_first,
  input  logic                    in_last,
  input  logic [VB_W-1:0]         in_nbytes,
  input  logic                    in_lost,
  output logic                    in_ready,
  output logic                    out_valid,
  output logic [CELL_BYTES*8-1:0] out_data,
  output logic                    out_first,
  output logic                    out_last,
  output logic [VB_W-1:0]         out_nbytes,
  output logic                    out_lost,
  input  logic                    in_take
);

  assign in_ready = !out_valid || in_take;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_lost  <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      out_nbytes <= '0;
    end else begin
      if (in_valid && in_ready) begin
        out_valid  <= 1'b1;
        out_data   <= in_data;
        out_first  <= in_first;
        out_last   <= in_last;
        out_nbytes <= in_nbytes;
        out_lost   <= in_lost;
      end else if (in_take) begin
        out_valid <= 1'b0;
        out_lost  <= 1'b0;
      end
    end
  end

endmodule
