// sp_deser: serial-to-parallel converter of one switch port.
//
// The port delivers one byte per clock together with valid, first-byte and
// last-byte flags. Bytes are collected into a cell register of CELL_BYTES
// bytes; byte k of a cell lands in bits [8k+7:8k]. A cell is handed on when it
// is full or when the last byte of the frame arrives: out_valid rises with
// out_first (cell holds the frame's first byte), out_last (cell holds the
// frame's last byte) and out_nbytes (valid bytes, 1..CELL_BYTES), and stays up
// until the consumer (the one-cell ingress buffer) takes it with out_ready.
// The cell register itself is the only storage, so a waiting cell survives
// only while no new byte arrives: in practice the inter-frame gap after a
// frame's short last cell. A byte arriving while a cell still waits overruns
// it; the waiting cell is discarded and the next cell handed on carries
// out_lost = 1, so the buffer manager drops the incomplete frame.
// A byte flagged first always restarts at byte 0; a frame cut off without a
// last byte is thus abandoned by the next frame. The writing of bytes at an
// index rather than through a shift chain keeps a partial last cell aligned;
// both are this design's choices, the conversion into cells is the
// architecture's.
module sp_deser #(
  parameter int unsigned CELL_BYTES = sw_pkg::DEF_CELL_BYTES,
  localparam int unsigned VB_W = $clog2(CELL_BYTES + 1),
  localparam int unsigned IX_W = sw_pkg::idx_w(CELL_BYTES)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [7:0]              in_data,
  input  logic                    in_valid,
  input  logic                    in_first,
  input  logic                    in_last,
  output logic                    out_valid,
  output logic [CELL_BYTES*8-1:0] out_data,
  output logic                    out_first,
  output logic                    out_last,
  output logic [VB_W-1:0]         out_nbytes,
  output logic                    out_lost,
  input  logic                    out_ready
);

  logic [CELL_BYTES*8-1:0] cell_q;
  logic [IX_W-1:0]         cnt_q;      // next byte position
  logic                    cell_first_q; // current cell began a frame
  logic [IX_W-1:0]         pos;
  logic                    lost_pend_q;  // a cell was overrun since the last handover
  logic                    overrun;

  assign overrun  = in_valid && out_valid && !out_ready;

  assign pos      = in_first ? '0 : cnt_q;
  assign out_data = cell_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_q        <= '0;
      cell_first_q <= 1'b0;
      out_valid    <= 1'b0;
      out_first    <= 1'b0;
      out_last     <= 1'b0;
      out_nbytes   <= '0;
      out_lost     <= 1'b0;
      lost_pend_q  <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (overrun) begin
        out_valid   <= 1'b0;
        lost_pend_q <= 1'b1;
      end
      if (in_valid) begin
        cell_q[pos*8 +: 8] <= in_data;
        if (pos == '0) cell_first_q <= in_first;
        if (in_last || pos == IX_W'(CELL_BYTES - 1)) begin
          out_valid  <= 1'b1;
          out_first  <= (pos == '0) ? in_first : cell_first_q;
          out_last   <= in_last;
          out_nbytes <= VB_W'(pos) + VB_W'(1);
          out_lost   <= lost_pend_q || overrun;
          lost_pend_q <= 1'b0;
          cnt_q      <= '0;
        end else begin
          cnt_q <= pos + IX_W'(1);
        end
      end
    end
  end

endmodule
