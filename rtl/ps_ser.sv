// ps_ser: parallel-to-serial converter of one switch port.
//
// A cell (CELL_BYTES bytes, byte k in bits [8k+7:8k], with first/last flags
// and a valid-byte count) is loaded from the egress buffer and sent out one
// byte per clock. The next cell is taken (cell_take) in the same cycle as the
// last byte of the current one goes out, so a frame whose cells are all
// waiting in the egress buffer leaves without gaps. tx_first marks the
// frame's first byte, tx_last its last. The outputs come straight from the
// loaded cell register. The architecture names this block; the one-cell
// register with load-on-last-byte is this design's choice.
module ps_ser #(
  parameter int unsigned CELL_BYTES = sw_pkg::DEF_CELL_BYTES,
  localparam int unsigned VB_W = $clog2(CELL_BYTES + 1),
  localparam int unsigned IX_W = sw_pkg::idx_w(CELL_BYTES)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    cell_valid,
  input  logic [CELL_BYTES*8-1:0] cell_data,
  input  logic                    cell_first,
  input  logic                    cell_last,
  input  logic [VB_W-1:0]         cell_nbytes,
  output logic                    cell_take,
  output logic [7:0]              tx_data,
  output logic                    tx_valid,
  output logic                    tx_first,
  output logic                    tx_last
);

  logic [CELL_BYTES*8-1:0] cell_q;
  logic                    have_q, first_q, last_q;
  logic [IX_W-1:0]         pos_q;
  logic [VB_W-1:0]         nb_q;
  logic                    at_end;

  assign at_end    = have_q && (VB_W'(pos_q) + VB_W'(1) == nb_q);
  assign cell_take = cell_valid && (!have_q || at_end);

  assign tx_valid = have_q;
  assign tx_data  = cell_q[pos_q*8 +: 8];
  assign tx_first = have_q && first_q && (pos_q == '0);
  assign tx_last  = at_end && last_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      have_q  <= 1'b0;
      pos_q   <= '0;
      first_q <= 1'b0;
      last_q  <= 1'b0;
      nb_q    <= '0;
    end else if (cell_take) begin
      have_q  <= 1'b1;
      cell_q  <= cell_data;
      first_q <= cell_first;
      last_q  <= cell_last;
      nb_q    <= cell_nbytes;
      pos_q   <= '0;
    end else if (at_end) begin
      have_q <= 1'b0;
    end else if (have_q) begin
      pos_q <= pos_q + IX_W'(1);
    end
  end

endmodule
