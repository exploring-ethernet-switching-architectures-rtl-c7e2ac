// sw_pkg: constants and sizing functions shared by the switch.
//
// The default configuration is the four-port switch: an 8-bit byte stream per
// port, 61-byte cells, 1522-byte maximum frames and four strict-priority
// queues per output port. The memory depths of the buffer manager are derived
// from the port count and cell size with the same formulas the sizing of the
// architecture uses:
//   max cells per frame   Pc = ceil(1522 / C)
//   cell memory depth     Pc * (N*(N+1)/2 + N)          (full-overlap test)
//   header memory depth   cells / ceil(64 / C)          (64-byte minimum frame)
//   queue memory depth    2 * headers
// The ingress reservation and the per-port guarantee are this design's own
// choice: N maximum frames are kept for packets still waiting for the
// packet processing loop, and each output is guaranteed one maximum frame.
package sw_pkg;

  localparam int unsigned DEF_N_PORTS       = 4;
  localparam int unsigned DEF_CELL_BYTES    = 61;
  localparam int unsigned DEF_MAX_PKT_BYTES = 1522;
  localparam int unsigned DEF_N_PRIO        = 4;
  localparam int unsigned MIN_PKT_BYTES     = 64;

  function automatic int unsigned ceil_div(int unsigned a, int unsigned b);
    return (a + b - 1) / b;
  endfunction

  function automatic int unsigned max_pkt_cells(int unsigned max_bytes, int unsigned cell_bytes);
    return ceil_div(max_bytes, cell_bytes);
  endfunction

  function automatic int unsigned cell_mem_depth(int unsigned n_ports, int unsigned max_bytes,
                                                 int unsigned cell_bytes);
    return max_pkt_cells(max_bytes, cell_bytes) * ((n_ports * (n_ports + 1)) / 2 + n_ports);
  endfunction

  function automatic int unsigned hdr_mem_depth(int unsigned n_cells, int unsigned cell_bytes);
    return n_cells / ceil_div(MIN_PKT_BYTES, cell_bytes);
  endfunction

  // Eq. 3.2: a whole frame from the loop plus one cell of every port must be
  // written in less time than a port needs to fill one cell.
  function automatic bit cell_timing_ok(int unsigned n_ports, int unsigned max_bytes,
                                        int unsigned cell_bytes);
    return n_ports + max_pkt_cells(max_bytes, cell_bytes) <= cell_bytes;
  endfunction

  // A width that can hold the values 0 .. n-1, never less than one bit.
  function automatic int unsigned idx_w(int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
