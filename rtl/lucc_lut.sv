// lucc_lut: route lookup table (LUT memory) of the LUCC controller.
//
// A read-only memory with one entry per (source, destination) pair, at
// address source * N + destination. The entries are the routes found off-line
// with a shortest-path search over the switch graph; among equally short
// routes the first in depth-first order (bar before cross) is kept. On a
// Benes network this choice lets the complement pattern and every cyclic
// shift (d = s + k mod N) be set up at once (see lucc_pkg::route_entry).
//
// Holding one route per pair, rather than one switch setting per combination
// of requests, is the first reduction: the dynamic setup block merges the
// routes of all granted pairs on-line.
// Entries are stored in compressed "path list" form (see lucc_pkg): instead of
// a bar/cross/unused code for every element of the switch, an entry keeps one
// {state, element, valid} field per stage, i.e. only the elements on the path.
// The dynamic setup block expands the fields back to element positions.
// For the 8x8 Benes network this is 20 bits per entry instead of 40.
//
// The table has N read ports, one per source, read combinationally so that all
// routes are available in the same cycle as the requests.
// The content is computed at elaboration from the switch wiring by
// lucc_pkg::route_entry (the off-line routing step), for the topology TOPO:
// TOPO_BENES (N x N Benes, NSTAGE = 2*log2(N)-1, SPS = N/2) or TOPO_SB4 (the
// 4x4 switch of five MZIs, NSTAGE = 3, SPS = 2). It synthesizes to a ROM.
// The published LUCC design says the LUT is built off-line and reduced by removing
// redundant entries but not how; the path-list format is this design's.
module lucc_lut
  import lucc_pkg::*;
#(
  parameter int unsigned N      = 8,
  parameter int unsigned NSTAGE = 5,
  parameter int unsigned SPS    = 4,
  parameter topo_e       TOPO   = TOPO_BENES,
  localparam int unsigned AW    = $clog2(N * N),
  localparam int unsigned EW    = entry_bits(NSTAGE, SPS)
) (
  input  logic [N-1:0][AW-1:0] addr,
  output logic [N-1:0][EW-1:0] data
);

  typedef logic [N*N-1:0][EW-1:0] table_t;

  function automatic table_t build_table();
    table_t t;
    for (int s = 0; s < int'(N); s++)
      for (int d = 0; d < int'(N); d++)
        t[s * N + d] = EW'(route_entry(TOPO, N, NSTAGE, SPS, s, d));
    return t;
  endfunction

  localparam table_t ROUTES = build_table();

  for (genvar p = 0; p < N; p++) begin : g_port
    assign data[p] = ROUTES[addr[p]];
  end

endmodule
