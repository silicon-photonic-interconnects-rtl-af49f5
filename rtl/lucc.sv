// lucc: lookup-table-based centralized controller for a photonic switch.
//
// Sources (processing elements) ask for a path to a destination with a
// LinkReq pulse; the controller grants at most one source per destination,
// looks the route up in a table built off-line and sets the switching
// elements (SEs) of the switch, then answers with Ack. When the source has
// sent its message it pulses Tail, the path is released and the controller
// answers with TailAck.
//
// Structure (following the controller's block diagram):
//   lucc_dest_array  destination array: per-source request and path state
//   lucc_crb         conflict resolution: request matrix, per-output
//                    conflict detection, round-robin grant
//   lucc_lut         route table, compressed, N parallel read ports
//   lucc_dsb         dynamic setup: LUT addressing, route expansion, path
//                    attribution, SE state registers
//
// Timing: a LinkReq sampled at clock edge k is in the destination array after
// that edge; grant, table read and attribution are combinational, and at edge
// k+1 the SEs take their new state and Ack is raised. A request therefore
// costs one clock cycle of controller latency when its destination and its
// SEs are free. An output stays reserved until the Tail of its path.
//
// The four blocks, the round-robin conflict resolution, the off-line route
// table and the one-cycle controller latency follow the published LUCC
// design. The pulse handshake, reserving an output until Tail and making
// requests wait when an element they need is held in the other state are
// this design's choices.
//
// Defaults: 8x8 Benes network (5 stages of 4 2x2 SEs), the network used for
// the controller's latency comparison.
module lucc
  import lucc_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter int unsigned NSTAGE   = 5,
  parameter int unsigned SPS      = 4,
  parameter topo_e       TOPO     = TOPO_BENES,
  localparam int unsigned DW      = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned NSE     = NSTAGE * SPS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // per-source handshake
  input  logic [N-1:0]         link_req,
  input  logic [N-1:0][DW-1:0] link_dst,
  input  logic [N-1:0]         tail,
  output logic [N-1:0]         ack,
  output logic [N-1:0]         tail_ack,
  // switch configuration
  output logic [NSE-1:0]       se_cross,
  output logic [NSE-1:0]       se_used,
  // status
  output logic [N-1:0]         conflict,   // per output: destination conflict
  output logic [N-1:0]         blocked     // per source: granted, SE busy
);

  localparam int unsigned AW = $clog2(N * N);
  localparam int unsigned EW = entry_bits(NSTAGE, SPS);

  logic [N-1:0]         pending, active, release_path, grant, accept, out_busy;
  logic [N-1:0][DW-1:0] dst;
  logic [N-1:0][N-1:0]  req_matrix;
  logic [N-1:0][AW-1:0] lut_addr;
  logic [N-1:0][EW-1:0] lut_data;

  lucc_dest_array #(.N(N)) u_dest_array (
    .clk, .rst_n, .link_req, .link_dst, .tail, .accept,
    .pending, .active, .dst, .release_path, .ack, .tail_ack
  );

  // Outputs held by established paths that are not ending this cycle
  always_comb begin
    out_busy = '0;
    for (int i = 0; i < N; i++)
      if (active[i] && !release_path[i]) out_busy[dst[i]] = 1'b1;
  end

  lucc_crb #(.N(N)) u_crb (
    .clk, .rst_n, .pending, .dst, .out_busy, .accepted(accept),
    .req_matrix, .conflict, .grant
  );

  lucc_lut #(.N(N), .NSTAGE(NSTAGE), .SPS(SPS), .TOPO(TOPO)) u_lut (
    .addr(lut_addr), .data(lut_data)
  );

  lucc_dsb #(.N(N), .NSTAGE(NSTAGE), .SPS(SPS)) u_dsb (
    .clk, .rst_n, .dst, .grant, .release_path, .lut_addr, .lut_data,
    .accept, .blocked, .se_cross, .se_used
  );

endmodule
