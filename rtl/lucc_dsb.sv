// lucc_dsb: dynamic setup block (DSB) of the LUCC controller.
//
// The real-time part of the controller. For every source it computes the LUT
// address (source * N + destination) from the destination array, expands the
// compressed route it reads back into a mask of switching elements (SEs) and
// the state each of them needs, and then attributes paths:
// sources granted by the conflict resolution block are taken in index order,
// and a path is accepted when none of its SEs is held, by an established path
// or by a path accepted earlier in the same cycle, in the other state. Two
// paths that agree on the state of every SE they share cannot share a link,
// so this check is enough for the paths to be disjoint.
//
// Registered state: the SE mask held by each established path and the state
// of every SE. At the clock edge accepted paths take their SEs and set them,
// released paths (tail) give theirs back; an SE no path holds keeps its last
// state. The configuration outputs therefore change at the same edge as the
// Ack, one cycle after the request was captured.
//
// The published LUCC design gives the DSB's tasks (path attribution, computing memory
// addresses, expanding the compressed LUT) but not its insides; the in-order
// attribution and the check for elements needed in both states are this
// design's.
module lucc_dsb
  import lucc_pkg::*;
#(
  parameter int unsigned N      = 8,
  parameter int unsigned NSTAGE = 5,
  parameter int unsigned SPS    = 4,
  localparam int unsigned DW    = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned AW    = $clog2(N * N),
  localparam int unsigned EB    = elem_bits(SPS),
  localparam int unsigned FW    = field_bits(SPS),
  localparam int unsigned EW    = entry_bits(NSTAGE, SPS),
  localparam int unsigned NSE   = NSTAGE * SPS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0][DW-1:0] dst,
  input  logic [N-1:0]         grant,        // from the CRB
  input  logic [N-1:0]         release_path, // established path ends this cycle
  output logic [N-1:0][AW-1:0] lut_addr,
  input  logic [N-1:0][EW-1:0] lut_data,
  output logic [N-1:0]         accept,       // granted path set up
  output logic [N-1:0]         blocked,      // granted but an SE is in use
  output logic [NSE-1:0]       se_cross,     // SE state, 1 = cross
  output logic [NSE-1:0]       se_used       // SE held by an established path
);

  logic [N-1:0][NSE-1:0] held;      // SEs held by each established path
  logic [N-1:0][NSE-1:0] mask;      // SEs on each source's route
  logic [N-1:0][NSE-1:0] want;      // states each route needs
  logic [NSE-1:0]        kept;      // SEs that stay held after releases
  logic [NSE-1:0]        used_c;    // running use mask during attribution
  logic [NSE-1:0]        state_c;   // running state during attribution

  // Address computation and route expansion
  always_comb begin
    for (int i = 0; i < N; i++) begin
      lut_addr[i] = AW'(i * N + int'(dst[i]));
      mask[i] = '0;
      want[i] = '0;
      for (int s = 0; s < NSTAGE; s++) begin
        logic [FW-1:0] f;
        int unsigned   slot;
        f    = lut_data[i][s*FW +: FW];
        slot = s * SPS + int'(f[EB:1]);
        if (f[0] && slot < NSE) begin
          mask[i][slot] = 1'b1;
          want[i][slot] = f[FW-1];
        end
      end
    end
  end

  // Path attribution
  always_comb begin
    kept = '0;
    for (int i = 0; i < N; i++)
      if (!release_path[i]) kept |= held[i];
    used_c  = kept;
    state_c = se_cross;
    accept  = '0;
    blocked = '0;
    for (int i = 0; i < N; i++) begin
      if (grant[i]) begin
        if (((used_c & mask[i]) & (state_c ^ want[i])) == '0) begin
          accept[i] = 1'b1;
          used_c    = used_c | mask[i];
          state_c   = (state_c & ~mask[i]) | (want[i] & mask[i]);
        end else begin
          blocked[i] = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held     <= '0;
      se_cross <= {NSE{SE_BAR}};
    end else begin
      se_cross <= state_c;
      for (int i = 0; i < N; i++) begin
        if (accept[i])            held[i] <= mask[i];
        else if (release_path[i]) held[i] <= '0;
      end
    end
  end

  always_comb begin
    se_used = '0;
    for (int i = 0; i < N; i++) se_used |= held[i];
  end

  // A new path never flips an SE that an established path keeps
  a_no_flip: assert property (@(posedge clk) disable iff (!rst_n)
    (kept & (state_c ^ se_cross)) == '0);

endmodule
