// lucc_dest_array: the destination array of the LUCC controller.
//
// One entry per source PE holds the destination it asked for and a state:
// IDLE, PENDING (request captured, no path yet) or ACTIVE (path established).
// The conflict resolution block and the dynamic setup block read the entries
// directly, so a request is visible to them one clock edge after the source
// raised it.
//
// Handshake per source (signal names follow the prototype: LinkReq, Ack, Tail,
// TailAck):
//   link_req  1-cycle pulse with link_dst valid; accepted only in IDLE.
//   ack       1-cycle pulse, registered, in the cycle after the dynamic setup
//             block accepted the path (accept[i]); the switch is configured
//             from that same edge on.
//   tail      1-cycle pulse when the source has sent its message; accepted
//             only in ACTIVE. The path is released at that edge (release[i]
//             is the combinational notice to the other blocks).
//   tail_ack  1-cycle pulse, registered, in the cycle after the tail.
// Encoding of the states and the pulse-style handshake are this design's
// choice; the published LUCC design names the signals and the array but not their timing.
module lucc_dest_array
  import lucc_pkg::*;
#(
  parameter int unsigned N  = 8,
  parameter int unsigned DW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         link_req,
  input  logic [N-1:0][DW-1:0] link_dst,
  input  logic [N-1:0]         tail,
  input  logic [N-1:0]         accept,    // path set up this cycle (from the DSB)
  output logic [N-1:0]         pending,
  output logic [N-1:0]         active,
  output logic [N-1:0][DW-1:0] dst,
  output logic [N-1:0]         release_path, // active entry ends this cycle
  output logic [N-1:0]         ack,
  output logic [N-1:0]         tail_ack
);

  da_state_e state [N];

  for (genvar i = 0; i < N; i++) begin : g_entry
    assign pending[i]      = (state[i] == DA_PENDING);
    assign active[i]       = (state[i] == DA_ACTIVE);
    assign release_path[i] = active[i] && tail[i];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        state[i]    <= DA_IDLE;
        dst[i]      <= '0;
        ack[i]      <= 1'b0;
        tail_ack[i] <= 1'b0;
      end else begin
        ack[i]      <= 1'b0;
        tail_ack[i] <= 1'b0;
        unique case (state[i])
          DA_IDLE: if (link_req[i]) begin
            state[i] <= DA_PENDING;
            dst[i]   <= link_dst[i];
          end
          DA_PENDING: if (accept[i]) begin
            state[i] <= DA_ACTIVE;
            ack[i]   <= 1'b1;
          end
          DA_ACTIVE: if (tail[i]) begin
            state[i]    <= DA_IDLE;
            tail_ack[i] <= 1'b1;
          end
          default: state[i] <= DA_IDLE;
        endcase
      end
    end

    // A path can only be accepted for a pending request
    a_accept_pending: assert property (@(posedge clk) disable iff (!rst_n)
      accept[i] |-> pending[i]);
  end

endmodule
