// lucc_top: FPGA side of the LUCC prototype with a 4x4 MZI photonic switch.
//
// Four traffic sources (lucc_tx), one per switch input I1..I4, ask the LUCC
// controller for paths, send PRBS payload over them and release them. The
// controller drives the five 2x2 MZIs of the switch through the voltage
// control module (lucc_vcm), whose sigma-delta outputs go to an external
// low-pass filter and buffer. The switch and the receiver are outside the
// FPGA: their signals are the ports of this module.
//
// Switch topology (ports numbered from 0: input i is I(i+1), output j is
// O(j+1); each MZI has inputs/outputs 0 = upper, 1 = lower):
//   MZI1 takes I1, I2; MZI3 takes I3, I4.
//   MZI1 out0 -> MZI2 in0, MZI1 out1 -> MZI5 in0,
//   MZI3 out0 -> MZI5 in1, MZI3 out1 -> MZI4 in1,
//   MZI5 out0 -> MZI2 in1, MZI5 out1 -> MZI4 in0,
//   MZI2 gives O1, O2; MZI4 gives O3, O4.
// The controller sees this as 3 stages with 2 element positions each:
// stage 0 = {MZI1, MZI3}, stage 1 = {MZI5, unused}, stage 2 = {MZI2, MZI4};
// mzi_cross / mzi_drive are ordered MZI1..MZI5.
// Number of ports and MZIs follow the prototype; the wiring between the MZIs
// is read from its layout, and I1/I2 on MZI1 with O2 on MZI2 match its
// measured paths. This topology is not rearrangeably non-blocking, so some
// sets of requests wait for elements even with distinct destinations.
//
// Timing: a command is turned into LinkReq at the next edge; the controller
// sets the MZIs and raises Ack one cycle after capturing LinkReq; payload
// starts the cycle after Ack.
module lucc_top
  import lucc_pkg::*;
#(
  parameter int unsigned LEN_W = 16,
  parameter int unsigned CW    = 8,
  localparam int unsigned N    = 4,
  localparam int unsigned NMZI = 5,
  localparam int unsigned DW   = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // traffic commands, one per input
  input  logic [N-1:0]               cmd_valid,
  input  logic [N-1:0][DW-1:0]       cmd_dst,
  input  logic [N-1:0][LEN_W-1:0]    cmd_len,
  output logic [N-1:0]               cmd_ready,
  output logic [N-1:0]               done,
  // payload towards the modulators of I1..I4
  output logic [N-1:0]               tx_on,
  output logic [N-1:0]               tx_bit,
  // MZI control
  output logic [NMZI-1:0]            mzi_cross,
  output logic [NMZI-1:0][CW-1:0]    mzi_code,
  output logic [NMZI-1:0]            mzi_drive,
  // request/acknowledge observation and controller status
  output logic [N-1:0]               link_req,
  output logic [N-1:0]               ack,
  output logic [N-1:0]               conflict,
  output logic [N-1:0]               blocked
);

  localparam int unsigned NSTAGE = 3;
  localparam int unsigned SPS    = 2;
  localparam int unsigned NSE    = NSTAGE * SPS;
  // PRBS seeds of the four sources
  localparam logic [3:0][6:0] SEEDS = {7'h4d, 7'h2b, 7'h19, 7'h7f};

  logic [N-1:0][DW-1:0] link_dst;
  logic [N-1:0]         tail, tail_ack;
  logic [NSE-1:0]       se_cross, se_used;

  for (genvar i = 0; i < N; i++) begin : g_tx
    lucc_tx #(.N(N), .LEN_W(LEN_W), .SEED(SEEDS[i])) u_tx (
      .clk, .rst_n,
      .cmd_valid(cmd_valid[i]), .cmd_dst(cmd_dst[i]), .cmd_len(cmd_len[i]),
      .cmd_ready(cmd_ready[i]), .done(done[i]),
      .link_req(link_req[i]), .link_dst(link_dst[i]), .ack(ack[i]),
      .tail(tail[i]), .tail_ack(tail_ack[i]),
      .tx_on(tx_on[i]), .tx_bit(tx_bit[i])
    );
  end

  lucc #(.N(N), .NSTAGE(NSTAGE), .SPS(SPS), .TOPO(TOPO_SB4)) u_lucc (
    .clk, .rst_n, .link_req, .link_dst, .tail, .ack, .tail_ack,
    .se_cross, .se_used, .conflict, .blocked
  );

  // Element positions -> MZI numbers (slot 3 has no MZI)
  assign mzi_cross = {se_cross[2], se_cross[5], se_cross[1], se_cross[4], se_cross[0]};

  lucc_vcm #(.NMZI(NMZI), .CW(CW)) u_vcm (
    .clk, .rst_n, .mzi_cross, .code(mzi_code), .drive(mzi_drive)
  );

endmodule
