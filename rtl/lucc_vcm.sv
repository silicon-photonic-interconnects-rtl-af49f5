// lucc_vcm: voltage control module for the MZIs of the photonic switch.
//
// Each MZI needs one drive voltage for the bar state and another for the
// cross state. For every MZI this module selects a calibration code (BAR_CODE
// or CROSS_CODE, CW bits, per MZI) from the state the controller wants and
// turns it into a one-bit first-order sigma-delta stream whose density of ones
// is code / 2^CW. An external low-pass filter and buffer turn the stream into
// the electrode voltage. The selected code is also output for a parallel DAC.
//
// Timing: the code changes in the cycle after the state input; over any
// 2^CW consecutive cycles with a constant code the stream holds exactly
// code ones. The published LUCC design names the module and the filter after it but not
// how it works; codes, modulation and widths are this design's choices.
module lucc_vcm #(
  parameter int unsigned               NMZI       = 5,
  parameter int unsigned               CW         = 8,
  parameter logic [NMZI-1:0][CW-1:0]   BAR_CODE   = '0,
  parameter logic [NMZI-1:0][CW-1:0]   CROSS_CODE = {NMZI{CW'(3 << (CW - 2))}}
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NMZI-1:0]           mzi_cross,
  output logic [NMZI-1:0][CW-1:0]   code,
  output logic [NMZI-1:0]           drive
);

  logic [NMZI-1:0][CW-1:0] acc;

  for (genvar m = 0; m < NMZI; m++) begin : g_mzi
    logic [CW:0] sum;
    assign sum = {1'b0, acc[m]} + {1'b0, code[m]};

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        code[m]  <= BAR_CODE[m];
        acc[m]   <= '0;
        drive[m] <= 1'b0;
      end else begin
        code[m]  <= mzi_cross[m] ? CROSS_CODE[m] : BAR_CODE[m];
        acc[m]   <= sum[CW-1:0];
        drive[m] <= sum[CW];
      end
    end
  end

endmodule
