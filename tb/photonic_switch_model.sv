// photonic_switch_model: behavioural model of the 4x4 five-MZI photonic switch
// driven by lucc_top, for simulation only.
//
// Light is represented per input by an on flag (laser gated) and a data bit.
// Each input's light is followed through the MZIs with the bar/cross states
// of mzi_cross (ordered MZI1..MZI5) using the wiring of tb_topo_pkg; it
// arrives at the output reached, with no delay. src tells which input lights
// each output (-1 none); collision flags an output lit by two inputs. The
// electrode drive, filter and optical losses are not modelled.
module photonic_switch_model
  import tb_topo_pkg::*;
(
  input  logic [3:0] in_on,
  input  logic [3:0] in_bit,
  input  logic [4:0] mzi_cross,
  output logic [3:0] out_on,
  output logic [3:0] out_bit,
  output int         src [4],
  output logic       collision
);
  always_comb begin
    logic [31:0] cfg;
    walk_t w;
    // slots: 0 MZI1, 1 MZI3, 2 MZI5, 4 MZI2, 5 MZI4
    cfg = '0;
    cfg[0] = mzi_cross[0];
    cfg[1] = mzi_cross[2];
    cfg[2] = mzi_cross[4];
    cfg[4] = mzi_cross[1];
    cfg[5] = mzi_cross[3];
    out_on = '0; out_bit = '0; collision = 1'b0;
    for (int j = 0; j < 4; j++) src[j] = -1;
    for (int i = 0; i < 4; i++) begin
      w = walk(SB4, i, cfg);
      if (in_on[i] && w.dest >= 0 && w.dest < 4) begin
        if (out_on[w.dest]) collision = 1'b1;
        out_on[w.dest]  = 1'b1;
        out_bit[w.dest] = in_bit[i];
        src[w.dest]     = i;
      end
    end
  end
endmodule
