// tb_topo_pkg: reference models of the two switch topologies, for testbenches.
//
// walk() follows a light path from input s through the 2x2 elements, using
// the element states in cfg (1 = cross), and returns the output reached and
// the element positions crossed (slot = stage * SPS + element). It is written
// from the wiring of the networks, independently of the route table.
//   BENES8: 8x8 Benes, 5 stages of 4 elements (SPS = 4), recursive wiring:
//     stage 0 element i, out o -> stage 1 element 2o + i/2, in i%2
//     stage 1 element b+i (b = 0 or 2), out o -> stage 2 element b+o, in i
//     stage 2 element b+o, out p -> stage 3 element b+p, in o
//     stage 3 element b+i, out p -> stage 4 element 2i+p, in b/2
//     stage 4 element j, out p -> output 2j+p; input s -> stage 0 element s/2.
//   SB4: 4x4 switch of five MZIs, 3 stages of 2 positions (SPS = 2):
//     slot 0 MZI1, 1 MZI3, 2 MZI5, 4 MZI2, 5 MZI4 (see lucc_top).
package tb_topo_pkg;

  typedef enum int {BENES8, SB4} topo_e;

  typedef struct {
    int          dest;
    logic [31:0] visited;
  } walk_t;

  function automatic walk_t walk(topo_e topo, int s, logic [31:0] cfg);
    walk_t r;
    int st, sw, ip, op, nst, nsw, nip, sps, b;
    bit done;
    r.visited = '0;
    r.dest    = -1;
    sps = (topo == BENES8) ? 4 : 2;
    st = 0; sw = s / 2; ip = s % 2; done = 0;
    for (int guard = 0; guard < 8 && !done; guard++) begin
      r.visited[st * sps + sw] = 1'b1;
      op = ip ^ int'(cfg[st * sps + sw]);
      nst = st + 1; nsw = -1; nip = 0;
      if (topo == BENES8) begin
        b = (sw / 2) * 2;
        case (st)
          0: begin nsw = 2 * op + sw / 2; nip = sw % 2; end
          1: begin nsw = b + op;          nip = sw % 2; end
          2: begin nsw = b + op;          nip = sw % 2; end
          3: begin nsw = 2 * (sw % 2) + op; nip = b / 2; end
          default: begin r.dest = 2 * sw + op; done = 1; end
        endcase
      end else begin
        case (st * 2 + sw)
          0: if (op == 0) begin nst = 2; nsw = 0; nip = 0; end
             else         begin nst = 1; nsw = 0; nip = 0; end
          1: if (op == 0) begin nst = 1; nsw = 0; nip = 1; end
             else         begin nst = 2; nsw = 1; nip = 1; end
          2: if (op == 0) begin nst = 2; nsw = 0; nip = 1; end
             else         begin nst = 2; nsw = 1; nip = 0; end
          default: begin r.dest = 2 * sw + op; done = 1; end
        endcase
      end
      st = nst; sw = nsw; ip = nip;
    end
    return r;
  endfunction

endpackage
