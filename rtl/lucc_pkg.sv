// lucc_pkg: constants and types shared by the LUCC controller blocks.
//
// LUCC is a centralized, lookup-table-based controller for a photonic switch
// made of 2x2 switching elements (SEs, e.g. Mach-Zehnder interferometers).
// Each SE is either in the BAR state (upper in -> upper out) or the CROSS state
// (upper in -> lower out). Routes are computed off-line and stored in a table;
// at run time the controller resolves destination conflicts and applies the
// stored routes within one clock cycle.
//
// Route table entry format ("path list"): the entry for a (source, destination)
// pair holds one field per stage of the switch. A field is
//   {state, element, valid}
// where valid says whether the route crosses that stage, element is the index
// of the SE within the stage and state is BAR (0) or CROSS (1). The entry of a
// route is therefore NSTAGE * (EB + 2) bits wide, with EB = element index bits.
// SEs are numbered globally as slot = stage * SPS + element, SPS being the
// number of SE positions per stage.
//
// The package also describes the wiring of the supported switch topologies
// (next_hop) and computes the route of a (source, destination) pair from it
// (route_entry); the route table is built from these at elaboration time.
package lucc_pkg;

  // Supported switch topologies
  typedef enum logic [1:0] {
    TOPO_BENES = 2'd0,  // N x N Benes network, N a power of two
    TOPO_SB4   = 2'd1   // 4x4 switch of five MZIs of the LUCC prototype
  } topo_e;

  // SE states
  localparam logic SE_BAR   = 1'b0;
  localparam logic SE_CROSS = 1'b1;

  // State of one entry of the destination array
  typedef enum logic [1:0] {
    DA_IDLE    = 2'd0,  // no request from this source
    DA_PENDING = 2'd1,  // request captured, waiting for a path
    DA_ACTIVE  = 2'd2   // path established, message in flight
  } da_state_e;

  // Bits used to number the SEs inside one stage
  function automatic int unsigned elem_bits(int unsigned sps);
    return (sps > 1) ? $clog2(sps) : 1;
  endfunction

  // Width of one stage field of a route table entry
  function automatic int unsigned field_bits(int unsigned sps);
    return elem_bits(sps) + 2;
  endfunction

  // Width of a whole route table entry
  function automatic int unsigned entry_bits(int unsigned nstage, int unsigned sps);
    return nstage * field_bits(sps);
  endfunction

  // Wiring: where output port op of element e in stage st leads.
  // Either to an output port of the switch (is_out, port in ne) or to input
  // port nip of element ne in stage nst (returned as a hop_t). Input s of the switch enters element
  // s/2 of stage 0 at port s%2.
  //
  // Benes, N = 2^L, stages 0 .. 2L-2, N/2 elements per stage, built
  // recursively from two half-size Benes networks between an input and an
  // output stage:
  //   st < L-1 : the element is an input stage element of a sub-network of
  //              size M = N >> st (elements B .. B+M/2-1, i = e - B); output
  //              op goes to the upper (op=0) or lower half-size sub-network,
  //              at its input i: element B + op*M/4 + i/2, port i%2.
  //   st >= L-1: the element is the output stage of a sub-network of size
  //              M = 2^(st-L+2) (a single element for st = L-1), which is the
  //              upper or lower half of a network of size 2M whose output
  //              stage (stage st+1) holds elements B .. B+M-1, B = (e/M)*M.
  //              Output j = 2*((e-B) % (M/2)) + op of the half feeds element
  //              B + j, at port 0 from the upper half, port 1 from the lower.
  //   st = 2L-2: output port 2e + op.
  // SB4 (3 stages of 2 positions: {MZI1, MZI3}, {MZI5, -}, {MZI2, MZI4}):
  //   MZI1 out0 -> MZI2 in0, out1 -> MZI5 in0; MZI3 out0 -> MZI5 in1,
  //   out1 -> MZI4 in1; MZI5 out0 -> MZI2 in1, out1 -> MZI4 in0;
  //   MZI2 -> outputs 0, 1; MZI4 -> outputs 2, 3.
  typedef struct packed {
    logic is_out;  // leads to an output port of the switch
    int   nst;     // next stage
    int   ne;      // next element, or output port when is_out
    int   nip;     // input port of the next element
  } hop_t;

  function automatic hop_t next_hop(topo_e topo, int n, int st, int e, int op);
    int l, m, b, i;
    bit is_out;
    int nst, ne, nip;
    is_out = 1'b0; nst = st + 1; ne = 0; nip = 0;
    if (topo == TOPO_BENES) begin
      l = $clog2(n);
      if (st >= 2 * l - 2) begin
        is_out = 1'b1; ne = 2 * e + op;
      end else if (st < l - 1) begin
        m = n >> st;
        b = (e / (m / 2)) * (m / 2);
        i = e - b;
        ne = b + op * (m / 4) + i / 2;
        nip = i % 2;
      end else begin
        m = 1 << (st - l + 2);
        b = (e / m) * m;
        ne  = b + 2 * ((e - b) % (m / 2)) + op;
        nip = (e - b) / (m / 2);
      end
    end else begin
      unique case (st * 2 + e)
        0: begin nst = (op == 0) ? 2 : 1; ne = 0; nip = 0; end
        1: begin nst = (op == 0) ? 1 : 2; ne = (op == 0) ? 0 : 1; nip = 1; end
        2: begin nst = 2; ne = op; nip = (op == 0) ? 1 : 0; end
        default: begin is_out = 1'b1; ne = 2 * e + op; end
      endcase
    end
    return '{is_out: is_out, nst: nst, ne: ne, nip: nip};
  endfunction

  // Off-line routing of one (source, destination) pair, in path-list form.
  // All state sequences are tried in lexicographic order (bar before cross,
  // first element first), which visits the paths from s in depth-first
  // order; the first shortest path that reaches d is kept. For a Benes
  // network this keeps the first L-1 stages in bar and routes the last L
  // stages by destination, which sets up the complement pattern and every
  // cyclic shift d = s + k mod N without two paths needing one element in
  // different states.
  function automatic logic [63:0] route_entry(topo_e topo, int n, int nstage,
                                              int sps, int s, int d);
    logic [63:0] best, cur;
    int best_len, fw, st, e, ip, op, len, reached;
    bit state;
    hop_t h;
    fw = int'(field_bits(sps));
    best = '0;
    best_len = nstage + 1;
    for (int c = 0; c < (1 << nstage); c++) begin
      st = 0; e = s / 2; ip = s % 2; cur = '0; reached = -1; len = 0;
      for (int k = 0; k < nstage && reached < 0; k++) begin
        state = c[nstage - 1 - k];
        op    = ip ^ int'(state);
        cur  |= ((64'(state) << (fw - 1)) | (64'(e) << 1) | 64'd1) << (st * fw);
        h   = next_hop(topo, n, st, e, op);
        len = k + 1;
        if (h.is_out) reached = h.ne;
        st = h.nst; e = h.ne; ip = h.nip;
      end
      if (reached == d && len < best_len) begin
        best = cur; best_len = len;
      end
    end
    return best;
  endfunction

endpackage
