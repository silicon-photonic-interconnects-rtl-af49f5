// tb_lucc_lut: checks every route stored in the two route tables.
//
// For each (source, destination) the entry is read, its fields are turned into
// element states, and a light path is followed through an independent model of
// the network wiring (tb_topo_pkg). The path must reach the destination and
// cross exactly the elements the entry lists. Every read port is exercised.
// The Benes table must also make the complement pattern and every cyclic
// shift need no element in two states.
module tb_lucc_lut;
  import tb_topo_pkg::*;

  int checks = 0, failures = 0;

  // 8x8 Benes (defaults)
  logic [7:0][5:0]  addr_b;
  logic [7:0][19:0] data_b;
  lucc_lut dut_b (.addr(addr_b), .data(data_b));

  // 4x4 five-MZI switch
  logic [3:0][3:0]  addr_s;
  logic [3:0][8:0]  data_s;
  lucc_lut #(.N(4), .NSTAGE(3), .SPS(2), .TOPO(lucc_pkg::TOPO_SB4)) dut_s
    (.addr(addr_s), .data(data_s));

  logic [63:0][19:0] benes_tab;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // expand a path-list entry into element mask and states
  function automatic void expand(logic [31:0] e, int nstage, int sps, int eb,
                                 output logic [31:0] mask, output logic [31:0] st);
    int fw = eb + 2;
    mask = '0; st = '0;
    for (int k = 0; k < nstage; k++) begin
      logic [31:0] f;
      f = (e >> (k * fw)) & ((32'd1 << fw) - 1);
      if (f[0]) begin
        mask[k * sps + int'((f >> 1) & ((32'd1 << eb) - 1))] = 1'b1;
        st[k * sps + int'((f >> 1) & ((32'd1 << eb) - 1))]   = f[eb + 1];
      end
    end
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] m, st;
    walk_t w;
    for (int s = 0; s < 8; s++)
      for (int d = 0; d < 8; d++) begin
        for (int p = 0; p < 8; p++) addr_b[p] = 6'((s * 8 + d + p * 9) % 64);
        #1;
        benes_tab[s * 8 + d] = data_b[0];
        for (int p = 1; p < 8; p++) begin
          automatic int a = (s * 8 + d + p * 9) % 64;
          if (a < s * 8 + d) check(data_b[p] == benes_tab[a], $sformatf("benes port %0d addr %0d", p, a));
        end
        expand(32'(data_b[0]), 5, 4, 2, m, st);
        w = walk(BENES8, s, st);
        check(w.dest == d, $sformatf("benes %0d->%0d reaches %0d", s, d, w.dest));
        check(w.visited == m, $sformatf("benes %0d->%0d elements %h vs %h", s, d, w.visited, m));
        check($countones(m) == 5, $sformatf("benes %0d->%0d length", s, d));
      end
    // complement and cyclic shifts: no element needed in two states
    for (int k = 0; k <= 8; k++) begin
      logic [31:0] used, state;
      automatic bit ok = 1;
      used = '0; state = '0;
      for (int s = 0; s < 8; s++) begin
        automatic int d = (k == 8) ? 7 - s : (s + k) % 8;
        expand(32'(benes_tab[s * 8 + d]), 5, 4, 2, m, st);
        if (((used & m) & (state ^ st)) != '0) ok = 0;
        used |= m;
        state = (state & ~m) | (st & m);
      end
      check(ok, $sformatf("benes pattern %0d not conflict-free", k));
    end
    for (int s = 0; s < 4; s++)
      for (int d = 0; d < 4; d++) begin
        for (int p = 0; p < 4; p++) addr_s[p] = 4'(s * 4 + d);
        #1;
        for (int p = 1; p < 4; p++) check(data_s[p] == data_s[0], "sb4 port");
        expand(32'(data_s[0]), 3, 2, 1, m, st);
        w = walk(SB4, s, st);
        check(w.dest == d, $sformatf("sb4 %0d->%0d reaches %0d", s, d, w.dest));
        check(w.visited == m, $sformatf("sb4 %0d->%0d elements %h vs %h", s, d, w.visited, m));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
