// tb_lucc_dsb: random test of the dynamic setup block with the 8x8 Benes table.
//
// Each cycle some idle sources are granted, with distinct destinations that no
// established path holds (as the conflict resolution block guarantees), and
// some established paths are released. A reference model expands the routes,
// attributes paths in index order and predicts accept/blocked, the held
// elements and their states. After every edge each established path is
// followed through an independent model of the Benes wiring and must reach
// its destination with the element states the block drives.
module tb_lucc_dsb;
  import tb_topo_pkg::*;
  localparam int N = 8, NSE = 20;
  int checks = 0, failures = 0, n_blocked = 0, n_accept = 0;

  logic clk = 0, rst_n = 0;
  logic [N-1:0][2:0]  dst;
  logic [N-1:0]       grant, release_path, accept, blocked;
  logic [N-1:0][5:0]  lut_addr;
  logic [N-1:0][19:0] lut_data;
  logic [NSE-1:0]     se_cross, se_used;

  lucc_dsb dut (.*);
  lucc_lut u_lut (.addr(lut_addr), .data(lut_data));

  always #5 clk = ~clk;

  int          m_held_src [N];   // -1 none, else destination held
  logic [31:0] m_mask [N];
  logic [31:0] m_state;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  function automatic void expand(logic [19:0] e, output logic [31:0] mask, output logic [31:0] st);
    mask = '0; st = '0;
    for (int k = 0; k < 5; k++) begin
      logic [3:0] f = e[k*4 +: 4];
      if (f[0]) begin
        mask[k * 4 + int'(f[2:1])] = 1'b1;
        st[k * 4 + int'(f[2:1])]   = f[3];
      end
    end
  endfunction

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] used, st, m, s;
    logic [N-1:0] out_taken, e_acc;
    walk_t w;
    grant = '0; release_path = '0; dst = '0;
    for (int i = 0; i < N; i++) begin m_held_src[i] = -1; m_mask[i] = '0; end
    m_state = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #2;
    for (int t = 0; t < 3000; t++) begin
      // releases
      for (int i = 0; i < N; i++)
        release_path[i] = (m_held_src[i] >= 0) && ($urandom % 3 == 0);
      out_taken = '0;
      for (int i = 0; i < N; i++)
        if (m_held_src[i] >= 0 && !release_path[i]) out_taken[m_held_src[i]] = 1'b1;
      // grants: idle sources, distinct free destinations
      grant = '0;
      for (int i = 0; i < N; i++) begin
        dst[i] = 3'($urandom);
        if (m_held_src[i] < 0 && !out_taken[dst[i]] && ($urandom % 2 == 0)) begin
          grant[i] = 1'b1;
          out_taken[dst[i]] = 1'b1;
        end else if (m_held_src[i] >= 0) begin
          dst[i] = 3'(m_held_src[i]);
        end
      end
      #1;
      // model attribution
      used = '0;
      for (int i = 0; i < N; i++) if (m_held_src[i] >= 0 && !release_path[i]) used |= m_mask[i];
      st = m_state; e_acc = '0;
      for (int i = 0; i < N; i++) begin
        check(lut_addr[i] == 6'(i * 8 + int'(dst[i])), "lut address");
        if (grant[i]) begin
          expand(lut_data[i], m, s);
          if (((used & m) & (st ^ s)) == '0) begin
            e_acc[i] = 1'b1; used |= m; st = (st & ~m) | (s & m);
          end
        end
      end
      check(accept == e_acc, $sformatf("accept %b expected %b", accept, e_acc));
      check(blocked == (grant & ~e_acc), "blocked");
      n_blocked += $countones(blocked);
      n_accept  += $countones(accept);
      for (int i = 0; i < N; i++) begin
        if (e_acc[i]) begin
          expand(lut_data[i], m, s);
          m_held_src[i] = int'(dst[i]); m_mask[i] = m;
        end else if (release_path[i]) begin
          m_held_src[i] = -1; m_mask[i] = '0;
        end
      end
      m_state = st;
      @(posedge clk);
      #2;
      grant = '0; release_path = '0;
      check(32'(se_cross) == m_state, "element states");
      used = '0;
      for (int i = 0; i < N; i++) used |= m_mask[i];
      check(32'(se_used) == used, "elements in use");
      for (int i = 0; i < N; i++)
        if (m_held_src[i] >= 0) begin
          w = walk(BENES8, i, 32'(se_cross));
          check(w.dest == m_held_src[i], $sformatf("path %0d->%0d reaches %0d", i, m_held_src[i], w.dest));
        end
    end
    check(n_blocked > 0 && n_accept > 0, "both accepted and blocked paths seen");
    $display("accepted %0d blocked %0d", n_accept, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
