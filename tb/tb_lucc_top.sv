// tb_lucc_top: end-to-end test of the prototype (four sources, controller,
// voltage control module) with a behavioural model of the five-MZI switch.
// The top keeps all its default parameters.
//
// Every cycle, for each source that is sending, the light must leave the
// switch at the output that source asked for, and the bits seen there must
// equal that source's PRBS-7 sequence, generated here independently.
// Phases:
//   1 I1 -> O2 alone, three messages: LinkReq rises at edge k-1, is
//     captured at edge k, Ack rises at k+1, first payload bit in the cycle
//     after Ack.
//   2 I1 and I2 both to O2, each resending after every message: the two
//     must take turns (destination conflict resolved by round robin).
//   3 I1 -> O3 together with I2 -> O4: both need MZI1, in different states,
//     so one waits although the destinations differ (internal blocking).
//   4 random traffic on all four inputs.
//   5 MZI drive: codes follow the states, sigma-delta density equals code.
// Each mechanism (one-cycle grant, destination conflict, internal blocking,
// path release and handover, MZI drive) is counted and must occur.
module tb_lucc_top;
  import tb_topo_pkg::*;
  localparam int N = 4;
  localparam logic [3:0][6:0] SEEDS = {7'h4d, 7'h2b, 7'h19, 7'h7f};
  int checks = 0, failures = 0;
  int n_fast = 0, n_conflict = 0, n_blocked = 0, n_release = 0, n_bits = 0, n_alternate = 0;

  logic clk = 0, rst_n = 0;
  logic [N-1:0]          cmd_valid, cmd_ready, done, tx_on, tx_bit, link_req, ack, conflict, blocked;
  logic [N-1:0][1:0]     cmd_dst;
  logic [N-1:0][15:0]    cmd_len;
  logic [4:0]            mzi_cross, mzi_drive;
  logic [4:0][7:0]       mzi_code;

  lucc_top dut (.*);

  logic [3:0] out_on, out_bit;
  int         src [4];
  logic       collision;
  photonic_switch_model u_sw (.in_on(tx_on), .in_bit(tx_bit), .mzi_cross,
                              .out_on, .out_bit, .src, .collision);

  always #5 clk = ~clk;

  logic [6:0] ref_prbs [N];
  int         want_dst [N];
  int         req_edge [N];
  int         edge_no = 0;
  int         last_o2 = -1;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor, just after each edge
  always @(posedge clk) if (rst_n) begin
    edge_no++;
    #1;
    if (conflict != '0) n_conflict++;
    n_blocked += $countones(blocked);
    check(!collision, "two inputs lit one output");
    for (int i = 0; i < N; i++) begin
      if (link_req[i]) req_edge[i] = edge_no;
      if (ack[i]) begin
        // LinkReq rises at edge req_edge, is captured at the next edge and
        // granted one cycle later
        if (edge_no == req_edge[i] + 2) n_fast++;
        check(edge_no > req_edge[i], "Ack before request");
      end
      if (dut.u_lucc.tail_ack[i]) n_release++;
      if (tx_on[i]) begin
        automatic int j = want_dst[i];
        check(out_on[j] && src[j] == i, $sformatf("I%0d light not at O%0d", i + 1, j + 1));
        check(out_bit[j] == ref_prbs[i][6], $sformatf("O%0d payload bit from I%0d", j + 1, i + 1));
        ref_prbs[i] = {ref_prbs[i][5:0], ref_prbs[i][6] ^ ref_prbs[i][5]};
        n_bits++;
        if (j == 1) begin
          if (last_o2 >= 0 && last_o2 != i) n_alternate++;
          last_o2 = i;
        end
      end
    end
  end

  task automatic send(int i, int d, int len);
    @(negedge clk);
    while (!cmd_ready[i]) @(negedge clk);
    cmd_valid[i] = 1; cmd_dst[i] = 2'(d); cmd_len[i] = 16'(len); want_dst[i] = d;
    @(negedge clk);
    cmd_valid[i] = 0;
  endtask

  task automatic wait_idle();
    repeat (2) @(negedge clk);
    while (cmd_ready != '1) @(negedge clk);
  endtask

  initial begin
    int e_req, e_ack, e_bit, ones;
    cmd_valid = '0; cmd_dst = '0; cmd_len = '0;
    for (int i = 0; i < N; i++) begin ref_prbs[i] = SEEDS[i]; want_dst[i] = 0; req_edge[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;

    // 1 I1 -> O2 alone
    for (int m = 0; m < 3; m++) begin
      send(0, 1, 16);
      e_req = -1; e_ack = -1; e_bit = -1;
      while (e_bit < 0) begin
        @(posedge clk); #2;
        if (ack[0]) begin e_ack = edge_no; e_req = req_edge[0]; end
        if (tx_on[0] && e_bit < 0) e_bit = edge_no;
      end
      check(e_ack == e_req + 2, $sformatf("Ack %0d cycles after LinkReq capture", e_ack - e_req - 1));
      check(e_bit == e_ack + 1, "payload starts the cycle after Ack");
      wait_idle();
    end

    // 2 I1 and I2 contend for O2, repeatedly
    last_o2 = -1; n_alternate = 0;
    fork
      for (int m = 0; m < 6; m++) send(0, 1, 24);
      for (int m = 0; m < 6; m++) send(1, 1, 24);
    join
    wait_idle();
    check(n_alternate >= 10, $sformatf("I1 and I2 alternated %0d times on O2", n_alternate));

    // 3 internal blocking: I1 -> O3 and I2 -> O4 at once
    begin
      int b0 = n_blocked;
      fork
        send(0, 2, 20);
        send(1, 3, 20);
      join
      wait_idle();
      check(n_blocked > b0, "I1->O3 and I2->O4 did not contend for MZI1");
    end

    // 4 random traffic
    fork
      for (int m = 0; m < 60; m++) send(0, $urandom % 4, 1 + $urandom % 30);
      for (int m = 0; m < 60; m++) send(1, $urandom % 4, 1 + $urandom % 30);
      for (int m = 0; m < 60; m++) send(2, $urandom % 4, 1 + $urandom % 30);
      for (int m = 0; m < 60; m++) send(3, $urandom % 4, 1 + $urandom % 30);
    join
    wait_idle();

    // 5 MZI drive for the state left by the last paths
    repeat (2) @(posedge clk);
    #1;
    for (int m = 0; m < 5; m++) begin
      check(mzi_code[m] == (mzi_cross[m] ? 8'd192 : 8'd0), $sformatf("MZI%0d code", m + 1));
      ones = 0;
      repeat (256) begin @(posedge clk); #1; ones += int'(mzi_drive[m]); end
      check(ones == int'(mzi_code[m]), $sformatf("MZI%0d drive density %0d", m + 1, ones));
    end

    $display("bits delivered %0d, one-cycle grants %0d, conflict cycles %0d, blocked %0d, releases %0d",
             n_bits, n_fast, n_conflict, n_blocked, n_release);
    check(n_fast > 0, "no one-cycle grant");
    check(n_conflict > 0, "no destination conflict");
    check(n_blocked > 0, "no internal blocking");
    check(n_release > 0, "no path release");
    check(n_bits > 1000, "too little payload");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
