// tb_lucc: end-to-end test of the controller on the 8x8 Benes network.
//
// Sources are modelled by the testbench (LinkReq / Ack / Tail / TailAck).
// After every clock edge each established path is followed through an
// independent model of the Benes wiring with the element states the
// controller drives, and must reach its destination.
// Phases:
//   1 single request: Ack and switch state exactly one cycle after the
//     request is captured; message time CL + Nob * TD reported for 128, 256
//     and 512 bit messages.
//   2 complement pattern (d = 7 - s), all eight at once: all granted in the
//     same cycle.
//   3 all-to-all: the eight cyclic shifts d = s + k, each all at once, each
//     granted in one cycle.
//   4 contention: all eight sources ask for output 2; they must be served
//     one at a time in round-robin order.
//   5 random traffic with random message lengths: every request must be
//     granted within a bound; destination conflicts and paths blocked inside
//     the network must both occur.
module tb_lucc;
  import tb_topo_pkg::*;
  localparam int N = 8;
  localparam real TCLK_NS = 3.7;   // clock period of the FPGA prototype
  localparam real TD_NS   = 0.2;   // optical transmission time per bit
  int checks = 0, failures = 0;
  int n_conflict = 0, n_blocked = 0, n_grants = 0;

  logic clk = 0, rst_n = 0;
  logic [N-1:0]      link_req, tail, ack, tail_ack, conflict, blocked;
  logic [N-1:0][2:0] link_dst;
  logic [19:0]       se_cross, se_used;

  lucc dut (.*);

  always #5 clk = ~clk;

  // source model
  int   act_dst [N];   // destination of established path, -1 none
  int   req_dst [N];   // destination asked for, -1 none
  int   req_age [N];
  int   hold    [N];
  int   last_to2 = -1;   // last source granted output 2

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // after each edge: follow the source model and check all established paths
  always @(posedge clk) if (rst_n) begin
    #1;
    n_conflict += (conflict != '0) ? 1 : 0;
    n_blocked  += $countones(blocked);
    for (int i = 0; i < N; i++) begin
      if (tail_ack[i]) check(act_dst[i] == -2, "TailAck without Tail");
      if (tail_ack[i]) act_dst[i] = -1;
      if (ack[i]) begin
        check(req_dst[i] >= 0, "Ack without request");
        act_dst[i] = req_dst[i];
        if (req_dst[i] == 2) last_to2 = i;
        req_dst[i] = -1;
        n_grants++;
      end
    end
    for (int i = 0; i < N; i++)
      if (act_dst[i] >= 0) begin
        automatic walk_t w = walk(BENES8, i, 32'(se_cross));
        check(w.dest == act_dst[i], $sformatf("path %0d->%0d reaches %0d", i, act_dst[i], w.dest));
        for (int k = i + 1; k < N; k++)
          check(act_dst[k] != act_dst[i], "two paths to one output");
      end
  end

  // pulse LinkReq for the sources in mask; drive at negedge, captured at next posedge
  task automatic request(logic [N-1:0] mask, int d [N]);
    @(negedge clk);
    for (int i = 0; i < N; i++) if (mask[i]) begin
      link_req[i] = 1; link_dst[i] = 3'(d[i]); req_dst[i] = d[i]; req_age[i] = 0;
    end
    @(negedge clk);
    link_req = '0;
  endtask

  task automatic release_all();
    @(negedge clk);
    for (int i = 0; i < N; i++) if (act_dst[i] >= 0) begin tail[i] = 1; act_dst[i] = -2; end
    @(negedge clk);
    tail = '0;
    @(negedge clk);
  endtask

  // the pattern d[] must be fully granted exactly one cycle after capture
  task automatic one_shot(int d [N], string name);
    request('1, d);              // captured at posedge between the two negedges
    // now after capture edge + half cycle; Ack appears at the next posedge
    check(ack == '0, {name, ": Ack too early"});
    @(posedge clk); #2;
    check(ack == '1, $sformatf("%s: Ack %b one cycle after request", name, ack));
    release_all();
  endtask

  initial begin
    int d [N];
    int t0, cl, first2;
    link_req = '0; tail = '0; link_dst = '0;
    for (int i = 0; i < N; i++) begin act_dst[i] = -1; req_dst[i] = -1; end
    repeat (2) @(posedge clk);
    rst_n = 1;

    // 1 single request, latency
    foreach (d[i]) d[i] = 5;
    @(negedge clk);
    link_req[3] = 1; link_dst[3] = 3'd5; req_dst[3] = 5;
    @(posedge clk); t0 = $time; #1 link_req = '0;
    while (!ack[3]) begin @(posedge clk); #1; end
    cl = int'(($time - t0) / 10);
    check(cl == 1, $sformatf("control latency %0d cycles", cl));
    foreach (d[i]) d[i] = 0;
    for (int b = 128; b <= 512; b *= 2)
      $display("message %0d bits: total time = %0d x %.1f ns + %0d x %.1f ns = %.1f ns",
               b, cl, TCLK_NS, b, TD_NS, cl * TCLK_NS + b * TD_NS);
    @(posedge clk); #2;
    release_all();

    // 2 complement
    for (int i = 0; i < N; i++) d[i] = N - 1 - i;
    one_shot(d, "complement");

    // 3 all-to-all, one cyclic shift at a time
    for (int k = 0; k < N; k++) begin
      for (int i = 0; i < N; i++) d[i] = (i + k) % N;
      one_shot(d, $sformatf("shift %0d", k));
    end

    // 4 contention on output 2: round-robin order
    for (int i = 0; i < N; i++) d[i] = 2;
    first2 = last_to2 + 1;
    request('1, d);
    @(posedge clk); #2;
    for (int r = 0; r < N; r++) begin
      automatic int who = (first2 + r) % N;
      // the first grant comes one cycle after the requests, each next one at
      // the same edge that takes the previous Tail
      check(ack == N'(1 << who), $sformatf("contention round %0d: Ack %b, expected source %0d", r, ack, who));
      @(negedge clk);
      tail[who] = 1; act_dst[who] = -2;
      @(posedge clk); #2;
      tail = '0;
    end
    @(negedge clk);

    // 5 random traffic
    for (int i = 0; i < N; i++) hold[i] = 0;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      link_req = '0; tail = '0;
      for (int i = 0; i < N; i++) begin
        if (req_dst[i] >= 0) begin
          req_age[i]++;
          check(req_age[i] < 200, $sformatf("source %0d starved", i));
          if (req_age[i] >= 200) req_age[i] = -100000;
        end else if (act_dst[i] >= 0) begin
          if (hold[i] == 0) begin tail[i] = 1; act_dst[i] = -2; end
          else hold[i]--;
        end else if (act_dst[i] == -1 && $urandom % 4 == 0) begin
          link_req[i] = 1; link_dst[i] = 3'($urandom); req_dst[i] = int'(link_dst[i]);
          req_age[i] = 0; hold[i] = $urandom % 12;
        end
      end
    end
    @(negedge clk);
    link_req = '0; tail = '0;
    repeat (3) @(negedge clk);
    $display("grants %0d, cycles with a destination conflict %0d, blocked grants %0d",
             n_grants, n_conflict, n_blocked);
    check(n_conflict > 0, "no destination conflict happened");
    check(n_blocked > 0, "no path was blocked inside the network");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
