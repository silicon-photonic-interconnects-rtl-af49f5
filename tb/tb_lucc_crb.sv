// tb_lucc_crb: random test of the conflict resolution block (8 ports).
//
// Each cycle random pending requests, destinations, busy outputs and accepted
// grants are driven. A reference model keeps its own round-robin pointer per
// output and predicts the request matrix, the per-output conflict flags and
// the grants; directed cases first check that all inputs asking for one
// output are served in round-robin order.
module tb_lucc_crb;
  localparam int N = 8;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic [N-1:0]        pending, out_busy, accepted, conflict, grant;
  logic [N-1:0][2:0]   dst;
  logic [N-1:0][N-1:0] req_matrix;
  int ptr_m [N];

  lucc_crb dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model: expected grants for current inputs
  function automatic logic [N-1:0] model_grant();
    logic [N-1:0] g = '0;
    for (int j = 0; j < N; j++) begin
      if (out_busy[j]) continue;
      for (int k = 0; k < N; k++) begin
        int i = (ptr_m[j] + k) % N;
        if (pending[i] && dst[i] == 3'(j)) begin g[i] = 1'b1; break; end
      end
    end
    return g;
  endfunction

  task automatic step_and_check(bit acc_all);
    logic [N-1:0] eg;
    int cnt;
    #1;
    eg = model_grant();
    for (int j = 0; j < N; j++) begin
      cnt = 0;
      for (int i = 0; i < N; i++) begin
        if (pending[i] && dst[i] == 3'(j)) cnt++;
        check(req_matrix[i][j] == (pending[i] && dst[i] == 3'(j)), "R matrix");
      end
      check(conflict[j] == (cnt > 1), $sformatf("conflict[%0d]", j));
    end
    check(grant == eg, $sformatf("grant %b expected %b", grant, eg));
    accepted = acc_all ? grant : (grant & N'($urandom));
    #1;
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++)
        if (eg[i] && accepted[i] && dst[i] == 3'(j)) ptr_m[j] = (i + 1) % N;
    @(posedge clk);
    #2;
  endtask

  initial begin
    for (int j = 0; j < N; j++) ptr_m[j] = 0;
    pending = '0; dst = '0; out_busy = '0; accepted = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #2;
    // directed: every input wants output 2, served one by one in RR order
    pending = '1;
    for (int i = 0; i < N; i++) dst[i] = 3'd2;
    for (int r = 0; r < N; r++) begin
      #1;
      check(grant == N'(1 << r), $sformatf("RR order round %0d grant %b", r, grant));
      step_and_check(1);
      pending[r] = 1'b0;
    end
    // busy output blocks its grants
    pending = '1; out_busy = 8'h04;
    #1 check(grant == '0, "busy output granted");
    out_busy = '0;
    // random
    for (int t = 0; t < 2000; t++) begin
      pending  = N'($urandom);
      out_busy = N'($urandom) & N'($urandom);
      for (int i = 0; i < N; i++) dst[i] = 3'($urandom);
      step_and_check(0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
