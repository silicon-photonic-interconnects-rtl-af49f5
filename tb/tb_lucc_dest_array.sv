// tb_lucc_dest_array: random handshake test of the destination array (8 ports).
//
// Random LinkReq, accept and Tail pulses are driven; a reference model tracks
// each entry (IDLE/PENDING/ACTIVE, destination) and predicts pending, active,
// dst, release_path and the registered Ack/TailAck pulses one cycle later.
// accept is only driven for pending entries and tail only for active ones,
// as the other blocks guarantee.
module tb_lucc_dest_array;
  localparam int N = 8;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic [N-1:0]      link_req, tail, accept, pending, active, release_path, ack, tail_ack;
  logic [N-1:0][2:0] link_dst, dst;

  int          m_state [N];   // 0 idle, 1 pending, 2 active
  logic [2:0]  m_dst   [N];
  logic [N-1:0] m_ack, m_tack;

  lucc_dest_array dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    link_req = '0; tail = '0; accept = '0; link_dst = '0;
    for (int i = 0; i < N; i++) begin m_state[i] = 0; m_dst[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    #2;
    for (int t = 0; t < 3000; t++) begin
      // drive
      for (int i = 0; i < N; i++) begin
        link_req[i] = ($urandom % 3 == 0);
        link_dst[i] = 3'($urandom);
        accept[i]   = (m_state[i] == 1) && ($urandom % 2 == 0);
        tail[i]     = (m_state[i] == 2) && ($urandom % 4 == 0);
      end
      #1;
      for (int i = 0; i < N; i++) begin
        check(pending[i] == (m_state[i] == 1), "pending");
        check(active[i] == (m_state[i] == 2), "active");
        check(release_path[i] == ((m_state[i] == 2) && tail[i]), "release_path");
        if (m_state[i] != 0) check(dst[i] == m_dst[i], "dst");
      end
      // model update
      m_ack = '0; m_tack = '0;
      for (int i = 0; i < N; i++) begin
        case (m_state[i])
          0: if (link_req[i]) begin m_state[i] = 1; m_dst[i] = link_dst[i]; end
          1: if (accept[i]) begin m_state[i] = 2; m_ack[i] = 1'b1; end
          2: if (tail[i]) begin m_state[i] = 0; m_tack[i] = 1'b1; end
          default: ;
        endcase
      end
      @(posedge clk);
      #2;
      check(ack == m_ack, $sformatf("ack %b expected %b", ack, m_ack));
      check(tail_ack == m_tack, $sformatf("tail_ack %b expected %b", tail_ack, m_tack));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
