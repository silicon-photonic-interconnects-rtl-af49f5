// tb_lucc_tx: checks one traffic source against a scripted controller.
//
// For several messages of random destination and length, with random Ack
// and TailAck delays, it checks: a single-cycle LinkReq with the commanded
// destination; no payload before Ack; tx_on for exactly the commanded number
// of cycles starting the cycle after Ack; the payload equal to an
// independently generated PRBS-7 sequence continuing across messages; a
// single Tail right after the last bit; done only after TailAck.
module tb_lucc_tx;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, done, link_req, ack, tail, tail_ack, tx_on, tx_bit;
  logic [1:0]  cmd_dst, link_dst;
  logic [15:0] cmd_len;

  lucc_tx #(.SEED(7'h35)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [6:0] ref_prbs = 7'h35;

  initial begin
    int len, dly, on_cnt;
    logic [1:0] d;
    cmd_valid = 0; cmd_dst = '0; cmd_len = '0; ack = 0; tail_ack = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int msg = 0; msg < 20; msg++) begin
      len = 1 + $urandom % 40;
      d   = 2'($urandom);
      @(negedge clk);
      check(cmd_ready, "ready when idle");
      cmd_valid = 1; cmd_dst = d; cmd_len = 16'(len);
      @(posedge clk); #1;
      cmd_valid = 0;
      check(link_req && link_dst == d, "LinkReq with destination");
      check(!cmd_ready, "busy after command");
      dly = $urandom % 5;
      repeat (dly) begin
        @(posedge clk); #1;
        check(!link_req && !tx_on, "wait for Ack");
      end
      @(negedge clk); ack = 1;
      @(posedge clk); #1; ack = 0;
      on_cnt = 0;
      while (tx_on) begin
        check(tx_bit == ref_prbs[6], "payload bit");
        ref_prbs = {ref_prbs[5:0], ref_prbs[6] ^ ref_prbs[5]};
        on_cnt++;
        @(posedge clk); #1;
      end
      check(on_cnt == len, $sformatf("payload length %0d vs %0d", on_cnt, len));
      check(tail, "Tail after last bit");
      dly = $urandom % 4;
      repeat (dly) begin
        @(posedge clk); #1;
        check(!tail && !done, "wait for TailAck");
      end
      @(negedge clk); tail_ack = 1;
      @(posedge clk); #1; tail_ack = 0;
      check(done, "done after TailAck");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
