// tb_lucc_vcm: checks the voltage control module (5 MZIs, 8-bit codes).
//
// For random bar/cross patterns held for 512 cycles, every MZI's code must
// be its bar or cross calibration value one cycle after the state changes,
// and each window of 256 cycles of its sigma-delta stream must hold exactly
// that many ones. Per-MZI codes are overridden to distinct values to catch
// mixed-up MZIs.
module tb_lucc_vcm;
  localparam int NMZI = 5, CW = 8;
  localparam logic [NMZI-1:0][CW-1:0] BARS   = {8'd3, 8'd10, 8'd0, 8'd25, 8'd7};
  localparam logic [NMZI-1:0][CW-1:0] CROSSES = {8'd200, 8'd129, 8'd255, 8'd64, 8'd191};
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic [NMZI-1:0]         mzi_cross;
  logic [NMZI-1:0][CW-1:0] code;
  logic [NMZI-1:0]         drive;

  lucc_vcm #(.NMZI(NMZI), .CW(CW), .BAR_CODE(BARS), .CROSS_CODE(CROSSES)) dut (.*);

  // default-parameter instance: bar = 0, cross = 192
  logic [NMZI-1:0][CW-1:0] code_d;
  logic [NMZI-1:0]         drive_d;
  lucc_vcm dut_d (.clk, .rst_n, .mzi_cross, .code(code_d), .drive(drive_d));

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

  initial begin
    int ones [NMZI];
    mzi_cross = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      @(negedge clk);
      mzi_cross = NMZI'($urandom);
      if (t == 0) mzi_cross = '1;
      @(posedge clk); #1;
      for (int m = 0; m < NMZI; m++) begin
        check(code[m] == (mzi_cross[m] ? CROSSES[m] : BARS[m]), $sformatf("code mzi%0d", m + 1));
        check(code_d[m] == (mzi_cross[m] ? 8'd192 : 8'd0), "default code");
      end
      repeat (255) @(posedge clk);
      for (int m = 0; m < NMZI; m++) ones[m] = 0;
      repeat (256) begin
        @(posedge clk); #1;
        for (int m = 0; m < NMZI; m++) ones[m] += int'(drive[m]);
      end
      for (int m = 0; m < NMZI; m++)
        check(ones[m] == int'(code[m]), $sformatf("mzi%0d density %0d vs code %0d", m + 1, ones[m], code[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
