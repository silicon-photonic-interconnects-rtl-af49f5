// lucc_crb: conflict resolution block (CRB) of the LUCC controller.
//
// Every cycle the pending requests are mapped onto the request matrix R, with
// R[i][j] = 1 when input i requests output j. Column j is then checked: a
// conflict on output j is two or more rows set in that column. Each column has
// its own round-robin arbiter that grants one requester; the arbiter's pointer
// moves past the winner only when the dynamic setup block actually set up the
// winner's path (accepted). An output still held by an established connection
// (out_busy) is not granted. All of it is combinational: R is built straight
// from the destination array registers, so detection and arbitration take no
// extra cycle. Matrix method, conflict definition and round robin follow the
// published LUCC design; the pointer update rule and the busy-output rule are this design's.
module lucc_crb
  import lucc_pkg::*;
#(
  parameter int unsigned N  = 8,
  parameter int unsigned DW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         pending,
  input  logic [N-1:0][DW-1:0] dst,
  input  logic [N-1:0]         out_busy,  // output j held by an active path
  input  logic [N-1:0]         accepted,  // grants that obtained a path
  output logic [N-1:0][N-1:0]  req_matrix, // [i][j]: input i requests output j
  output logic [N-1:0]         conflict,   // per output j
  output logic [N-1:0]         grant       // per input i
);

  logic [N-1:0][DW-1:0] ptr;          // round-robin pointer per output
  logic [N-1:0][N-1:0]  col;          // col[j][i] = R[i][j]
  logic [N-1:0][N-1:0]  col_grant;    // col_grant[j][i]

  always_comb begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        req_matrix[i][j] = pending[i] && (int'(dst[i]) == j);
        col[j][i]        = req_matrix[i][j];
      end
  end

  // Conflict on output j: more than one request in column j
  always_comb begin
    for (int j = 0; j < N; j++)
      conflict[j] = (col[j] & (col[j] - 1'b1)) != '0;
  end

  // Round-robin pick per column, starting at ptr[j]
  // (scanning from the far end down to the pointer, the last hit wins)
  logic [DW-1:0] idx;
  always_comb begin
    col_grant = '0;
    idx       = 0;
    for (int j = 0; j < N; j++) begin
      if (!out_busy[j]) begin
        for (int k = N - 1; k >= 0; k--) begin
          idx = DW'((int'(ptr[j]) + k) % N);
          if (col[j][idx]) begin
            col_grant[j]      = '0;
            col_grant[j][idx] = 1'b1;
          end
        end
      end
    end
  end

  always_comb begin
    grant = '0;
    for (int j = 0; j < N; j++) grant |= col_grant[j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else
      for (int j = 0; j < N; j++)
        for (int i = 0; i < N; i++)
          if (col_grant[j][i] && accepted[i])
            ptr[j] <= DW'((i + 1) % N);
  end

  // At most one grant per output
  for (genvar j = 0; j < N; j++) begin : g_chk
    a_one_grant: assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0(col_grant[j]));
  end

endmodule
