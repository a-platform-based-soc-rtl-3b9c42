// sad_column_dc: column disparity calculator of the SAD correlator.
//
// One SAD functional unit per disparity d = 0..MAXD.  Each unit forms the WH
// absolute differences |L(r) - R_d(r)| between the left column and the right
// column at disparity d, and sums them in a balanced adder tree.  The result,
// the column SAD, is registered, so colsad/out_valid follow in_valid by one
// clock.  Splitting the window SAD into column SADs lets neighbouring windows
// share work: each column SAD is computed once and reused WW times.
module sad_column_dc #(
  parameter int unsigned WH    = sad_pkg::WH_DEF,
  parameter int unsigned MAXD  = sad_pkg::MAXD_DEF,
  parameter int unsigned PIX_W = sad_pkg::PIX_W_DEF,
  parameter int unsigned COL_W = PIX_W + $clog2(WH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [PIX_W-1:0]  left_col  [WH],
  input  logic [PIX_W-1:0]  right_col [MAXD+1][WH],
  output logic              out_valid,
  output logic [COL_W-1:0]  colsad    [MAXD+1]
);

  logic [PIX_W-1:0] absd [MAXD+1][WH];
  logic [COL_W-1:0] sum  [MAXD+1];

  for (genvar d = 0; d <= MAXD; d++) begin : g_fu
    always_comb
      for (int r = 0; r < WH; r++)
        absd[d][r] = (left_col[r] >= right_col[d][r]) ? left_col[r] - right_col[d][r]
                                                      : right_col[d][r] - left_col[r];
    tree_adder #(.N(WH), .IN_W(PIX_W), .OUT_W(COL_W)) u_tree (.in(absd[d]), .sum(sum[d]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int d = 0; d <= MAXD; d++) colsad[d] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) colsad <= sum;
    end
  end

endmodule
