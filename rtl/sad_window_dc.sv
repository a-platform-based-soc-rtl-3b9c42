// sad_window_dc: window disparity calculator of the SAD correlator.
//
// For each disparity d it adds the WW column SADs held in the shift buffer in
// a balanced adder tree, giving the SAD of the whole WW x WH window.  The
// sums are registered: winsad/out_valid follow in_valid by one clock.
module sad_window_dc #(
  parameter int unsigned WW    = sad_pkg::WW_DEF,
  parameter int unsigned MAXD  = sad_pkg::MAXD_DEF,
  parameter int unsigned COL_W = 12,
  parameter int unsigned WIN_W = COL_W + $clog2(WW)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [COL_W-1:0] buf_q  [MAXD+1][WW],
  output logic             out_valid,
  output logic [WIN_W-1:0] winsad [MAXD+1]
);

  logic [WIN_W-1:0] sum [MAXD+1];

  for (genvar d = 0; d <= MAXD; d++) begin : g_win
    tree_adder #(.N(WW), .IN_W(COL_W), .OUT_W(WIN_W)) u_tree (.in(buf_q[d]), .sum(sum[d]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int d = 0; d <= MAXD; d++) winsad[d] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) winsad <= sum;
    end
  end

endmodule
