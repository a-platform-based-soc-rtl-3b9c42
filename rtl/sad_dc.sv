// sad_dc: disparity calculator (DC) of the SAD correlator.
//
// Computes, for every disparity d = 0..MAXD, the SAD of a WW x WH window
//   C(n, d) = sum_{r<WH} sum_{c<WW} |L[n - r*SL - c] - R[n - r*SL - c - d]|
// from the columns delivered by the pixel shift registers.  As in the
// document it is split into three stages:
//   column-DC   : one SAD unit per disparity, sums WH absolute differences of
//                 a pair of columns (registered, 1 clock);
//   shift buffer: (MAXD+1) x WW column SADs, newest first (1 clock);
//   window-DC   : per disparity, an adder tree over the WW buffered column
//                 SADs (registered, 1 clock).
// Latency from in_valid to out_valid is 3 clocks; one window set per clock.
// clear empties the shift buffer at the start of a frame.
module sad_dc #(
  parameter int unsigned WW    = sad_pkg::WW_DEF,
  parameter int unsigned WH    = sad_pkg::WH_DEF,
  parameter int unsigned MAXD  = sad_pkg::MAXD_DEF,
  parameter int unsigned PIX_W = sad_pkg::PIX_W_DEF,
  parameter int unsigned COL_W = PIX_W + $clog2(WH),
  parameter int unsigned WIN_W = COL_W + $clog2(WW)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             in_valid,
  input  logic [PIX_W-1:0] left_col  [WH],
  input  logic [PIX_W-1:0] right_col [MAXD+1][WH],
  output logic             out_valid,
  output logic [WIN_W-1:0] winsad    [MAXD+1]
);

  logic             col_valid, sb_valid;
  logic [COL_W-1:0] colsad [MAXD+1];
  logic [COL_W-1:0] sb_q   [MAXD+1][WW];

  sad_column_dc #(.WH(WH), .MAXD(MAXD), .PIX_W(PIX_W), .COL_W(COL_W)) u_col (
    .clk, .rst_n, .in_valid, .left_col, .right_col,
    .out_valid(col_valid), .colsad
  );

  sad_shift_buffer #(.WW(WW), .MAXD(MAXD), .COL_W(COL_W)) u_sb (
    .clk, .rst_n, .clear, .in_valid(col_valid), .colsad,
    .out_valid(sb_valid), .buf_q(sb_q)
  );

  sad_window_dc #(.WW(WW), .MAXD(MAXD), .COL_W(COL_W), .WIN_W(WIN_W)) u_win (
    .clk, .rst_n, .in_valid(sb_valid), .buf_q(sb_q),
    .out_valid, .winsad
  );

endmodule
