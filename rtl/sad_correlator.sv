// sad_correlator: real-time SAD stereo correlator (PSR -> DC -> MC).
//
// Takes a rectified stereo pair as two pixel streams in raster order, one
// pixel pair per cycle in which in_valid is high, and emits one disparity per
// accepted pixel.  For left pixel n it compares the WW x WH window ending at n
// (rows n-r*SL, columns n-c) with the MAXD+1 right-image windows shifted left
// by d = 0..MAXD, and outputs the d of smallest SAD.  The structure is the
// three-module one of the document: pixel shift registers (sad_psr), the
// disparity calculator with column SADs, shift buffer and window SADs
// (sad_dc), and a min-tree (sad_mc).  It uses only adders and comparators.
//
// Timing: fully pipelined, one pixel per clock.  The disparity for the pixel
// accepted at a clock edge appears with out_valid exactly SAD_LATENCY (4)
// clocks later; the pipeline never stalls, in_valid may have gaps.  clear,
// pulsed before a frame while no pixel is in flight, zeroes the shift
// registers and buffer so that a frame does not see the previous one.
// Windows at the left and top image borders include pixels of the previous
// row end (or zeros before the frame start); which outputs to trust at the
// borders is left to the consumer, as the document does not say.
module sad_correlator #(
  parameter int unsigned SL     = sad_pkg::SL_DEF,
  parameter int unsigned WW     = sad_pkg::WW_DEF,
  parameter int unsigned WH     = sad_pkg::WH_DEF,
  parameter int unsigned MAXD   = sad_pkg::MAXD_DEF,
  parameter int unsigned PIX_W  = sad_pkg::PIX_W_DEF,
  parameter int unsigned COL_W  = PIX_W + $clog2(WH),
  parameter int unsigned WIN_W  = COL_W + $clog2(WW),
  parameter int unsigned DISP_W = (MAXD > 0) ? $clog2(MAXD+1) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              in_valid,
  input  logic [PIX_W-1:0]  left_pix,
  input  logic [PIX_W-1:0]  right_pix,
  output logic              out_valid,
  output logic [DISP_W-1:0] disparity,
  output logic [WIN_W-1:0]  min_sad
);

  logic [PIX_W-1:0] left_col  [WH];
  logic [PIX_W-1:0] right_col [MAXD+1][WH];
  logic             psr_valid, dc_valid;
  logic [WIN_W-1:0] winsad [MAXD+1];

  sad_psr #(.SL(SL), .WH(WH), .MAXD(MAXD), .PIX_W(PIX_W)) u_psr (
    .clk, .rst_n, .clear, .in_valid, .left_pix, .right_pix, .left_col, .right_col
  );

  // The PSR outputs reflect the pixel accepted at the previous edge.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) psr_valid <= 1'b0;
    else        psr_valid <= in_valid && !clear;

  sad_dc #(.WW(WW), .WH(WH), .MAXD(MAXD), .PIX_W(PIX_W), .COL_W(COL_W), .WIN_W(WIN_W)) u_dc (
    .clk, .rst_n, .clear, .in_valid(psr_valid), .left_col, .right_col,
    .out_valid(dc_valid), .winsad
  );

  sad_mc #(.MAXD(MAXD), .WIN_W(WIN_W), .DISP_W(DISP_W)) u_mc (
    .clk, .rst_n, .in_valid(dc_valid), .winsad, .out_valid, .disparity, .min_sad
  );

endmodule
