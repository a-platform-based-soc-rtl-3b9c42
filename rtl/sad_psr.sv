// sad_psr: left and right pixel shift registers of the SAD correlator.
//
// Both cameras deliver pixels in raster order, one pair per accepted cycle.
// Each side is a one-dimensional shift register; element 0 holds the newest
// pixel.  Because the image rows are laid end to end, the pixels of one
// image column that belong to a window of height WH sit SL elements apart.
//   * The left register is SL*(WH-1)+1 long and presents one column of WH
//     pixels: left_col[r] = L[n - r*SL].
//   * The right register is SL*(WH-1)+MAXD+1 long and presents MAXD+1
//     columns, one per disparity d: right_col[d][r] = R[n - r*SL - d].
// Together with the column-SAD decomposition in the disparity calculator this
// is all the window storage the correlator needs.  The document gives the
// array size as SL*(WH-1)+MAXD; the extra element here holds the current
// pixel itself.
//
// Interface: in_valid shifts both registers by one at the clock edge.  clear
// (synchronous) zeroes them at the start of a frame, so pixels "before" the
// frame read as 0.  The column outputs are taken straight from the registers
// and therefore reflect the pixel accepted at the previous edge.
module sad_psr #(
  parameter int unsigned SL    = sad_pkg::SL_DEF,
  parameter int unsigned WH    = sad_pkg::WH_DEF,
  parameter int unsigned MAXD  = sad_pkg::MAXD_DEF,
  parameter int unsigned PIX_W = sad_pkg::PIX_W_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 in_valid,
  input  logic [PIX_W-1:0]     left_pix,
  input  logic [PIX_W-1:0]     right_pix,
  output logic [PIX_W-1:0]     left_col  [WH],
  output logic [PIX_W-1:0]     right_col [MAXD+1][WH]
);

  localparam int unsigned LLEN = SL*(WH-1) + 1;
  localparam int unsigned RLEN = SL*(WH-1) + MAXD + 1;

  logic [PIX_W-1:0] lsr [LLEN];
  logic [PIX_W-1:0] rsr [RLEN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LLEN; i++) lsr[i] <= '0;
      for (int i = 0; i < RLEN; i++) rsr[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < LLEN; i++) lsr[i] <= '0;
      for (int i = 0; i < RLEN; i++) rsr[i] <= '0;
    end else if (in_valid) begin
      lsr[0] <= left_pix;
      rsr[0] <= right_pix;
      for (int i = 1; i < LLEN; i++) lsr[i] <= lsr[i-1];
      for (int i = 1; i < RLEN; i++) rsr[i] <= rsr[i-1];
    end
  end

  always_comb begin
    for (int r = 0; r < WH; r++) begin
      left_col[r] = lsr[r*SL];
      for (int d = 0; d <= MAXD; d++) right_col[d][r] = rsr[r*SL + d];
    end
  end

endmodule
