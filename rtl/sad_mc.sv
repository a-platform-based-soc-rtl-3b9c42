// sad_mc: minimum calculator (MC) of the SAD correlator.
//
// Picks, among the MAXD+1 window SADs, the smallest one and reports its index
// as the disparity.  The comparison is a balanced tree of two-input "min"
// cells, log2(MAXD+1) levels deep, each passing on the smaller SAD and its
// disparity.  On equal SADs the smaller disparity wins (this design's
// choice).  Inputs are padded to a power of two with the largest SAD value.
// The result is registered: disparity/min_sad/out_valid follow in_valid by
// one clock.
module sad_mc #(
  parameter int unsigned MAXD   = sad_pkg::MAXD_DEF,
  parameter int unsigned WIN_W  = 15,
  parameter int unsigned DISP_W = (MAXD > 0) ? $clog2(MAXD+1) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [WIN_W-1:0]  winsad [MAXD+1],
  output logic              out_valid,
  output logic [DISP_W-1:0] disparity,
  output logic [WIN_W-1:0]  min_sad
);

  localparam int unsigned N      = MAXD + 1;
  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;
  localparam int unsigned P      = 1 << LEVELS;

  logic [WIN_W-1:0]  val [LEVELS+1][P];
  logic [DISP_W-1:0] idx [LEVELS+1][P];

  always_comb begin
    for (int l = 0; l <= LEVELS; l++)
      for (int i = 0; i < P; i++) begin
        val[l][i] = '1;
        idx[l][i] = '0;
      end
    for (int i = 0; i < N; i++) begin
      val[0][i] = winsad[i];
      idx[0][i] = DISP_W'(i);
    end
    for (int l = 1; l <= LEVELS; l++)
      for (int i = 0; i < (P >> l); i++)
        if (val[l-1][2*i+1] < val[l-1][2*i]) begin
          val[l][i] = val[l-1][2*i+1];
          idx[l][i] = idx[l-1][2*i+1];
        end else begin
          val[l][i] = val[l-1][2*i];
          idx[l][i] = idx[l-1][2*i];
        end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      disparity <= '0;
      min_sad   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        disparity <= idx[LEVELS][0];
        min_sad   <= val[LEVELS][0];
      end
    end
  end

endmodule
