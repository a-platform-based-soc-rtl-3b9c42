// sad_shift_buffer: (MAXD+1) x WW store of column SADs.
//
// For each disparity d it keeps the column SADs of the last WW image columns,
// entry 0 being the newest, and presents all of them in parallel to the
// window disparity calculator.  A new set of column SADs is shifted in when
// in_valid is high; out_valid is in_valid delayed by one clock, marking the
// cycle in which the buffer holds the just-shifted set.  clear zeroes the
// buffer at the start of a frame.
module sad_shift_buffer #(
  parameter int unsigned WW    = sad_pkg::WW_DEF,
  parameter int unsigned MAXD  = sad_pkg::MAXD_DEF,
  parameter int unsigned COL_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             in_valid,
  input  logic [COL_W-1:0] colsad [MAXD+1],
  output logic             out_valid,
  output logic [COL_W-1:0] buf_q  [MAXD+1][WW]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int d = 0; d <= MAXD; d++)
        for (int c = 0; c < WW; c++) buf_q[d][c] <= '0;
    end else begin
      out_valid <= in_valid && !clear;
      if (clear) begin
        for (int d = 0; d <= MAXD; d++)
          for (int c = 0; c < WW; c++) buf_q[d][c] <= '0;
      end else if (in_valid) begin
        for (int d = 0; d <= MAXD; d++) begin
          buf_q[d][0] <= colsad[d];
          for (int c = 1; c < WW; c++) buf_q[d][c] <= buf_q[d][c-1];
        end
      end
    end
  end

endmodule
