// tb_sad_dc: checks the disparity calculator (column-DC, shift buffer,
// window-DC) against a direct window-SAD model.  A stream of random pixel
// columns is presented as if from the shift registers; for each accepted
// column set the testbench keeps its own history and computes
// sum over the last WW column sets of sum_r |L - R_d| for every d.  The
// result must appear exactly 3 clocks after the column set was presented.
module tb_sad_dc;
  localparam int unsigned WW = 4, WH = 3, MAXD = 5, PIX_W = 8, N = 80;
  localparam int unsigned COL_W = PIX_W + $clog2(WH), WIN_W = COL_W + $clog2(WW);
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic [PIX_W-1:0] left_col [WH];
  logic [PIX_W-1:0] right_col [MAXD+1][WH];
  logic out_valid;
  logic [WIN_W-1:0] winsad [MAXD+1];
  int checks = 0, failures = 0, cycle = 0;
  int colsum [N][MAXD+1];
  int acc_cycle [N];
  int n_in = 0, n_out = 0;

  sad_dc #(.WW(WW), .WH(WH), .MAXD(MAXD), .PIX_W(PIX_W)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #50000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (cycle - acc_cycle[n_out] != 3) begin failures++; $display("latency %0d", cycle - acc_cycle[n_out]); end
    for (int d = 0; d <= MAXD; d++) begin
      automatic int s = 0;
      for (int c = 0; c < WW; c++) if (n_out - c >= 0) s += colsum[n_out - c][d];
      checks++;
      if (winsad[d] !== WIN_W'(s)) begin
        failures++; $display("n=%0d d=%0d got %0d exp %0d", n_out, d, winsad[d], s);
      end
    end
    n_out++;
  end

  initial begin
    for (int r = 0; r < WH; r++) begin
      left_col[r] = 0;
      for (int d = 0; d <= MAXD; d++) right_col[d][r] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk) clear <= 1;
    @(posedge clk) clear <= 0;
    while (n_in < N) begin
      if ($urandom_range(0, 2) != 0) begin
        for (int d = 0; d <= MAXD; d++) colsum[n_in][d] = 0;
        for (int r = 0; r < WH; r++) begin
          automatic int a = (n_in == 3) ? 255 : $urandom_range(0, 255);
          left_col[r] <= PIX_W'(a);
          for (int d = 0; d <= MAXD; d++) begin
            automatic int b = (n_in == 3) ? 0 : $urandom_range(0, 255);
            right_col[d][r] <= PIX_W'(b);
            colsum[n_in][d] += (a > b) ? a - b : b - a;
          end
        end
        in_valid <= 1;
        @(posedge clk);
        acc_cycle[n_in] = cycle;
        n_in++;
      end else begin
        in_valid <= 0; @(posedge clk);
      end
    end
    in_valid <= 0;
    repeat (6) @(posedge clk);
    checks++;
    if (n_out != N) begin failures++; $display("outputs %0d", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
