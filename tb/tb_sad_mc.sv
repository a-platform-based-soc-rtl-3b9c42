// tb_sad_mc: checks the minimum calculator.  Random SAD vectors (with forced
// ties and extreme values) are applied; the output must be the smallest SAD
// and the lowest disparity holding it, one clock after in_valid.
module tb_sad_mc;
  localparam int unsigned MAXD = 12, WIN_W = 10, DISP_W = 4, N = 300;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [WIN_W-1:0] winsad [MAXD+1];
  logic out_valid;
  logic [DISP_W-1:0] disparity;
  logic [WIN_W-1:0] min_sad;
  int checks = 0, failures = 0;

  sad_mc #(.MAXD(MAXD), .WIN_W(WIN_W), .DISP_W(DISP_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int d = 0; d <= MAXD; d++) winsad[d] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < N; t++) begin
      automatic int v [MAXD+1];
      automatic int best = -1, bd = 0;
      automatic int range = (t % 3 == 0) ? 3 : 1023;   // small range forces ties
      for (int d = 0; d <= MAXD; d++) begin
        v[d] = $urandom_range(0, range);
        if (t == 5) v[d] = 1023;             // all equal, at the maximum
        if (t == 6) v[d] = 1023 - d;         // minimum at the last entry
        winsad[d] <= WIN_W'(v[d]);
        if (best < 0 || v[d] < best) begin best = v[d]; bd = d; end
      end
      in_valid <= 1;
      @(posedge clk); in_valid <= 0;
      #1;
      checks++;
      if (!out_valid || disparity !== DISP_W'(bd) || min_sad !== WIN_W'(best)) begin
        failures++;
        $display("t=%0d got v=%0d d=%0d sad=%0d exp d=%0d sad=%0d", t, out_valid, disparity, min_sad, bd, best);
      end
      @(posedge clk); #1;
      checks++;
      if (out_valid) begin failures++; $display("out_valid stuck"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
