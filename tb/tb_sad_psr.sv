// tb_sad_psr: checks the left/right pixel shift register taps.
// After every accepted pixel, left_col[r] must equal the pixel accepted
// r*SL pixels earlier and right_col[d][r] the right pixel r*SL+d earlier
// (zero before the frame start).  Also checks that gaps in in_valid hold the
// registers and that clear zeroes them.
module tb_sad_psr;
  localparam int unsigned SL = 7, WH = 3, MAXD = 4, PIX_W = 8, N = 60;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic [PIX_W-1:0] left_pix = 0, right_pix = 0;
  logic [PIX_W-1:0] left_col [WH];
  logic [PIX_W-1:0] right_col [MAXD+1][WH];
  int checks = 0, failures = 0;
  int lh [N], rh [N];

  sad_psr #(.SL(SL), .WH(WH), .MAXD(MAXD), .PIX_W(PIX_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check_taps(input int n);  // n pixels accepted so far
    for (int r = 0; r < WH; r++) begin
      automatic int li = n - 1 - r*SL;
      checks++;
      if (left_col[r] !== PIX_W'((li < 0) ? 0 : lh[li])) begin
        failures++; $display("n=%0d left r=%0d got %0d", n, r, left_col[r]);
      end
      for (int d = 0; d <= MAXD; d++) begin
        automatic int ri = n - 1 - r*SL - d;
        checks++;
        if (right_col[d][r] !== PIX_W'((ri < 0) ? 0 : rh[ri])) begin
          failures++; $display("n=%0d right d=%0d r=%0d got %0d", n, d, r, right_col[d][r]);
        end
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int pass = 0; pass < 2; pass++) begin
      @(posedge clk) clear <= 1;
      @(posedge clk) clear <= 0;
      for (int n = 0; n < N; n++) begin
        lh[n] = $urandom_range(1, 255); rh[n] = $urandom_range(1, 255);
        in_valid <= 1; left_pix <= PIX_W'(lh[n]); right_pix <= PIX_W'(rh[n]);
        @(posedge clk); in_valid <= 0;
        #1 check_taps(n + 1);
        if (n % 5 == 0) begin @(posedge clk); #1 check_taps(n + 1); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
