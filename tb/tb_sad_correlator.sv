// tb_sad_correlator: self-checking test of the streaming SAD correlator.
//
// Feeds two frames of a synthetic stereo pair (random texture, the right
// image being the left one shifted by a per-band disparity, plus noise) with
// random gaps in in_valid and a clear between frames.  A reference model in
// the testbench evaluates the SAD of every window at every disparity directly
// from the pixel arrays (zeros before the frame start) and picks the smallest
// disparity of minimum SAD.  Every output is compared, and every output must
// appear exactly SAD_LATENCY clocks after its pixel was accepted.
module tb_sad_correlator;
  localparam int unsigned SL = 16, WW = 3, WH = 3, MAXD = 7, PIX_W = 8;
  localparam int unsigned ROWS = 10, NPIX = SL * ROWS;
  localparam int unsigned COL_W = PIX_W + $clog2(WH), WIN_W = COL_W + $clog2(WW);
  localparam int unsigned DISP_W = $clog2(MAXD + 1);

  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic [PIX_W-1:0] left_pix = 0, right_pix = 0;
  logic out_valid;
  logic [DISP_W-1:0] disparity;
  logic [WIN_W-1:0]  min_sad;
  int checks = 0, failures = 0;
  int cycle = 0;

  sad_correlator #(.SL(SL), .WW(WW), .WH(WH), .MAXD(MAXD), .PIX_W(PIX_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  int lim [NPIX], rim [NPIX];
  int exp_d [NPIX], exp_s [NPIX], acc_cycle [NPIX];
  int n_in, n_out;

  function automatic int px(input int img[NPIX], input int i);
    return (i < 0) ? 0 : img[i];
  endfunction

  task automatic make_frame(input int f);
    for (int i = 0; i < NPIX; i++) lim[i] = $urandom_range(0, 255);
    for (int i = 0; i < NPIX; i++) begin
      int dtrue = ((i / SL) / 4 + f) % (MAXD + 1);
      int v = px(lim, i + dtrue);
      if (i + dtrue >= NPIX) v = 0;
      v = v + $signed($urandom_range(0, 6)) - 3;
      rim[i] = (v < 0) ? 0 : (v > 255) ? 255 : v;
    end
    for (int n = 0; n < NPIX; n++) begin
      int best = -1, bd = 0;
      for (int d = 0; d <= MAXD; d++) begin
        int s = 0;
        for (int r = 0; r < WH; r++)
          for (int c = 0; c < WW; c++) begin
            int a = px(lim, n - r*SL - c), b = px(rim, n - r*SL - c - d);
            s += (a > b) ? a - b : b - a;
          end
        if (best < 0 || s < best) begin best = s; bd = d; end
      end
      exp_d[n] = bd; exp_s[n] = best;
    end
  endtask

  // Output checker
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (n_out >= NPIX) begin failures++; $display("extra output"); end
    else begin
      if (disparity !== DISP_W'(exp_d[n_out]) || min_sad !== WIN_W'(exp_s[n_out])) begin
        failures++;
        if (failures < 10) $display("pixel %0d: got d=%0d sad=%0d exp d=%0d sad=%0d",
                                    n_out, disparity, min_sad, exp_d[n_out], exp_s[n_out]);
      end
      checks++;
      if (cycle - acc_cycle[n_out] != int'(sad_pkg::SAD_LATENCY) + 1) begin
        failures++;
        if (failures < 10) $display("pixel %0d: latency %0d", n_out, cycle - acc_cycle[n_out] - 1);
      end
      n_out++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 2; f++) begin
      make_frame(f);
      @(posedge clk) clear <= 1;
      @(posedge clk) clear <= 0;
      n_in = 0; n_out = 0;
      while (n_in < NPIX) begin
        if ($urandom_range(0, 3) != 0) begin
          in_valid <= 1; left_pix <= PIX_W'(lim[n_in]); right_pix <= PIX_W'(rim[n_in]);
          @(posedge clk);
          acc_cycle[n_in] = cycle;
          n_in++;
        end else begin
          in_valid <= 0;
          @(posedge clk);
        end
      end
      in_valid <= 0;
      repeat (10) @(posedge clk);
      checks++;
      if (n_out != NPIX) begin failures++; $display("frame %0d: %0d outputs", f, n_out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
