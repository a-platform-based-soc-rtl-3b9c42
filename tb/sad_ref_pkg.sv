// sad_ref_pkg: reference model shared by the testbenches: the window SAD and
// disparity of one pixel, computed directly from two images in raster order
// (pixels before the frame start count as 0; lowest disparity wins ties).
package sad_ref_pkg;
  function automatic int ref_disparity(ref byte unsigned l[], ref byte unsigned r[],
                                       input int n, input int sl, input int ww,
                                       input int wh, input int maxd);
    int best = -1, bd = 0;
    for (int d = 0; d <= maxd; d++) begin
      int s = 0;
      for (int y = 0; y < wh; y++)
        for (int x = 0; x < ww; x++) begin
          int li = n - y*sl - x, ri = n - y*sl - x - d;
          int a = (li < 0) ? 0 : int'(l[li]);
          int b = (ri < 0) ? 0 : int'(r[ri]);
          s += (a > b) ? a - b : b - a;
        end
      if (best < 0 || s < best) begin best = s; bd = d; end
    end
    return bd;
  endfunction
endpackage
