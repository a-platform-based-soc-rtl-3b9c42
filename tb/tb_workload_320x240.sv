// tb_workload_320x240: the evaluated workload size, a 320 x 240 stereo pair
// with 9x9 windows and disparities 0..31.  A 320-pixel row needs a 320-pixel
// scan line, so the top is built with SL = 320 (the default is 240).  The run
// reports the clocks per frame, from which the frame rate at a given bus
// clock follows (frames/s = f_clk / clocks).  Flow and checks as in
// stereo_soc_env.
module tb_workload_320x240;
  import sad_pkg::*;

  logic hclk, hresetn, br_hbusreq, br_hgrant, hready, mem_hsel, uart_irq, irq;
  ahb_m2s_t br_m2s, mem_m2s; ahb_s2m_t mem_s2m; hresp_e hresp;
  logic [31:0] hrdata; logic [1:0] hmaster, irq_id;
  logic [3:0] key_col_n, key_row_n;
  logic lcd_pclk_en, lcd_hsync_n, lcd_vsync_n, lcd_de; logic [15:0] lcd_rgb;

  stereo_periph_top #(.SL(320)) dut (.*);
  stereo_soc_env #(.SL(320), .WW(9), .WH(9), .MAXD(31), .ROWS(240),
                   .LCD_HA(320), .LCD_VA(240), .LCD_DIV(4), .KEY_DIV(256), .MEM_WORDS(262144)) env (.*);

  initial begin
    wait (env.done);
    $display("TB_RESULT checks=%0d failures=%0d", env.checks, env.failures);
    $finish;
  end
  initial begin
    #100ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", env.checks, env.failures + 1);
    $finish;
  end
endmodule
