// tb_stereo_full: one complete operation of the peripheral module with every
// parameter at its default: a 240 x 240 stereo pair (scan line 240, 9x9
// windows, disparities 0..31) is correlated by DMA and its depth map is shown
// on a 320 x 240 panel.  The flow and its checks live in stereo_soc_env.
module tb_stereo_full;
  import sad_pkg::*;

  logic hclk, hresetn, br_hbusreq, br_hgrant, hready, mem_hsel, uart_irq, irq;
  ahb_m2s_t br_m2s, mem_m2s; ahb_s2m_t mem_s2m; hresp_e hresp;
  logic [31:0] hrdata; logic [1:0] hmaster, irq_id;
  logic [3:0] key_col_n, key_row_n;
  logic lcd_pclk_en, lcd_hsync_n, lcd_vsync_n, lcd_de; logic [15:0] lcd_rgb;

  stereo_periph_top dut (.*);
  stereo_soc_env #(.SL(SL_DEF), .WW(WW_DEF), .WH(WH_DEF), .MAXD(MAXD_DEF), .ROWS(240),
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
