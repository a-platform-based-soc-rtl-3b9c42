// tb_stereo_periph_top: end-to-end run of the peripheral module at reduced
// size (32-pixel scan lines, 5x5 windows, disparities 0..15, a 32x8 panel).
// The whole flow and its checks live in stereo_soc_env.
module tb_stereo_periph_top;
  import sad_pkg::*;
  localparam int SL = 32, WW = 5, WH = 5, MAXD = 15, ROWS = 16, HA = 32, VA = 8;

  logic hclk, hresetn, br_hbusreq, br_hgrant, hready, mem_hsel, uart_irq, irq;
  ahb_m2s_t br_m2s, mem_m2s; ahb_s2m_t mem_s2m; hresp_e hresp;
  logic [31:0] hrdata; logic [1:0] hmaster, irq_id;
  logic [3:0] key_col_n, key_row_n;
  logic lcd_pclk_en, lcd_hsync_n, lcd_vsync_n, lcd_de; logic [15:0] lcd_rgb;

  stereo_periph_top #(.SL(SL), .WW(WW), .WH(WH), .MAXD(MAXD), .KEY_SCAN_DIV(4),
                      .LCD_H_ACTIVE(HA), .LCD_V_ACTIVE(VA), .LCD_PIX_DIV(4)) dut (.*);
  stereo_soc_env #(.SL(SL), .WW(WW), .WH(WH), .MAXD(MAXD), .ROWS(ROWS), .LCD_HA(HA), .LCD_VA(VA),
                   .LCD_DIV(4), .KEY_DIV(4), .MEM_WORDS(262144)) env (.*);

  initial begin
    wait (env.done);
    $display("TB_RESULT checks=%0d failures=%0d", env.checks, env.failures);
    $finish;
  end
  initial begin
    #5ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", env.checks, env.failures + 1);
    $finish;
  end
endmodule
