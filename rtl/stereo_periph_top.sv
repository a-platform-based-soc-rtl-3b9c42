// stereo_periph_top: peripheral module of the stereo vision SoC.
//
// The stereo vision system is a processor-centred SoC: an ARM9 processor
// module, a memory module (SDRAM and static memory controllers) and this
// peripheral module, linked by two AMBA AHB buses.  The processor runs the
// control flow and computes the depth map; the heavy work, stereo matching,
// is done here by the SAD correlator behind its DMA wrapper.  This module is
// the peripheral AHB bus with everything on it:
//   masters  M0 TFT-LCD DMA, M1 SAD wrapper DMA, M2 the AHB1-2 bridge
//            (processor accesses, brought out as the br_* port);
//   slaves   S0 memory module (0x0xxx_xxxx, brought out as the mem_* port),
//            S1 SAD wrapper registers (0x8...), S2 keypad (0x9...),
//            S3 TFT-LCD registers (0xA...);
//   irq      one request to the processor with the index of the
//            highest-priority source: SAD wrapper, TFT-LCD, keypad, UART
//            (the UART sits in the processor module; its line comes in).
// Flow of one run: a key stroke interrupts the processor; it programs the SAD
// wrapper, which fetches the stereo pair from memory by DMA, correlates it and
// writes the disparity image back, then interrupts; the processor turns the
// disparities into a depth map in memory, which the TFT-LCD controller shows.
// The bus ports use the AHB bundle structs of sad_pkg; hready/hresp/hrdata
// are shared by the bridge master and the memory slave as on a real AHB.
// The master priority order and the memory map are this design's choices.
module stereo_periph_top #(
  parameter int unsigned SL           = sad_pkg::SL_DEF,
  parameter int unsigned WW           = sad_pkg::WW_DEF,
  parameter int unsigned WH           = sad_pkg::WH_DEF,
  parameter int unsigned MAXD         = sad_pkg::MAXD_DEF,
  parameter int unsigned KEY_SCAN_DIV = 256,
  parameter int unsigned LCD_H_ACTIVE = 320,
  parameter int unsigned LCD_V_ACTIVE = 240,
  parameter int unsigned LCD_PIX_DIV  = 4
) (
  input  logic              hclk,
  input  logic              hresetn,
  // AHB1-2 bridge: master on this bus
  input  logic              br_hbusreq,
  output logic              br_hgrant,
  input  sad_pkg::ahb_m2s_t br_m2s,
  // shared return path of the bus
  output logic              hready,
  output sad_pkg::hresp_e   hresp,
  output logic [31:0]       hrdata,
  output logic [1:0]        hmaster,
  // memory module: slave on this bus
  output logic              mem_hsel,
  output sad_pkg::ahb_m2s_t mem_m2s,
  input  sad_pkg::ahb_s2m_t mem_s2m,
  // interrupts
  input  logic              uart_irq,
  output logic              irq,
  output logic [1:0]        irq_id,
  // keypad matrix
  output logic [3:0]        key_col_n,
  input  logic [3:0]        key_row_n,
  // TFT-LCD panel
  output logic              lcd_pclk_en,
  output logic              lcd_hsync_n,
  output logic              lcd_vsync_n,
  output logic              lcd_de,
  output logic [15:0]       lcd_rgb
);
  import sad_pkg::*;

  localparam int unsigned NM = 3, NS = 4;

  logic [NM-1:0] hbusreq, hgrant;
  ahb_m2s_t      m_m2s [NM];
  logic [NS-1:0] hsel;
  ahb_m2s_t      s_m2s;
  ahb_s2m_t      s_s2m [NS];
  logic [N_IRQ-1:0] irq_src;

  assign hbusreq[2] = br_hbusreq;
  assign m_m2s[2]   = br_m2s;
  assign br_hgrant  = hgrant[2];
  assign mem_hsel   = hsel[0];
  assign mem_m2s    = s_m2s;
  assign s_s2m[0]   = mem_s2m;

  ahb_bus #(.NM(NM), .NS(NS),
            .SLAVE_MAP({MAP_LCD, MAP_KEYPAD, MAP_SAD, MAP_MEM})) u_bus (
    .hclk, .hresetn,
    .m_hbusreq(hbusreq), .m_hgrant(hgrant), .m_m2s,
    .hready, .hresp, .hrdata, .hmaster,
    .s_hsel(hsel), .s_m2s, .s_s2m
  );

  tft_lcd_ctrl #(.H_ACTIVE(LCD_H_ACTIVE), .V_ACTIVE(LCD_V_ACTIVE), .PIX_DIV(LCD_PIX_DIV)) u_lcd (
    .hclk, .hresetn,
    .hsel(hsel[3]), .s_m2s, .hready, .s_s2m(s_s2m[3]),
    .m_hbusreq(hbusreq[0]), .m_hgrant(hgrant[0]), .m_m2s(m_m2s[0]),
    .m_hresp(hresp), .m_hrdata(hrdata),
    .lcd_pclk_en, .lcd_hsync_n, .lcd_vsync_n, .lcd_de, .lcd_rgb,
    .irq(irq_src[IRQ_LCD])
  );

  sad_wrapper #(.SL(SL), .WW(WW), .WH(WH), .MAXD(MAXD)) u_sad (
    .hclk, .hresetn,
    .hsel(hsel[1]), .s_m2s, .hready, .s_s2m(s_s2m[1]),
    .m_hbusreq(hbusreq[1]), .m_hgrant(hgrant[1]), .m_m2s(m_m2s[1]),
    .m_hresp(hresp), .m_hrdata(hrdata),
    .irq(irq_src[IRQ_SAD])
  );

  keypad_ctrl #(.ROWS(4), .COLS(4), .SCAN_DIV(KEY_SCAN_DIV)) u_key (
    .hclk, .hresetn,
    .hsel(hsel[2]), .s_m2s, .hready, .s_s2m(s_s2m[2]),
    .col_n(key_col_n), .row_n(key_row_n),
    .irq(irq_src[IRQ_KEY])
  );

  assign irq_src[IRQ_UART] = uart_irq;

  irq_priority #(.N(N_IRQ)) u_irq (
    .clk(hclk), .rst_n(hresetn), .irq_src, .irq, .irq_id
  );

endmodule
