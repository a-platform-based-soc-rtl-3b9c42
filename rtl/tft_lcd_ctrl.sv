// tft_lcd_ctrl: TFT-LCD controller, AHB slave for control and AHB master for
// frame-buffer DMA.
//
// Shows the depth map that the processor leaves in memory.  The frame buffer
// holds 8-bit grey pixels, four per word, first pixel in bits 7:0, rows of
// H_ACTIVE pixels.  A DMA engine (ahb_single_master) reads it word by word
// into a FIFO_WORDS x 32 line FIFO (512 x 32 = 16384 bits by default, the
// memory size reported for the controller); a timing generator, advanced once
// every PIX_DIV clocks, produces HSYNC/VSYNC/DE for an H_ACTIVE x V_ACTIVE
// panel and pops one pixel per pixel clock.  The grey value is converted to
// RGB565 (R = G = B = grey) on the way out.
//
// Frames: when the last active line ends, the frame is complete: STATUS.FRAME
// is set (irq = FRAME & IRQ_EN), and during vertical blanking the FIFO is
// flushed and the DMA restarts at FB_ADDR, so the next frame is prefetched
// before its first active line.  FB_ADDR is sampled at that restart, so
// software may switch to another frame buffer at any time and the switch
// takes effect at a frame boundary, without tearing.  Enabling the controller starts in vertical
// blanking for the same reason.  An empty FIFO during an active pixel shows
// black and sets STATUS.UNDERRUN.
// Registers (this design's layout): 0x00 CTRL [0] ENABLE [1] IRQ_EN;
// 0x04 FB_ADDR; 0x08 STATUS [0] FRAME (w1c) [1] UNDERRUN (w1c).
// The document names the controller and its memory size only; panel size,
// porches, the pixel format and the grey-to-RGB conversion are assumptions.
module tft_lcd_ctrl #(
  parameter int unsigned H_ACTIVE   = 320,
  parameter int unsigned V_ACTIVE   = 240,
  parameter int unsigned H_FP       = 8,
  parameter int unsigned H_SYNC     = 8,
  parameter int unsigned H_BP       = 16,
  parameter int unsigned V_FP       = 2,
  parameter int unsigned V_SYNC     = 2,
  parameter int unsigned V_BP       = 4,
  parameter int unsigned PIX_DIV    = 4,
  parameter int unsigned FIFO_WORDS = 512
) (
  input  logic              hclk,
  input  logic              hresetn,
  // AHB slave port (registers)
  input  logic              hsel,
  input  sad_pkg::ahb_m2s_t s_m2s,
  input  logic              hready,
  output sad_pkg::ahb_s2m_t s_s2m,
  // AHB master port (frame-buffer DMA)
  output logic              m_hbusreq,
  input  logic              m_hgrant,
  output sad_pkg::ahb_m2s_t m_m2s,
  input  sad_pkg::hresp_e   m_hresp,
  input  logic [31:0]       m_hrdata,
  // panel
  output logic              lcd_pclk_en,
  output logic              lcd_hsync_n,
  output logic              lcd_vsync_n,
  output logic              lcd_de,
  output logic [15:0]       lcd_rgb,
  output logic              irq
);
  import sad_pkg::*;

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;
  localparam int unsigned FRAME_WORDS = H_ACTIVE * V_ACTIVE / 4;
  localparam int unsigned HW = $clog2(H_TOTAL);
  localparam int unsigned VW = $clog2(V_TOTAL);
  localparam int unsigned AW = $clog2(FIFO_WORDS);
  localparam int unsigned PW = (PIX_DIV > 1) ? $clog2(PIX_DIV) : 1;

  // registers
  logic        enable, irq_en, frame_flag, underrun;
  logic [31:0] fb_addr;
  logic        wr_pend;
  logic [1:0]  wr_reg, rd_reg;

  // timing
  logic [PW-1:0] pdiv;
  logic [HW-1:0] hcnt;
  logic [VW-1:0] vcnt;
  logic          pix_en, active, frame_end;

  // FIFO
  logic [31:0] fifo_mem [FIFO_WORDS];
  logic [AW-1:0] rp, wp;
  logic [AW:0]   cnt;
  logic [1:0]    px_k;
  logic          pop, push;

  // DMA
  logic        restart, cmd_valid, cmd_ready, cmd_pend, m_done, m_err;
  logic [31:0] m_rdata, fetch_idx, base_q;
  logic [7:0]  grey;

  // ---------------- registers ----------------
  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      wr_pend <= 1'b0; wr_reg <= '0; rd_reg <= '0;
      enable <= 1'b0; irq_en <= 1'b0; fb_addr <= '0;
    end else begin
      if (hready) begin
        wr_pend <= hsel && s_m2s.htrans[1] && s_m2s.hwrite;
        wr_reg  <= s_m2s.haddr[3:2];
        if (hsel && s_m2s.htrans[1] && !s_m2s.hwrite) rd_reg <= s_m2s.haddr[3:2];
      end
      if (wr_pend && wr_reg == 2'd0) begin
        enable <= s_m2s.hwdata[0];
        irq_en <= s_m2s.hwdata[1];
      end
      if (wr_pend && wr_reg == 2'd1) fb_addr <= s_m2s.hwdata;
    end
  end

  assign s_s2m.hreadyout = 1'b1;
  assign s_s2m.hresp     = HRESP_OKAY;
  always_comb
    unique case (rd_reg)
      2'd0:    s_s2m.hrdata = {30'd0, irq_en, enable};
      2'd1:    s_s2m.hrdata = fb_addr;
      2'd2:    s_s2m.hrdata = {30'd0, underrun, frame_flag};
      default: s_s2m.hrdata = '0;
    endcase
  assign irq = frame_flag && irq_en;

  // ---------------- timing generator ----------------
  assign pix_en    = enable && (pdiv == PW'(PIX_DIV-1));
  assign active    = (hcnt < HW'(H_ACTIVE)) && (vcnt < VW'(V_ACTIVE));
  assign frame_end = pix_en && (hcnt == HW'(H_TOTAL-1)) && (vcnt == VW'(V_ACTIVE-1));

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      pdiv <= '0; hcnt <= '0; vcnt <= VW'(V_ACTIVE);
      lcd_hsync_n <= 1'b1; lcd_vsync_n <= 1'b1; lcd_de <= 1'b0; lcd_rgb <= '0;
      lcd_pclk_en <= 1'b0;
    end else if (!enable) begin
      pdiv <= '0; hcnt <= '0; vcnt <= VW'(V_ACTIVE);
      lcd_hsync_n <= 1'b1; lcd_vsync_n <= 1'b1; lcd_de <= 1'b0; lcd_rgb <= '0;
      lcd_pclk_en <= 1'b0;
    end else begin
      pdiv        <= pix_en ? '0 : pdiv + 1'b1;
      lcd_pclk_en <= pix_en;
      if (pix_en) begin
        lcd_de      <= active;
        lcd_rgb     <= (active && cnt != 0) ? {grey[7:3], grey[7:2], grey[7:3]} : 16'h0000;
        lcd_hsync_n <= !((hcnt >= HW'(H_ACTIVE + H_FP)) && (hcnt < HW'(H_ACTIVE + H_FP + H_SYNC)));
        lcd_vsync_n <= !((vcnt >= VW'(V_ACTIVE + V_FP)) && (vcnt < VW'(V_ACTIVE + V_FP + V_SYNC)));
        if (hcnt == HW'(H_TOTAL-1)) begin
          hcnt <= '0;
          vcnt <= (vcnt == VW'(V_TOTAL-1)) ? '0 : vcnt + 1'b1;
        end else begin
          hcnt <= hcnt + 1'b1;
        end
      end
    end
  end

  // ---------------- FIFO and DMA ----------------
  assign grey = fifo_mem[rp][8*px_k +: 8];
  assign pop  = pix_en && active && (cnt != 0) && (px_k == 2'd3);
  assign push = m_done && !restart;
  assign cmd_valid = enable && !restart && !cmd_pend && (fetch_idx < FRAME_WORDS)
                   && (cnt < (AW+1)'(FIFO_WORDS));

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      rp <= '0; wp <= '0; cnt <= '0; px_k <= '0;
      restart <= 1'b1; cmd_pend <= 1'b0; fetch_idx <= '0; base_q <= '0;
      frame_flag <= 1'b0; underrun <= 1'b0;
    end else begin
      if (cmd_valid && cmd_ready) cmd_pend <= 1'b1;
      if (m_done) cmd_pend <= 1'b0;
      if (frame_end || !enable) restart <= 1'b1;
      if (frame_end) frame_flag <= 1'b1;
      if (wr_pend && wr_reg == 2'd2 && s_m2s.hwdata[0]) frame_flag <= 1'b0;
      if (wr_pend && wr_reg == 2'd2 && s_m2s.hwdata[1]) underrun   <= 1'b0;
      if (pix_en && active && cnt == 0) underrun <= 1'b1;
      if (restart && !cmd_pend && !(cmd_valid && cmd_ready) && enable && !frame_end) begin
        // flush between frames, only with no transfer in flight
        rp <= '0; wp <= '0; cnt <= '0; px_k <= '0; fetch_idx <= '0;
        base_q  <= fb_addr;
        restart <= 1'b0;
      end else begin
        if (push) begin
          fifo_mem[wp] <= m_rdata;
          wp <= wp + 1'b1;
          fetch_idx <= fetch_idx + 1;
        end
        if (pix_en && active && cnt != 0) px_k <= px_k + 1'b1;
        if (pop) rp <= rp + 1'b1;
        cnt <= cnt + (AW+1)'(push) - (AW+1)'(pop);
      end
    end
  end

  // FIFO slots are reserved only by count; a fetch never overruns it.
  assert property (@(posedge hclk) disable iff (!hresetn) push |-> (cnt < (AW+1)'(FIFO_WORDS) || pop))
    else $error("tft_lcd_ctrl: FIFO overflow");

  ahb_single_master u_dma (
    .hclk, .hresetn,
    .cmd_valid, .cmd_ready, .cmd_write(1'b0),
    .cmd_addr(base_q + (fetch_idx << 2)), .cmd_wdata(32'h0),
    .done(m_done), .rdata(m_rdata), .error(m_err),
    .hbusreq(m_hbusreq), .hgrant(m_hgrant), .m2s(m_m2s),
    .hready, .hresp(m_hresp), .hrdata(m_hrdata)
  );

endmodule
