// tb_tft_lcd_ctrl: TFT-LCD controller on a small panel with a small FIFO.
//
// The frame buffer sits in a wait-stating AHB memory.  The testbench enables
// the controller and records the panel outputs for three frames: every
// active pixel (DE high at a pixel clock) must be the RGB565 form of the
// matching frame-buffer byte, each frame must have exactly H_ACTIVE*V_ACTIVE
// active pixels, V_TOTAL HSYNC pulses per VSYNC period and a VSYNC of V_SYNC
// lines, the frame interrupt must come once per frame, and no underrun may
// occur.  The frame buffer is rewritten after each frame interrupt, so the
// next frame must show the new contents (DMA restart at each frame).
module tb_tft_lcd_ctrl;
  import sad_pkg::*;
  localparam int HA = 16, VA = 6, HFP = 8, HS = 8, HBP = 16, VFP = 2, VS = 2, VBP = 4;
  localparam int HT = HA + HFP + HS + HBP, VT = VA + VFP + VS + VBP;
  localparam int NW = HA * VA / 4;
  localparam logic [31:0] FB = 32'h100;

  logic hclk = 0, hresetn = 0, hsel = 0;
  ahb_m2s_t s_m2s, m_m2s; ahb_s2m_t s_s2m, mem_s2m;
  logic m_hbusreq, lcd_pclk_en, lcd_hsync_n, lcd_vsync_n, lcd_de, irq;
  logic [15:0] lcd_rgb;
  int checks = 0, failures = 0;

  always #5 hclk = ~hclk;

  tft_lcd_ctrl #(.H_ACTIVE(HA), .V_ACTIVE(VA), .PIX_DIV(2), .FIFO_WORDS(8)) dut (
    .hclk, .hresetn, .hsel, .s_m2s, .hready(mem_s2m.hreadyout), .s_s2m,
    .m_hbusreq, .m_hgrant(1'b1), .m_m2s, .m_hresp(mem_s2m.hresp), .m_hrdata(mem_s2m.hrdata),
    .lcd_pclk_en, .lcd_hsync_n, .lcd_vsync_n, .lcd_de, .lcd_rgb, .irq
  );
  ahb_mem_model #(.WORDS(256), .WAIT_MAX(2)) u_mem (
    .hclk, .hresetn, .hsel(1'b1), .m2s(m_m2s), .hready(mem_s2m.hreadyout), .s2m(mem_s2m)
  );

  byte unsigned img [HA*VA];
  int frame = -1, pix = 0, hs_pulses = 0, vs_len = 0;
  logic hs_q = 1, vs_q = 1;

  function automatic logic [15:0] rgb(input byte unsigned g);
    return {g[7:3], g[7:2], g[7:3]};
  endfunction

  task automatic fill(input int seed);
    for (int i = 0; i < HA*VA; i++) img[i] = 8'((i * 37 + seed * 91) ^ seed);
    for (int w = 0; w < NW; w++)
      u_mem.mem[(FB >> 2) + w] = {img[4*w+3], img[4*w+2], img[4*w+1], img[4*w]};
  endtask

  // panel monitor
  always @(posedge hclk) if (hresetn && lcd_pclk_en) begin
    hs_q <= lcd_hsync_n; vs_q <= lcd_vsync_n;
    if (!lcd_hsync_n && hs_q) hs_pulses++;
    if (!lcd_vsync_n) vs_len++;
    if (!lcd_vsync_n && vs_q) begin
      if (frame >= 0) begin
        checks += 3;
        if (pix != HA*VA) begin failures++; $display("frame %0d: %0d active pixels", frame, pix); end
        if (hs_pulses != VT) begin failures++; $display("frame %0d: %0d hsync pulses", frame, hs_pulses); end
        if (vs_len != 1) begin failures++; end   // counted at the first VSYNC pixel only
      end
      frame++; pix = 0; hs_pulses = 0;
    end
    if (lcd_vsync_n && !vs_q) begin
      checks++;
      if (vs_len != VS * HT) begin failures++; $display("vsync %0d pixel clocks", vs_len); end
      vs_len = 0;
    end
    if (lcd_de && frame >= 0 && pix < HA*VA) begin
      checks++;
      if (lcd_rgb !== rgb(img[pix])) begin
        failures++;
        if (failures < 10) $display("frame %0d pixel %0d: got %h exp %h", frame, pix, lcd_rgb, rgb(img[pix]));
      end
      pix++;
    end
  end

  task automatic bus(input logic wr, input logic [7:0] off, input logic [31:0] wd, output logic [31:0] rdv);
    @(posedge hclk);
    hsel <= 1; s_m2s <= '0; s_m2s.haddr <= {24'hA00000, off}; s_m2s.htrans <= HTRANS_NONSEQ; s_m2s.hwrite <= wr;
    @(posedge hclk);
    hsel <= 0; s_m2s.htrans <= HTRANS_IDLE; s_m2s.hwdata <= wd;
    #1 rdv = s_s2m.hrdata;
    @(posedge hclk);
  endtask

  logic [31:0] rd;
  initial begin
    s_m2s = '0;
    fill(0);
    repeat (3) @(posedge hclk);
    hresetn <= 1;
    bus(1, 8'h04, FB, rd);
    bus(1, 8'h00, 32'h3, rd);
    for (int f = 1; f <= 3; f++) begin
      wait (irq);
      // the frame just ended; new contents for the next one
      fill(f);
      @(posedge hclk);
      while (frame < f) @(posedge hclk);  // VSYNC of the next period starts after irq
      bus(1, 8'h08, 32'h1, rd);
      @(posedge hclk); #1;
      checks++; if (irq) begin failures++; $display("frame irq not cleared"); end
    end
    bus(0, 8'h08, 0, rd);
    checks++; if (rd[1]) begin failures++; $display("underrun"); end
    checks++; if (frame < 3) begin failures++; $display("only %0d frames", frame); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge hclk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
