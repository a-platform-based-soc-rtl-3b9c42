// stereo_soc_env: system environment around the peripheral module.
//
// Plays everything outside the peripheral module: the memory module (an AHB
// memory with random wait states), the processor behind the AHB1-2 bridge (a
// bus-functional master running the system software flow), the UART
// interrupt line, a 4x4 key matrix and a monitor on the LCD panel port.
// The flow, checked step by step:
//   1. the LCD is enabled on a test pattern and keeps refreshing throughout;
//   2. a key stroke raises the keypad interrupt; the processor reads the code;
//   3. the processor loads a stereo pair (ROWS rows of SL pixels, a random
//      texture seen at a different disparity in each horizontal band), starts
//      the SAD wrapper and polls its STATUS over the bus while the DMA runs;
//      a UART interrupt is raised meanwhile;
//   4. on the SAD interrupt (which must win over the pending UART one) the
//      disparity image in memory is compared with the reference model;
//   5. the processor turns disparities into a grey depth map in a second
//      frame buffer and points the LCD controller at it; from the next frame
//      boundary on, the panel must show it pixel for pixel (every frame must
//      match one of the two buffers entirely: no tearing).
// Counts of the mechanisms seen (memory stalls, bus contention met by
// the processor, debounced key stroke, interrupt preemption, LCD frames and DMA
// restarts) are printed, and one that never happened is a failure.
// Frame-buffer and image contents are written straight into the memory
// model, standing in for processor software that is not under test.
module stereo_soc_env #(
  parameter int SL = 240, WW = 9, WH = 9, MAXD = 31, ROWS = 240,
  parameter int LCD_HA = 320, LCD_VA = 240, LCD_DIV = 4, KEY_DIV = 256,
  parameter int MEM_WORDS = 262144
) (
  output logic              hclk,
  output logic              hresetn,
  output logic              br_hbusreq,
  input  logic              br_hgrant,
  output sad_pkg::ahb_m2s_t br_m2s,
  input  logic              hready,
  input  sad_pkg::hresp_e   hresp,
  input  logic [31:0]       hrdata,
  input  logic [1:0]        hmaster,
  input  logic              mem_hsel,
  input  sad_pkg::ahb_m2s_t mem_m2s,
  output sad_pkg::ahb_s2m_t mem_s2m,
  output logic              uart_irq,
  input  logic              irq,
  input  logic [1:0]        irq_id,
  input  logic [3:0]        key_col_n,
  output logic [3:0]        key_row_n,
  input  logic              lcd_pclk_en,
  input  logic              lcd_hsync_n,
  input  logic              lcd_vsync_n,
  input  logic              lcd_de,
  input  logic [15:0]       lcd_rgb
);
  import sad_pkg::*;

  localparam int NPIX = SL * ROWS, NW = NPIX / 4;
  localparam int FB_PIX = LCD_HA * LCD_VA;
  localparam logic [31:0] LA = 32'h0000_0000, RA = 32'h0002_0000, OA = 32'h0004_0000, FB = 32'h0006_0000, FB2 = 32'h0008_0000;
  localparam logic [31:0] SADR = 32'h8000_0000, KEYR = 32'h9000_0000, LCDR = 32'hA000_0000;

  int checks = 0, failures = 0;
  bit done = 0;

  initial hclk = 0;
  always #5 hclk = ~hclk;

  ahb_mem_model #(.WORDS(MEM_WORDS), .WAIT_MAX(2)) u_mem (
    .hclk, .hresetn, .hsel(mem_hsel), .m2s(mem_m2s), .hready, .s2m(mem_s2m)
  );

  // ---------------- processor bus-functional master ----------------
  logic cv = 0, cr, cw = 0, dn, er;
  logic [31:0] ca = 0, cd = 0, rdv;
  ahb_single_master u_cpu (
    .hclk, .hresetn, .cmd_valid(cv), .cmd_ready(cr), .cmd_write(cw), .cmd_addr(ca), .cmd_wdata(cd),
    .done(dn), .rdata(rdv), .error(er),
    .hbusreq(br_hbusreq), .hgrant(br_hgrant), .m2s(br_m2s), .hready, .hresp, .hrdata
  );

  task automatic bus_write(input logic [31:0] a, input logic [31:0] d);
    @(posedge hclk); cv <= 1; cw <= 1; ca <= a; cd <= d;
    do @(posedge hclk); while (!cr);
    cv <= 0;
    do @(posedge hclk); while (!dn);
  endtask
  task automatic bus_read(input logic [31:0] a, output logic [31:0] d);
    @(posedge hclk); cv <= 1; cw <= 0; ca <= a;
    do @(posedge hclk); while (!cr);
    cv <= 0;
    do @(posedge hclk); while (!dn);
    d = rdv;
  endtask
  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d exp %0d", what, got, exp); end
  endtask

  // ---------------- keypad matrix ----------------
  int pressed = -1;
  always_comb begin
    key_row_n = '1;
    if (pressed >= 0 && !key_col_n[pressed % 4]) key_row_n[pressed / 4] = 1'b0;
  end

  // ---------------- LCD monitor ----------------
  byte unsigned fb_img [2][FB_PIX];
  int  frame = -1, pix = 0, errs0 = 0, errs1 = 0, frames_ok = 0, frames_depth_ok = 0;
  bit  depth_written = 0;
  logic vs_q = 1;
  always @(posedge hclk) if (hresetn && lcd_pclk_en) begin
    vs_q <= lcd_vsync_n;
    if (!lcd_vsync_n && vs_q) begin
      if (frame >= 0) begin
        checks++;
        if (pix != FB_PIX || (errs0 != 0 && errs1 != 0)) begin
          failures++; $display("LCD frame %0d: %0d pixels, %0d/%0d differ from buffers", frame, pix, errs0, errs1);
        end else begin
          frames_ok++;
          if (depth_written && errs1 == 0) frames_depth_ok++;
        end
      end
      frame++; pix = 0; errs0 = 0; errs1 = 0;
    end
    if (lcd_de && frame >= 0 && pix < FB_PIX) begin
      automatic byte unsigned g0 = fb_img[0][pix], g1 = fb_img[1][pix];
      if (lcd_rgb !== {g0[7:3], g0[7:2], g0[7:3]}) errs0++;
      if (lcd_rgb !== {g1[7:3], g1[7:2], g1[7:3]}) errs1++;
      pix++;
    end
  end

  task automatic write_fb(input int kind, ref byte unsigned disp []);
    automatic logic [31:0] base = (kind == 0) ? FB : FB2;
    for (int i = 0; i < FB_PIX; i++) begin
      automatic int x = i % LCD_HA, y = i / LCD_HA;
      if (kind == 0) fb_img[0][i] = 8'(x ^ y);
      else fb_img[1][i] = (x < SL && y < ROWS) ? 8'(int'(disp[y*SL + x]) * (256 / (MAXD + 1))) : 8'd0;
    end
    for (int w = 0; w < FB_PIX / 4; w++)
      u_mem.mem[(base >> 2) + w] = {fb_img[kind][4*w+3], fb_img[kind][4*w+2], fb_img[kind][4*w+1], fb_img[kind][4*w]};
  endtask

  // ---------------- mechanism counters ----------------
  int contention = 0, preempt = 0, key_strokes = 0, lcd_irqs = 0, sad_irqs = 0, polls = 0;
  // the processor asks for the bus while another master holds it
  always @(posedge hclk) if (hresetn && br_hbusreq && !br_hgrant) contention++;

  // ---------------- the flow ----------------
  byte unsigned limg [], rimg [], disp [];
  logic [31:0] rd;
  initial begin
    hresetn = 0; uart_irq = 0;
    limg = new[NPIX]; rimg = new[NPIX]; disp = new[NPIX];
    write_fb(0, disp);
    repeat (4) @(posedge hclk);
    hresetn <= 1;

    // 1. display on
    bus_write(LCDR + 4, FB);
    bus_write(LCDR + 0, 32'h1);

    // 2. key stroke (with bounce)
    bus_write(KEYR + 4, 32'h1);
    repeat (3) begin pressed = 6; repeat (5) @(posedge hclk); pressed = -1; repeat (5) @(posedge hclk); end
    pressed = 6;
    wait (irq);
    @(posedge hclk);
    check("irq source = keypad", irq_id, IRQ_KEY);
    bus_read(KEYR, rd);
    check("key code", rd[7:0], 6);
    key_strokes++;
    bus_write(KEYR, 32'h100);
    pressed = -1;

    // 3. stereo pair and SAD run
    for (int i = 0; i < NPIX; i++) limg[i] = 8'($urandom_range(0, 255));
    for (int i = 0; i < NPIX; i++) begin
      automatic int band = (i / SL) * 4 / ROWS;
      automatic int d = (band * (MAXD / 3)) % (MAXD + 1);
      rimg[i] = (i + d < NPIX) ? limg[i + d] : 8'd0;
    end
    for (int w = 0; w < NW; w++) begin
      u_mem.mem[(LA >> 2) + w] = {limg[4*w+3], limg[4*w+2], limg[4*w+1], limg[4*w]};
      u_mem.mem[(RA >> 2) + w] = {rimg[4*w+3], rimg[4*w+2], rimg[4*w+1], rimg[4*w]};
    end
    bus_write(SADR + 8, LA); bus_write(SADR + 12, RA); bus_write(SADR + 16, OA); bus_write(SADR + 20, NW);
    bus_write(SADR, 32'h3);
    uart_irq = 1;
    do begin
      bus_read(SADR + 4, rd); polls++;
      if (!rd[1]) repeat (200) @(posedge hclk);
    end while (!rd[1]);
    @(posedge hclk); @(posedge hclk);
    check("irq raised", irq, 1);
    check("irq source = SAD over UART", irq_id, IRQ_SAD);
    if (irq_id == 2'(IRQ_SAD)) preempt++;
    sad_irqs++;
    bus_read(SADR + 24, rd);
    $display("SAD run: %0d pixels in %0d clocks (%0.2f clocks/pixel)", NPIX, rd, real'(rd) / NPIX);
    bus_write(SADR + 4, 32'h2);
    @(posedge hclk); @(posedge hclk);
    check("UART next", irq_id, IRQ_UART);
    uart_irq = 0;

    // 4. disparity image
    begin
      automatic int errs = 0;
      for (int n = 0; n < NPIX; n++) begin
        automatic logic [31:0] wv = u_mem.mem[(OA >> 2) + n / 4];
        automatic int e = sad_ref_pkg::ref_disparity(limg, rimg, n, SL, WW, WH, MAXD);
        disp[n] = wv[8*(n%4) +: 8];
        checks++;
        if (int'(disp[n]) != e) begin
          errs++; failures++;
          if (errs < 5) $display("disparity %0d: got %0d exp %0d", n, disp[n], e);
        end
      end
    end

    // 5. depth map on the display (second buffer), then a frame interrupt
    write_fb(1, disp);
    depth_written = 1;
    bus_write(LCDR + 4, FB2);
    bus_write(LCDR + 8, 32'h1);
    bus_write(LCDR, 32'h3);
    wait (irq && irq_id == 2'(IRQ_LCD));
    lcd_irqs++;
    bus_write(LCDR + 8, 32'h1);
    begin
      automatic int f0 = frame;
      wait (frames_depth_ok > 0 || frame > f0 + 2);
    end
    check("depth map frame shown", frames_depth_ok > 0, 1);
    bus_read(LCDR + 8, rd);
    check("no LCD underrun", rd[1], 0);

    $display("mechanisms: memory stalls %0d, bus contention %0d, key strokes %0d, SAD irqs %0d,",
             u_mem.n_wait_cycles, contention, key_strokes, sad_irqs);
    $display("            irq preemptions %0d, LCD frames ok %0d, LCD irqs %0d, status polls %0d",
             preempt, frames_ok, lcd_irqs, polls);
    check("memory stalls seen",   u_mem.n_wait_cycles > 0, 1);
    check("bus contention seen",  contention > 0, 1);
    check("key stroke seen",      key_strokes > 0, 1);
    check("SAD irq seen",         sad_irqs > 0, 1);
    check("irq preemption seen",  preempt > 0, 1);
    check("LCD frames seen",      frames_ok > 1, 1);
    check("LCD irq seen",         lcd_irqs > 0, 1);
    done = 1;
  end
endmodule
