// tb_sad_wrapper: end-to-end test of the SAD wrapper on its own.
//
// A behavioural AHB memory with random wait states holds a left and a right
// image; the testbench plays the processor on the slave port: it programs the
// image addresses and size, starts the run, waits for the interrupt, reads
// STATUS and CYCLES, clears DONE and compares the disparity image in memory
// with the reference model.  The second run has the interrupt disabled and
// polls DONE instead.  Register read-back is checked too.
module tb_sad_wrapper;
  import sad_pkg::*;
  localparam int SL = 16, WW = 3, WH = 3, MAXD = 7, ROWS = 8;
  localparam int NPIX = SL * ROWS, NW = NPIX / 4;
  localparam logic [31:0] LA = 32'h000, RA = 32'h400, OA = 32'h800;

  logic hclk = 0, hresetn = 0;
  logic hsel = 0;
  ahb_m2s_t s_m2s, m_m2s;
  ahb_s2m_t s_s2m, mem_s2m;
  logic m_hbusreq, irq;
  int checks = 0, failures = 0;

  always #5 hclk = ~hclk;

  sad_wrapper #(.SL(SL), .WW(WW), .WH(WH), .MAXD(MAXD)) dut (
    .hclk, .hresetn, .hsel, .s_m2s, .hready(mem_s2m.hreadyout), .s_s2m,
    .m_hbusreq, .m_hgrant(1'b1), .m_m2s, .m_hresp(mem_s2m.hresp), .m_hrdata(mem_s2m.hrdata), .irq
  );
  ahb_mem_model #(.WORDS(1024), .WAIT_MAX(2)) u_mem (
    .hclk, .hresetn, .hsel(1'b1), .m2s(m_m2s), .hready(mem_s2m.hreadyout), .s2m(mem_s2m)
  );

  initial begin
    repeat (200000) @(posedge hclk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic reg_write(input logic [7:0] off, input logic [31:0] data);
    @(posedge hclk);
    hsel <= 1; s_m2s <= '0;
    s_m2s.haddr <= {24'h800000, off}; s_m2s.htrans <= HTRANS_NONSEQ; s_m2s.hwrite <= 1;
    s_m2s.hsize <= HSIZE_WORD;
    @(posedge hclk);
    hsel <= 0; s_m2s.htrans <= HTRANS_IDLE; s_m2s.hwdata <= data;
    @(posedge hclk);
  endtask

  task automatic reg_read(input logic [7:0] off, output logic [31:0] data);
    @(posedge hclk);
    hsel <= 1; s_m2s <= '0;
    s_m2s.haddr <= {24'h800000, off}; s_m2s.htrans <= HTRANS_NONSEQ; s_m2s.hwrite <= 0;
    @(posedge hclk);
    hsel <= 0; s_m2s.htrans <= HTRANS_IDLE;
    #1 data = s_s2m.hrdata;
  endtask

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h exp %h", what, got, exp); end
  endtask

  byte unsigned limg[], rimg[];
  logic [31:0] rd;

  initial begin
    s_m2s = '0;
    limg = new[NPIX]; rimg = new[NPIX];
    repeat (3) @(posedge hclk);
    hresetn <= 1;
    for (int run = 0; run < 2; run++) begin
      for (int i = 0; i < NPIX; i++) limg[i] = 8'($urandom_range(0, 255));
      for (int i = 0; i < NPIX; i++) begin
        automatic int d = (i / SL + run * 3) % (MAXD + 1);
        rimg[i] = (i + d < NPIX) ? limg[i + d] : 8'd0;
      end
      for (int w = 0; w < NW; w++) begin
        u_mem.mem[(LA >> 2) + w] = {limg[4*w+3], limg[4*w+2], limg[4*w+1], limg[4*w]};
        u_mem.mem[(RA >> 2) + w] = {rimg[4*w+3], rimg[4*w+2], rimg[4*w+1], rimg[4*w]};
        u_mem.mem[(OA >> 2) + w] = 32'hDEADBEEF;
      end
      reg_write(8'h08, LA); reg_write(8'h0C, RA); reg_write(8'h10, OA); reg_write(8'h14, NW);
      reg_read(8'h08, rd); check("LEFT_ADDR", rd, LA);
      reg_read(8'h14, rd); check("NUM_WORDS", rd, NW);
      reg_write(8'h00, (run == 0) ? 32'h3 : 32'h1);
      reg_read(8'h04, rd); check("BUSY", rd[0], 1);
      if (run == 0) wait (irq);
      else begin
        do reg_read(8'h04, rd); while (!rd[1]);
        check("irq masked", irq, 0);
      end
      reg_read(8'h04, rd); check("STATUS done", rd, 32'h2);
      reg_read(8'h18, rd);
      $display("run %0d: %0d pixels in %0d clocks", run, NPIX, rd);
      checks++; if (rd < NPIX || rd > 40 * NW) begin failures++; $display("CYCLES %0d out of range", rd); end
      reg_write(8'h04, 32'h2);
      @(posedge hclk);
      check("irq cleared", irq, 0);
      reg_read(8'h04, rd); check("STATUS cleared", rd, 0);
      for (int n = 0; n < NPIX; n++) begin
        automatic int e = sad_ref_pkg::ref_disparity(limg, rimg, n, SL, WW, WH, MAXD);
        automatic logic [31:0] wv = u_mem.mem[(OA >> 2) + n / 4];
        check($sformatf("run %0d disparity %0d", run, n), 32'(wv[8*(n%4) +: 8]), e);
      end
    end
    checks++;
    if (u_mem.n_wait_cycles == 0) begin failures++; $display("no memory stall happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
