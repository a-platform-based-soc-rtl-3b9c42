// tb_keypad_ctrl: keypad controller against a model of a 4x4 switch matrix.
//
// The matrix model pulls a row line low while the pressed key's column line
// is driven low.  The test presses keys with contact bounce, checks that each
// stroke yields exactly one interrupt and the right code in KEY, that a held
// key does not repeat, that a bounce shorter than a scan is ignored, and that
// writing PENDING clears the interrupt.
module tb_keypad_ctrl;
  import sad_pkg::*;
  localparam int ROWS = 4, COLS = 4, DIV = 4, SCAN = DIV * COLS;

  logic hclk = 0, hresetn = 0, hsel = 0, irq;
  ahb_m2s_t s_m2s; ahb_s2m_t s_s2m;
  logic [COLS-1:0] col_n;
  logic [ROWS-1:0] row_n;
  int checks = 0, failures = 0, irq_edges = 0;
  int pressed = -1;   // key code held, -1 for none
  logic irq_q = 0;

  always #5 hclk = ~hclk;

  keypad_ctrl #(.ROWS(ROWS), .COLS(COLS), .SCAN_DIV(DIV)) dut (
    .hclk, .hresetn, .hsel, .s_m2s, .hready(1'b1), .s_s2m, .col_n, .row_n, .irq
  );

  always_comb begin
    row_n = '1;
    if (pressed >= 0 && !col_n[pressed % COLS]) row_n[pressed / COLS] = 1'b0;
  end
  always @(posedge hclk) begin irq_q <= irq; if (irq && !irq_q) irq_edges++; end

  task automatic bus(input logic wr, input logic [7:0] off, input logic [31:0] wd, output logic [31:0] rdv);
    @(posedge hclk);
    hsel <= 1; s_m2s <= '0; s_m2s.haddr <= {24'h900000, off}; s_m2s.htrans <= HTRANS_NONSEQ; s_m2s.hwrite <= wr;
    @(posedge hclk);
    hsel <= 0; s_m2s.htrans <= HTRANS_IDLE; s_m2s.hwdata <= wd;
    #1 rdv = s_s2m.hrdata;
  endtask

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d exp %0d", what, got, exp); end
  endtask

  logic [31:0] rd;
  initial begin
    s_m2s = '0;
    repeat (3) @(posedge hclk);
    hresetn <= 1;
    bus(1, 8'h04, 32'h1, rd);                  // IRQ_EN
    for (int k = 0; k < 6; k++) begin
      automatic int code = (k * 7 + 3) % (ROWS * COLS);
      automatic int n_before = irq_edges;
      // bounce: short contacts n_before the stable press
      repeat (3) begin pressed = code; repeat (3) @(posedge hclk); pressed = -1; repeat (2) @(posedge hclk); end
      pressed = code;
      repeat (6 * SCAN) @(posedge hclk);       // held well beyond debounce
      check("irq edges per stroke", irq_edges - n_before, 1);
      bus(0, 8'h00, 0, rd);
      check("key code", int'(rd[7:0]), code);
      check("pending", int'(rd[8]), 1);
      bus(1, 8'h00, 32'h100, rd);              // clear PENDING
      @(posedge hclk); #1;
      check("irq cleared", int'(irq), 0);
      repeat (4 * SCAN) @(posedge hclk);       // still held: no repeat
      check("no auto-repeat", int'(irq), 0);
      pressed = -1;
      repeat (4 * SCAN) @(posedge hclk);
    end
    // contacts shorter than one scan, at different phases, are not strokes
    for (int g = 0; g < 8; g++) begin
      automatic int n_before = irq_edges;
      pressed = g % (ROWS * COLS); repeat (SCAN / 2) @(posedge hclk); pressed = -1;
      repeat (3 * SCAN + g) @(posedge hclk);
      check("glitch ignored", irq_edges - n_before, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge hclk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
