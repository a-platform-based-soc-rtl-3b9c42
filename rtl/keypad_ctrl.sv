// keypad_ctrl: matrix keypad controller with interrupt, AHB slave.
//
// In the vision system a key stroke starts a run, so this block turns a key
// press into an interrupt and a readable key code.  It scans a ROWS x COLS
// switch matrix: one column line at a time is driven low (col_n), held for
// SCAN_DIV clocks, and the synchronised row lines (row_n, pulled up, low when
// a key connects them to the driven column) are sampled in the last clock of
// that slot.  After a full scan the lowest-numbered pressed key (code =
// row*COLS + col) is compared with the previous scan; a key seen in two
// consecutive scans after a scan with no key is a new stroke (simple
// debouncing).  It is latched in KEY, PENDING is set and irq = PENDING & IRQ_EN.
// Registers (this design's layout): 0x00 KEY  [7:0] code, [8] PENDING (write 1
// to clear); 0x04 CTRL [0] IRQ_EN.  The document names the keypad controller
// only; the matrix size, scan and debounce scheme are this design's choices.
module keypad_ctrl #(
  parameter int unsigned ROWS     = 4,
  parameter int unsigned COLS     = 4,
  parameter int unsigned SCAN_DIV = 256
) (
  input  logic              hclk,
  input  logic              hresetn,
  input  logic              hsel,
  input  sad_pkg::ahb_m2s_t s_m2s,
  input  logic              hready,
  output sad_pkg::ahb_s2m_t s_s2m,
  output logic [COLS-1:0]   col_n,
  input  logic [ROWS-1:0]   row_n,
  output logic              irq
);
  import sad_pkg::*;

  localparam int unsigned CW = (COLS > 1) ? $clog2(COLS) : 1;
  localparam int unsigned DW = (SCAN_DIV > 1) ? $clog2(SCAN_DIV) : 1;

  logic [ROWS-1:0] row_s1, row_s2;
  logic [CW-1:0]   col;
  logic [DW-1:0]   div;
  logic            found, prev_found, reported;
  logic [7:0]      found_code, prev_code, key_code;
  logic            pending, irq_en;
  logic            wr_pend, rd_sel;
  logic            wr_reg;

  assign col_n = ~(COLS'(1) << col);

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      row_s1 <= '1; row_s2 <= '1;
      col <= '0; div <= '0;
      found <= 1'b0; found_code <= '0;
      prev_found <= 1'b0; prev_code <= '0; reported <= 1'b0;
      key_code <= '0; pending <= 1'b0;
    end else begin
      row_s1 <= row_n;
      row_s2 <= row_s1;
      if (div == DW'(SCAN_DIV-1)) begin
        div <= '0;
        // sample the rows of the current column
        for (int r = ROWS-1; r >= 0; r--)
          if (!row_s2[r] && !found) begin
            found      <= 1'b1;
            found_code <= 8'(r*COLS) + 8'(col);
          end
        if (col == CW'(COLS-1)) begin
          // end of a full scan: debounce and report
          automatic logic       f = found;
          automatic logic [7:0] c = found_code;
          for (int r = ROWS-1; r >= 0; r--)
            if (!row_s2[r] && !f) begin f = 1'b1; c = 8'(r*COLS) + 8'(col); end
          if (f && prev_found && c == prev_code && !reported) begin
            key_code <= c;
            pending  <= 1'b1;
            reported <= 1'b1;
          end
          if (!f) reported <= 1'b0;
          prev_found <= f;
          prev_code  <= c;
          found <= 1'b0;
          col   <= '0;
        end else begin
          col <= col + 1'b1;
        end
      end else begin
        div <= div + 1'b1;
      end
      if (wr_pend && !wr_reg && s_m2s.hwdata[8]) pending <= 1'b0;
    end
  end

  // ---------------- AHB slave ----------------
  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      wr_pend <= 1'b0; wr_reg <= 1'b0; rd_sel <= 1'b0; irq_en <= 1'b0;
    end else begin
      if (hready) begin
        wr_pend <= hsel && s_m2s.htrans[1] && s_m2s.hwrite;
        wr_reg  <= s_m2s.haddr[2];
        if (hsel && s_m2s.htrans[1] && !s_m2s.hwrite) rd_sel <= s_m2s.haddr[2];
      end
      if (wr_pend && wr_reg) irq_en <= s_m2s.hwdata[0];
    end
  end

  assign s_s2m.hreadyout = 1'b1;
  assign s_s2m.hresp     = HRESP_OKAY;
  assign s_s2m.hrdata    = rd_sel ? {31'd0, irq_en} : {23'd0, pending, key_code};
  assign irq             = pending && irq_en;

endmodule
