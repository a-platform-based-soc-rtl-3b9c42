// sad_wrapper: AMBA AHB wrapper with DMA around the SAD correlator.
//
// The wrapper makes the correlator a peripheral of the AHB bus.  It has the
// three parts of the document's block diagram:
//   * AHB interface: a zero-wait-state slave port for the control registers
//     and a master port (ahb_single_master) for DMA;
//   * DMA buffer and registers: the register file below, a one-word buffer per
//     input image and a small FIFO of packed result words;
//   * control unit: fetches the left and right images word by word from
//     memory, feeds their pixels to the correlator, writes the disparities
//     back and raises an interrupt at the end.
//
// Register map (word offsets from the wrapper's base; layout is this design's
// choice):
//   0x00 CTRL      [0] START (write 1; ignored while busy)  [1] IRQ_EN
//   0x04 STATUS    [0] BUSY (ro)  [1] DONE (w1c)  [2] BUS_ERROR (w1c)
//   0x08 LEFT_ADDR   byte address of the left image
//   0x0C RIGHT_ADDR  byte address of the right image
//   0x10 RESULT_ADDR byte address of the disparity image
//   0x14 NUM_WORDS   image size in 32-bit words (4 pixels per word)
//   0x18 CYCLES (ro) clocks taken by the last run
// Images hold 8-bit pixels, four per word, first pixel in bits 7:0; the
// disparity image uses the same packing, one byte per pixel.  The image width
// must equal the correlator's scan line length SL.
//
// Timing: per word the control unit spends one AHB read per image, four
// clocks feeding pixels, and one AHB write for each finished result word,
// result writes taking priority over reads so the FIFO never holds more than
// two words.  irq = DONE & IRQ_EN, level sensitive, cleared by writing 1 to
// STATUS.DONE.
module sad_wrapper #(
  parameter int unsigned SL    = sad_pkg::SL_DEF,
  parameter int unsigned WW    = sad_pkg::WW_DEF,
  parameter int unsigned WH    = sad_pkg::WH_DEF,
  parameter int unsigned MAXD  = sad_pkg::MAXD_DEF,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic              hclk,
  input  logic              hresetn,
  // AHB slave port (registers)
  input  logic              hsel,
  input  sad_pkg::ahb_m2s_t s_m2s,
  input  logic              hready,
  output sad_pkg::ahb_s2m_t s_s2m,
  // AHB master port (DMA)
  output logic              m_hbusreq,
  input  logic              m_hgrant,
  output sad_pkg::ahb_m2s_t m_m2s,
  input  sad_pkg::hresp_e   m_hresp,
  input  logic [31:0]       m_hrdata,
  // interrupt
  output logic              irq
);
  import sad_pkg::*;

  localparam int unsigned PIX_W  = 8;
  localparam int unsigned COL_W  = PIX_W + $clog2(WH);
  localparam int unsigned WIN_W  = COL_W + $clog2(WW);
  localparam int unsigned DISP_W = (MAXD > 0) ? $clog2(MAXD+1) : 1;
  localparam int unsigned CNT_W  = $clog2(FIFO_DEPTH+1);

  // ---------------- registers ----------------
  logic        irq_en, busy, done_q, bus_err;
  logic [31:0] left_addr, right_addr, result_addr, num_words, cycles;
  logic        start_pulse;

  // ---------------- AHB slave ----------------
  logic       wr_pend;
  logic [2:0] wr_reg;
  logic [2:0] rd_reg;

  assign s_s2m.hreadyout = 1'b1;
  assign s_s2m.hresp     = HRESP_OKAY;

  always_comb begin
    unique case (rd_reg)
      3'd0:    s_s2m.hrdata = {30'd0, irq_en, 1'b0};
      3'd1:    s_s2m.hrdata = {29'd0, bus_err, done_q, busy};
      3'd2:    s_s2m.hrdata = left_addr;
      3'd3:    s_s2m.hrdata = right_addr;
      3'd4:    s_s2m.hrdata = result_addr;
      3'd5:    s_s2m.hrdata = num_words;
      3'd6:    s_s2m.hrdata = cycles;
      default: s_s2m.hrdata = '0;
    endcase
  end

  // ---------------- control unit state ----------------
  typedef enum logic [2:0] {C_IDLE, C_CLEAR, C_CHECK, C_RDL, C_RDR, C_FEED, C_WR, C_DONE} cstate_e;
  cstate_e     cstate;
  logic [31:0] rd_idx, wr_idx;
  logic [31:0] lbuf, rbuf;
  logic [1:0]  feed_k;
  logic        cmd_pend;

  // result FIFO
  logic [31:0]      fifo_mem [FIFO_DEPTH];
  logic [CNT_W-1:0] fifo_cnt;
  logic [$clog2(FIFO_DEPTH)-1:0] fifo_rp, fifo_wp;
  logic [23:0]      pack_q;
  logic [1:0]       pack_cnt;
  logic             push, pop;
  logic [31:0]      push_word;

  // master engine
  logic        cmd_valid, cmd_ready, cmd_write, m_done, m_err;
  logic [31:0] cmd_addr, cmd_wdata, m_rdata;

  // correlator
  logic              c_clear, c_valid, c_out_valid;
  logic [7:0]        c_left, c_right;
  logic [DISP_W-1:0] c_disp;
  logic [WIN_W-1:0]  c_min_sad;

  // ---------------- register writes ----------------
  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      wr_pend <= 1'b0; wr_reg <= '0; rd_reg <= '0;
      irq_en <= 1'b0; left_addr <= '0; right_addr <= '0; result_addr <= '0; num_words <= '0;
      start_pulse <= 1'b0;
    end else begin
      start_pulse <= 1'b0;
      if (hready) begin
        wr_pend <= hsel && s_m2s.htrans[1] && s_m2s.hwrite;
        wr_reg  <= s_m2s.haddr[4:2];
        if (hsel && s_m2s.htrans[1] && !s_m2s.hwrite) rd_reg <= s_m2s.haddr[4:2];
      end
      if (wr_pend) begin
        unique case (wr_reg)
          3'd0: begin
            irq_en      <= s_m2s.hwdata[1];
            start_pulse <= s_m2s.hwdata[0];
          end
          3'd2: left_addr   <= s_m2s.hwdata;
          3'd3: right_addr  <= s_m2s.hwdata;
          3'd4: result_addr <= s_m2s.hwdata;
          3'd5: num_words   <= s_m2s.hwdata;
          default: ;
        endcase
      end
    end
  end

  wire status_w1c = wr_pend && (wr_reg == 3'd1);

  // ---------------- control unit ----------------
  assign cmd_valid = !cmd_pend && (cstate == C_RDL || cstate == C_RDR || cstate == C_WR);
  assign cmd_write = (cstate == C_WR);
  always_comb begin
    unique case (cstate)
      C_RDL:   cmd_addr = left_addr  + (rd_idx << 2);
      C_RDR:   cmd_addr = right_addr + (rd_idx << 2);
      default: cmd_addr = result_addr + (wr_idx << 2);
    endcase
  end
  assign cmd_wdata = fifo_mem[fifo_rp];

  assign c_clear = (cstate == C_CLEAR);
  assign c_valid = (cstate == C_FEED);
  always_comb begin
    c_left  = lbuf[8*feed_k +: 8];
    c_right = rbuf[8*feed_k +: 8];
  end
  assign pop = (cstate == C_WR) && m_done;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      cstate <= C_IDLE; busy <= 1'b0; done_q <= 1'b0; bus_err <= 1'b0;
      rd_idx <= '0; wr_idx <= '0; lbuf <= '0; rbuf <= '0; feed_k <= '0;
      cmd_pend <= 1'b0; cycles <= '0;
    end else begin
      if (cmd_valid && cmd_ready) cmd_pend <= 1'b1;
      if (m_done) cmd_pend <= 1'b0;
      if (m_done && m_err) bus_err <= 1'b1;
      if (status_w1c && s_m2s.hwdata[1]) done_q  <= 1'b0;
      if (status_w1c && s_m2s.hwdata[2]) bus_err <= 1'b0;
      if (busy) cycles <= cycles + 1;
      unique case (cstate)
        C_IDLE: if (start_pulse) begin
          busy <= 1'b1; done_q <= 1'b0; cycles <= '0;
          rd_idx <= '0; wr_idx <= '0;
          cstate <= C_CLEAR;
        end
        C_CLEAR: cstate <= C_CHECK;
        C_CHECK:
          if (fifo_cnt != 0)          cstate <= C_WR;
          else if (rd_idx < num_words) cstate <= C_RDL;
          else if (wr_idx == num_words) cstate <= C_DONE;
        C_RDL: if (m_done) begin lbuf <= m_rdata; cstate <= C_RDR; end
        C_RDR: if (m_done) begin rbuf <= m_rdata; feed_k <= '0; cstate <= C_FEED; end
        C_FEED: begin
          feed_k <= feed_k + 1'b1;
          if (feed_k == 2'd3) begin rd_idx <= rd_idx + 1; cstate <= C_CHECK; end
        end
        C_WR: if (m_done) begin wr_idx <= wr_idx + 1; cstate <= C_CHECK; end
        C_DONE: begin busy <= 1'b0; done_q <= 1'b1; cstate <= C_IDLE; end
        default: cstate <= C_IDLE;
      endcase
    end
  end

  // ---------------- result packing and FIFO ----------------
  assign push      = c_out_valid && (pack_cnt == 2'd3);
  assign push_word = {8'(c_disp), pack_q};

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      pack_q <= '0; pack_cnt <= '0; fifo_cnt <= '0; fifo_rp <= '0; fifo_wp <= '0;
      for (int i = 0; i < FIFO_DEPTH; i++) fifo_mem[i] <= '0;
    end else begin
      if (c_clear) begin
        pack_cnt <= '0; fifo_cnt <= '0; fifo_rp <= '0; fifo_wp <= '0;
      end else begin
        if (c_out_valid) begin
          pack_q[8*pack_cnt[1:0] +: 8] <= 8'(c_disp);
          pack_cnt <= pack_cnt + 1'b1;
        end
        if (push) begin
          fifo_mem[fifo_wp] <= push_word;
          fifo_wp <= (fifo_wp == $clog2(FIFO_DEPTH)'(FIFO_DEPTH-1)) ? '0 : fifo_wp + 1'b1;
        end
        if (pop) fifo_rp <= (fifo_rp == $clog2(FIFO_DEPTH)'(FIFO_DEPTH-1)) ? '0 : fifo_rp + 1'b1;
        fifo_cnt <= fifo_cnt + CNT_W'(push) - CNT_W'(pop);
      end
    end
  end

  assert property (@(posedge hclk) disable iff (!hresetn) push |-> (fifo_cnt < CNT_W'(FIFO_DEPTH) || pop))
    else $error("sad_wrapper: result FIFO overflow");

  assign irq = done_q && irq_en;

  // ---------------- sub-blocks ----------------
  ahb_single_master u_dma (
    .hclk, .hresetn,
    .cmd_valid, .cmd_ready, .cmd_write, .cmd_addr, .cmd_wdata,
    .done(m_done), .rdata(m_rdata), .error(m_err),
    .hbusreq(m_hbusreq), .hgrant(m_hgrant), .m2s(m_m2s),
    .hready, .hresp(m_hresp), .hrdata(m_hrdata)
  );

  sad_correlator #(.SL(SL), .WW(WW), .WH(WH), .MAXD(MAXD), .PIX_W(PIX_W)) u_sad (
    .clk(hclk), .rst_n(hresetn), .clear(c_clear), .in_valid(c_valid),
    .left_pix(c_left), .right_pix(c_right),
    .out_valid(c_out_valid), .disparity(c_disp), .min_sad(c_min_sad)
  );

endmodule
