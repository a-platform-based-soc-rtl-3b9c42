// ahb_single_master: AMBA 2.0 AHB master engine for single-word transfers.
//
// Turns a simple command (cmd_valid/cmd_ready, address, read/write, write
// data) into one AHB SINGLE, 32-bit, NONSEQ transfer.  It requests the bus
// with HBUSREQ, waits for HGRANT with HREADY high, drives the address phase
// until HREADY, then the data phase (HTRANS IDLE, HWDATA valid) until HREADY,
// and pulses done with the read data and an error flag.  Transfers are not
// pipelined: one word takes at least four clocks on a zero-wait-state bus.
// This engine is shared by the DMA of the SAD wrapper and of the TFT-LCD
// controller; single transfers are this design's choice (the document only
// says the wrapper uses DMA over AHB).  RETRY and SPLIT responses are not
// supported (the slaves of this bus never give them).
module ahb_single_master (
  input  logic                  hclk,
  input  logic                  hresetn,
  // command side
  input  logic                  cmd_valid,
  output logic                  cmd_ready,
  input  logic                  cmd_write,
  input  logic [31:0]           cmd_addr,
  input  logic [31:0]           cmd_wdata,
  output logic                  done,
  output logic [31:0]           rdata,
  output logic                  error,
  // AHB master side
  output logic                  hbusreq,
  input  logic                  hgrant,
  output sad_pkg::ahb_m2s_t     m2s,
  input  logic                  hready,
  input  sad_pkg::hresp_e       hresp,
  input  logic [31:0]           hrdata
);
  import sad_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_ADDR, S_DATA} state_e;
  state_e      state;
  logic        wr_q;
  logic [31:0] addr_q, wdata_q;

  assign cmd_ready = (state == S_IDLE);
  assign hbusreq   = (state == S_REQ) || (state == S_IDLE && cmd_valid);

  always_comb begin
    m2s        = '0;
    m2s.haddr  = addr_q;
    m2s.hwrite = wr_q;
    m2s.hsize  = HSIZE_WORD;
    m2s.hburst = HBURST_SINGLE;
    m2s.htrans = (state == S_ADDR) ? HTRANS_NONSEQ : HTRANS_IDLE;
    m2s.hwdata = wdata_q;
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      state   <= S_IDLE;
      wr_q    <= 1'b0;
      addr_q  <= '0;
      wdata_q <= '0;
      done    <= 1'b0;
      rdata   <= '0;
      error   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          wr_q    <= cmd_write;
          addr_q  <= cmd_addr;
          wdata_q <= cmd_wdata;
          state   <= S_REQ;
        end
        S_REQ:  if (hgrant && hready) state <= S_ADDR;
        S_ADDR: if (hready) state <= S_DATA;
        S_DATA: if (hready) begin
          done  <= 1'b1;
          rdata <= hrdata;
          error <= (hresp == HRESP_ERROR);
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
