// sad_pkg: constants and types shared by the stereo-vision peripheral.
//
// The SAD (sum of absolute differences) correlator is sized by four numbers:
// the scan line length SL, the window width WW and height WH, and the
// maximum disparity MAXD.  The defaults are the configuration whose logic
// usage is reported for the complete peripheral: 9x9 windows, a maximum
// disparity of 31 and a scan line of 240 pixels.  The pixel width (8-bit
// grey levels) and the AMBA AHB bundle types below are this design's own
// choices; the AHB encodings are those of AMBA 2.0.
package sad_pkg;

  // ---------------- correlator sizing ----------------
  parameter int unsigned SL_DEF    = 240; // scan line length (pixels)
  parameter int unsigned WW_DEF    = 9;   // window width
  parameter int unsigned WH_DEF    = 9;   // window height
  parameter int unsigned MAXD_DEF  = 31;  // maximum disparity (Delta)
  parameter int unsigned PIX_W_DEF = 8;   // grey-level pixel width

  // Cycles from accepting a pixel pair to the disparity of that pixel:
  // column-DC register, shift buffer, window-DC register, MC register.
  parameter int unsigned SAD_LATENCY = 4;

  // ---------------- AMBA 2.0 AHB ----------------
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  typedef enum logic [1:0] {
    HRESP_OKAY  = 2'b00,
    HRESP_ERROR = 2'b01,
    HRESP_RETRY = 2'b10,
    HRESP_SPLIT = 2'b11
  } hresp_e;

  localparam logic [2:0] HSIZE_WORD   = 3'b010;
  localparam logic [2:0] HBURST_SINGLE = 3'b000;

  // Signals a master drives (address and write data).
  typedef struct packed {
    logic [31:0] haddr;
    htrans_e     htrans;
    logic        hwrite;
    logic [2:0]  hsize;
    logic [2:0]  hburst;
    logic [31:0] hwdata;
  } ahb_m2s_t;

  // Signals a slave returns.
  typedef struct packed {
    logic        hreadyout;
    hresp_e      hresp;
    logic [31:0] hrdata;
  } ahb_s2m_t;

  // Peripheral bus memory map (HADDR[31:28]); the map is this design's choice.
  localparam logic [3:0] MAP_MEM    = 4'h0; // memory module (SDRAM), outside
  localparam logic [3:0] MAP_SAD    = 4'h8; // SAD wrapper registers
  localparam logic [3:0] MAP_KEYPAD = 4'h9; // keypad controller
  localparam logic [3:0] MAP_LCD    = 4'hA; // TFT-LCD controller

  // Interrupt sources in priority order (0 = highest).
  localparam int unsigned IRQ_SAD  = 0;
  localparam int unsigned IRQ_LCD  = 1;
  localparam int unsigned IRQ_KEY  = 2;
  localparam int unsigned IRQ_UART = 3;
  localparam int unsigned N_IRQ    = 4;

endpackage
