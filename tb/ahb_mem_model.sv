// ahb_mem_model: behavioural AHB slave memory for testbenches.
//
// Stands in for the memory module (SDRAM controller and SDRAM) on the
// peripheral bus.  Word-addressed array of WORDS 32-bit words (address bits
// above the array size are ignored).  Each data phase is stretched by a
// random 0..WAIT_MAX wait states through HREADYOUT, so masters see stalls.
// Tests fill and inspect the array directly through `mem`.
module ahb_mem_model #(
  parameter int unsigned WORDS    = 1024,
  parameter int unsigned WAIT_MAX = 2
) (
  input  logic              hclk,
  input  logic              hresetn,
  input  logic              hsel,
  input  sad_pkg::ahb_m2s_t m2s,
  input  logic              hready,
  output sad_pkg::ahb_s2m_t s2m
);
  localparam int unsigned AW = $clog2(WORDS);
  logic [31:0]   mem [WORDS];
  logic          dp_act, dp_write;
  logic [AW-1:0] dp_addr;
  int            waitcnt;
  int            n_wait_cycles = 0;

  assign s2m.hreadyout = !dp_act || (waitcnt == 0);
  assign s2m.hresp     = sad_pkg::HRESP_OKAY;
  assign s2m.hrdata    = (dp_act && !dp_write) ? mem[dp_addr] : 32'h0;

  always @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      dp_act <= 1'b0; dp_write <= 1'b0; dp_addr <= '0; waitcnt <= 0;
    end else begin
      if (dp_act && waitcnt > 0) begin
        waitcnt <= waitcnt - 1;
        n_wait_cycles++;
      end
      if (dp_act && waitcnt == 0 && dp_write) mem[dp_addr] <= m2s.hwdata;
      if (hready) begin
        dp_act <= hsel && m2s.htrans[1];
        if (hsel && m2s.htrans[1]) begin
          dp_write <= m2s.hwrite;
          dp_addr  <= m2s.haddr[AW+1:2];
          waitcnt  <= int'($urandom_range(0, WAIT_MAX));
        end
      end
    end
  end
endmodule
