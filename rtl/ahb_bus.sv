// ahb_bus: arbiter, decoder and multiplexers of the peripheral AHB bus.
//
// Connects NM AMBA 2.0 AHB masters to NS slaves.
//   Arbiter: fixed priority, master 0 highest.  HGRANT is re-evaluated at
//   every clock edge where HREADY is high; with no request the bus is parked
//   on master NM-1.  The master granted at such an edge owns the next address
//   phase, and the owner of an address phase owns the following data phase.
//   Decoder: slave s is selected when HADDR[31:28] equals nibble s of
//   SLAVE_MAP.  An address that hits no slave is answered by a built-in
//   default slave with a zero-wait OKAY and read data 0.
//   Multiplexers: address/control from the address-phase owner, HWDATA from
//   the data-phase owner, HRDATA/HREADY/HRESP from the data-phase slave.
// The document only names the two AHB buses of the system; the priority
// order, the parking master and the default-slave response are this design's
// choices.  Only SINGLE transfers are assumed by the arbiter (a grant may move
// between any two transfers).
module ahb_bus #(
  parameter int unsigned     NM        = 3,
  parameter int unsigned     NS        = 4,
  parameter logic [NS*4-1:0] SLAVE_MAP = {4'hA, 4'h9, 4'h8, 4'h0}
) (
  input  logic              hclk,
  input  logic              hresetn,
  // masters
  input  logic [NM-1:0]     m_hbusreq,
  output logic [NM-1:0]     m_hgrant,
  input  sad_pkg::ahb_m2s_t m_m2s [NM],
  // common return path to the masters
  output logic              hready,
  output sad_pkg::hresp_e   hresp,
  output logic [31:0]       hrdata,
  output logic [$clog2(NM)-1:0] hmaster,
  // slaves
  output logic [NS-1:0]     s_hsel,
  output sad_pkg::ahb_m2s_t s_m2s,
  input  sad_pkg::ahb_s2m_t s_s2m [NS]
);
  import sad_pkg::*;

  localparam int unsigned MW = (NM > 1) ? $clog2(NM) : 1;
  localparam int unsigned SW = (NS > 1) ? $clog2(NS) : 1;

  logic [MW-1:0] grant_idx, next_idx, addr_owner, data_owner;
  logic [SW-1:0] dsel_idx, asel_idx;
  logic          dsel_hit, asel_hit;

  // ---------------- arbiter ----------------
  always_comb begin
    next_idx = MW'(NM-1);
    for (int i = NM-1; i >= 0; i--)
      if (m_hbusreq[i]) next_idx = MW'(i);
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      grant_idx  <= MW'(NM-1);
      addr_owner <= MW'(NM-1);
      data_owner <= MW'(NM-1);
    end else if (hready) begin
      grant_idx  <= next_idx;
      addr_owner <= grant_idx;
      data_owner <= addr_owner;
    end
  end

  always_comb
    for (int i = 0; i < NM; i++) m_hgrant[i] = (grant_idx == MW'(i));
  assign hmaster = addr_owner;

  // ---------------- address / write-data multiplexer ----------------
  always_comb begin
    s_m2s        = m_m2s[addr_owner];
    s_m2s.hwdata = m_m2s[data_owner].hwdata;
  end

  // ---------------- decoder ----------------
  always_comb begin
    asel_idx = '0;
    asel_hit = 1'b0;
    for (int s = 0; s < NS; s++)
      if (s_m2s.haddr[31:28] == SLAVE_MAP[4*s +: 4]) begin
        asel_idx = SW'(s);
        asel_hit = 1'b1;
      end
    for (int s = 0; s < NS; s++) s_hsel[s] = asel_hit && (asel_idx == SW'(s));
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      dsel_idx <= '0;
      dsel_hit <= 1'b0;
    end else if (hready) begin
      dsel_idx <= asel_idx;
      dsel_hit <= asel_hit && s_m2s.htrans[1];
    end
  end

  // ---------------- read-data / response multiplexer ----------------
  always_comb begin
    if (dsel_hit) begin
      hready = s_s2m[dsel_idx].hreadyout;
      hresp  = s_s2m[dsel_idx].hresp;
      hrdata = s_s2m[dsel_idx].hrdata;
    end else begin
      hready = 1'b1;
      hresp  = HRESP_OKAY;
      hrdata = '0;
    end
  end

  // one grant at a time
  assert property (@(posedge hclk) disable iff (!hresetn) $onehot(m_hgrant))
    else $error("ahb_bus: grant not one-hot");

endmodule
