// tb_ahb_bus: three AHB masters share the bus to two wait-stating memories.
//
// Each master runs random single reads and writes to its own address range
// (spread over both slaves) and checks every read against its own shadow
// copy, so misrouted address, write data or read data shows up as a data
// error.  The testbench also checks that the grant is one-hot, that a cycle in
// which several masters request gives the grant to the lowest-numbered one,
// that contention actually happened, and that an unmapped address reads 0.
module tb_ahb_bus;
  import sad_pkg::*;
  localparam int NM = 3, NS = 2, OPS = 150;

  logic hclk = 0, hresetn = 0;
  logic [NM-1:0] hbusreq, hgrant;
  ahb_m2s_t m_m2s [NM];
  logic hready; hresp_e hresp; logic [31:0] hrdata; logic [1:0] hmaster;
  logic [NS-1:0] s_hsel; ahb_m2s_t s_m2s; ahb_s2m_t s_s2m [NS];
  int checks = 0, failures = 0, contention = 0;

  always #5 hclk = ~hclk;

  ahb_bus #(.NM(NM), .NS(NS), .SLAVE_MAP({4'h1, 4'h0})) dut (
    .hclk, .hresetn, .m_hbusreq(hbusreq), .m_hgrant(hgrant), .m_m2s,
    .hready, .hresp, .hrdata, .hmaster, .s_hsel, .s_m2s, .s_s2m
  );
  ahb_mem_model #(.WORDS(256), .WAIT_MAX(2)) u_m0 (.hclk, .hresetn, .hsel(s_hsel[0]), .m2s(s_m2s), .hready, .s2m(s_s2m[0]));
  ahb_mem_model #(.WORDS(256), .WAIT_MAX(3)) u_m1 (.hclk, .hresetn, .hsel(s_hsel[1]), .m2s(s_m2s), .hready, .s2m(s_s2m[1]));

  logic        cv [NM], cr [NM], cw [NM], dn [NM], er [NM];
  logic [31:0] ca [NM], cd [NM], rd [NM];
  int          finished = 0;

  for (genvar m = 0; m < NM; m++) begin : g_m
    ahb_single_master u_m (
      .hclk, .hresetn, .cmd_valid(cv[m]), .cmd_ready(cr[m]), .cmd_write(cw[m]),
      .cmd_addr(ca[m]), .cmd_wdata(cd[m]), .done(dn[m]), .rdata(rd[m]), .error(er[m]),
      .hbusreq(hbusreq[m]), .hgrant(hgrant[m]), .m2s(m_m2s[m]), .hready, .hresp, .hrdata
    );

    initial begin : drive
      logic [31:0] shadow [2][32];
      for (int s = 0; s < 2; s++) for (int i = 0; i < 32; i++) shadow[s][i] = 0;
      cv[m] = 0; cw[m] = 0; ca[m] = 0; cd[m] = 0;
      wait (hresetn);
      for (int k = 0; k < OPS; k++) begin
        automatic int s = $urandom_range(0, 1), i = $urandom_range(0, 31);
        automatic logic wr = $urandom_range(0, 1);
        @(posedge hclk);
        cv[m] <= 1; cw[m] <= wr; ca[m] <= {4'(s), 16'd0, 12'((m * 32 + i) * 4)};
        cd[m] <= $urandom;
        do @(posedge hclk); while (!cr[m]);
        cv[m] <= 0;
        do @(posedge hclk); while (!dn[m]);
        if (wr) shadow[s][i] = cd[m];
        else begin
          checks++;
          if (rd[m] !== shadow[s][i]) begin
            failures++; $display("master %0d slave %0d word %0d: got %h exp %h", m, s, i, rd[m], shadow[s][i]);
          end
        end
        repeat ($urandom_range(0, 2)) @(posedge hclk);
      end
      finished++;
    end
  end

  // grant rules
  logic [NM-1:0] req_q;
  always @(posedge hclk) if (hresetn) begin
    checks++;
    if (!$onehot(hgrant)) begin failures++; $display("grant %b", hgrant); end
    if ($countones(hbusreq) > 1) contention++;
  end
  // at an edge with HREADY, the new grant goes to the lowest requester
  always @(posedge hclk) begin
    if (hresetn && hready && hbusreq != 0) begin
      req_q = hbusreq;
      #1;
      checks++;
      if (hgrant != (req_q & -req_q)) begin failures++; $display("priority: req %b grant %b", req_q, hgrant); end
    end
  end

  initial begin
    for (int i = 0; i < 256; i++) begin u_m0.mem[i] = 0; u_m1.mem[i] = 0; end
    repeat (3) @(posedge hclk);
    hresetn <= 1;
  end

  initial begin
    repeat (50000) @(posedge hclk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wait (finished == NM);
    checks++;
    if (contention == 0) begin failures++; $display("no contention"); end
    // unmapped address (0x5...) through master 2: default slave returns 0
    @(posedge hclk);
    cv[2] <= 1; cw[2] <= 0; ca[2] <= 32'h5000_0000;
    do @(posedge hclk); while (!cr[2]);
    cv[2] <= 0;
    do @(posedge hclk); while (!dn[2]);
    checks++;
    if (rd[2] !== 0 || er[2]) begin failures++; $display("unmapped read %h", rd[2]); end
    $display("contention cycles: %0d", contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
