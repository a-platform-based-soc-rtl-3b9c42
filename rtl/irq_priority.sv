// irq_priority: fixed-priority interrupt request selection.
//
// Combines the interrupt lines of the peripheral module into one request to
// the processor and tells it which source to serve first.  Priority follows
// the order given for the vision system: SAD wrapper (0) highest, then
// TFT-LCD (1), keypad (2) and UART (3).  irq_id is the index of the
// highest-priority pending line; both outputs are registered (one clock from
// irq_src to irq/irq_id).  Lines are level sensitive and stay pending until
// the source is cleared; per-source masking is left to the sources' own
// enable bits (this design's choice).
module irq_priority #(
  parameter int unsigned N = sad_pkg::N_IRQ
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         irq_src,
  output logic                 irq,
  output logic [$clog2(N)-1:0] irq_id
);
  logic [$clog2(N)-1:0] sel;

  always_comb begin
    sel = '0;
    for (int i = N-1; i >= 0; i--)
      if (irq_src[i]) sel = ($clog2(N))'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq    <= 1'b0;
      irq_id <= '0;
    end else begin
      irq    <= |irq_src;
      irq_id <= sel;
    end
  end
endmodule
