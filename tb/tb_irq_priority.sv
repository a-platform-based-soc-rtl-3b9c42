// tb_irq_priority: every combination of the four interrupt lines; irq must be
// their OR and irq_id the lowest pending index, one clock later.
module tb_irq_priority;
  logic clk = 0, rst_n = 0, irq;
  logic [3:0] irq_src = 0;
  logic [1:0] irq_id;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  irq_priority #(.N(4)) dut (.clk, .rst_n, .irq_src, .irq, .irq_id);

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int rep = 0; rep < 3; rep++)
      for (int v = 0; v < 16; v++) begin
        automatic int exp_id = 0;
        for (int i = 3; i >= 0; i--) if (v[i]) exp_id = i;
        irq_src <= 4'(v);
        @(posedge clk); #1;
        checks++;
        if (irq !== (v != 0) || (v != 0 && irq_id !== 2'(exp_id))) begin
          failures++; $display("src %b: irq %b id %0d", v[3:0], irq, irq_id);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
