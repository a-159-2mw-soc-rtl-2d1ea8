// tb_dsp_if: the processor posts audio frame descriptors faster than the
// DSP takes them; checks first-in first-out order, the interrupt level,
// the full flag at DEPTH entries and that nothing is lost.
module tb_dsp_if;
  logic clk = 0, rst_n = 0, up_we = 0, up_full, dsp_irq, dsp_ack = 0;
  logic [22:0] up_addr = 0, dsp_addr; logic [15:0] up_len = 0, dsp_len;
  int checks = 0, failures = 0;
  int qa [$], ql [$];
  dsp_if dut (.clk, .rst_n, .up_we, .up_addr, .up_len, .up_full, .dsp_irq, .dsp_addr, .dsp_len, .dsp_ack);
  always #5 clk = ~clk;
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); checks++; if (dsp_irq) begin failures++; $display("irq while empty"); end
    for (int k = 0; k < 4; k++) begin
      @(negedge clk); up_we = 1; up_addr = 23'(k * 1000 + 5); up_len = 16'(300 + k); qa.push_back(k * 1000 + 5); ql.push_back(300 + k);
    end
    @(negedge clk); up_we = 0;
    checks++; if (!up_full || !dsp_irq) begin failures++; $display("full %0d irq %0d", up_full, dsp_irq); end
    for (int k = 4; k < 30; k++) begin
      // DSP takes one, processor posts one
      checks++;
      if (dsp_addr != 23'(qa[0]) || dsp_len != 16'(ql[0])) begin failures++; $display("descriptor %h/%0d exp %h/%0d", dsp_addr, dsp_len, qa[0], ql[0]); end
      void'(qa.pop_front()); void'(ql.pop_front());
      @(negedge clk); dsp_ack = 1; @(negedge clk); dsp_ack = 0;
      @(negedge clk); up_we = 1; up_addr = 23'(k * 1000 + 5); up_len = 16'(300 + k); qa.push_back(k * 1000 + 5); ql.push_back(300 + k);
      @(negedge clk); up_we = 0;
    end
    while (qa.size() > 0) begin
      checks++;
      if (!dsp_irq || dsp_addr != 23'(qa[0])) begin failures++; $display("drain %h exp %h", dsp_addr, qa[0]); end
      void'(qa.pop_front()); void'(ql.pop_front());
      @(negedge clk); dsp_ack = 1; @(negedge clk); dsp_ack = 0;
    end
    checks++; if (dsp_irq) begin failures++; $display("irq after drain"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
