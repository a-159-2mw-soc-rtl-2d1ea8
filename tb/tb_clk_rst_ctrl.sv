// tb_clk_rst_ctrl: checks that every clock-enable strobe fires exactly once
// per DIVS[i] master cycles (the 24.576/16.384/8.192/4.096/2.048 MHz rates
// from a 49.152 MHz master) and that reset release is delayed two cycles.
module tb_clk_rst_ctrl;
  logic clk = 0, arst_n = 0;
  logic rst_n; logic [4:0] ce;
  int checks = 0, failures = 0;
  int cnt [5];
  localparam int D [5] = '{2, 3, 6, 12, 24};
  clk_rst_ctrl dut (.clk, .arst_n, .rst_n_o(rst_n), .ce);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); arst_n = 1;
    @(posedge clk); #1; checks++; if (rst_n) begin failures++; $display("reset released too early"); end
    @(posedge clk); #1; checks++; if (!rst_n) begin failures++; $display("reset not released"); end
    for (int i = 0; i < 5; i++) cnt[i] = 0;
    repeat (240) begin
      @(posedge clk); #1;
      for (int i = 0; i < 5; i++) if (ce[i]) cnt[i]++;
    end
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (cnt[i] != 240 / D[i]) begin failures++; $display("ce[%0d] count %0d exp %0d", i, cnt[i], 240 / D[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
