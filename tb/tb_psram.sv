// tb_psram: writes a pattern to scattered addresses of the PSRAM model and
// reads it back, checking one-clock read latency, that a write does not
// disturb other words and that a deselected device ignores writes.
module tb_psram;
  logic clk = 0, ce_n = 1, we_n = 1, oe_n = 1;
  logic [17:0] addr = 0; logic [15:0] di = 0, dq;
  int checks = 0, failures = 0;
  psram dut (.clk, .ce_n, .we_n, .oe_n, .addr, .dq_i(di), .dq_o(dq));
  always #5 clk = ~clk;
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic logic [17:0] ad(input int k); return 18'((k * 40503) % 262144); endfunction
  initial begin
    for (int k = 0; k < 200; k++) begin
      @(negedge clk); ce_n = 0; we_n = 0; oe_n = 1; addr = ad(k); di = 16'(k * 313 + 7);
    end
    @(negedge clk); ce_n = 1; we_n = 0; addr = ad(5); di = 16'hDEAD;   // not selected
    @(negedge clk); we_n = 1;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk); ce_n = 0; oe_n = 0; addr = ad(k);
      @(negedge clk); ce_n = 1; oe_n = 1;
      checks++;
      if (dq != 16'(k * 313 + 7)) begin failures++; if (failures < 10) $display("addr %0d got %h", ad(k), dq); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
