// tb_depuncturer: for several puncturing vectors, feeds numbered soft
// values and checks that every output group holds, in code-bit order, the
// next received value at a kept position and 0 at a removed one, and that
// exactly popcount(pv) values are taken per 8 output groups.
module tb_depuncturer;
  logic clk = 0, rst_n = 0, restart = 0, in_valid = 0, in_ready, out_valid;
  logic [31:0] pv; logic signed [3:0] in_soft; logic [3:0][3:0] og;
  int checks = 0, failures = 0;
  int sent, taken, ngrp;
  logic [3:0] expq [$];
  depuncturer dut (.clk, .rst_n, .restart, .pv, .in_valid, .in_soft, .in_ready, .out_valid, .out_grp(og));
  always #5 clk = ~clk;
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) if (rst_n && out_valid) begin
    ngrp++;
    for (int g = 0; g < 4; g++) begin
      logic [3:0] e; e = expq.pop_front();
      checks++;
      if (og[g] != e) begin failures++; if (failures < 10) $display("grp %0d bit %0d got %0d exp %0d", ngrp, g, og[g], e); end
    end
  end
  task automatic run(input logic [31:0] v, input int blocks);
    int k;
    @(negedge clk); restart = 1; pv = v; @(negedge clk); restart = 0;
    k = 0; taken = 0; ngrp = 0;
    for (int b = 0; b < blocks; b++)
      for (int j = 0; j < 32; j++)
        if (v[j]) begin expq.push_back(4'(1 + (k % 14))); k++; end else expq.push_back(4'd0);
    sent = 0;
    while (sent < k) begin
      @(negedge clk); in_valid = 1; in_soft = 4'(1 + (sent % 14));
      #1; if (in_ready) begin sent++; taken++; end
    end
    @(negedge clk); in_valid = 0;
    repeat (40) @(negedge clk);
    checks++; if (ngrp != 8 * blocks || taken != k) begin failures++; $display("pv %h: %0d groups, %0d taken (exp %0d, %0d)", v, ngrp, taken, 8 * blocks, k); end
  endtask
  initial begin
    pv = 0; in_soft = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    run(32'hFFFFFFFF, 3);
    run(32'hEEEEEEEE, 4);   // rate 1/3 style
    run(32'hCCCCCCCC, 2);   // rate 1/2 style
    run(32'hC8C8C8C8, 5);
    run(32'h88888888, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
