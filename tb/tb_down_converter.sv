// tb_down_converter: feeds an IF tone at fs/4 + df (the sub-sampled image
// of an IF of 2.048 + n*4.096 MHz) and checks the complex output against a
// model computed with real arithmetic: I = x0 - x2, Q = x3 - x1 per group,
// and that the output rate is one quarter of the input rate.
module tb_down_converter;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [9:0] adc;
  logic out_valid; logic signed [11:0] oi, oq;
  int checks = 0, failures = 0, nin = 0, nout = 0;
  int xs [4];
  int ei [$], eq [$];
  down_converter dut (.clk, .rst_n, .in_valid, .adc, .out_valid, .out_i(oi), .out_q(oq));
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) if (rst_n && out_valid) begin
    int a, b;
    nout++; a = ei.pop_front(); b = eq.pop_front(); checks++;
    if (oi != a || oq != b) begin failures++; $display("out %0d: got %0d,%0d exp %0d,%0d", nout, oi, oq, a, b); end
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      real ph; int x;
      ph = 2.0 * 3.14159265358979 * (0.25 + 0.01) * n + 0.3;
      x = $rtoi(400.0 * $cos(ph));
      xs[n % 4] = x;
      if (n % 4 == 3) begin ei.push_back(xs[0] - xs[2]); eq.push_back(xs[3] - xs[1]); end
      @(negedge clk); in_valid = 1; adc = 10'(x);
      @(negedge clk); in_valid = 0;
      nin++;
    end
    repeat (4) @(posedge clk);
    checks++; if (nout != nin / 4) begin failures++; $display("rate: %0d outputs for %0d inputs", nout, nin); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
