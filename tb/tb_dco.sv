// tb_dco: rotates a constant input with several frequency words and checks
// each output sample against in * exp(-j*2*pi*fw*n/2^21) computed with real
// arithmetic (tolerance 3 LSB), including a frequency of 0.001 spacing.
module tb_dco;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic signed [15:0] fw;
  logic signed [11:0] ii, iq, oi, oq;
  logic out_valid;
  int checks = 0, failures = 0;
  dco dut (.clk, .rst_n, .clear, .fw, .in_valid, .in_i(ii), .in_q(iq), .out_valid, .out_i(oi), .out_q(oq));
  always #5 clk = ~clk;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic run(input int f, input int nsamp);
    @(negedge clk); clear = 1; fw = 16'(f); @(negedge clk); clear = 0;
    for (int n = 0; n < nsamp; n++) begin
      real ph, er, ei;
      ii = 12'sd1000; iq = -12'sd300;
      in_valid = 1; @(negedge clk); in_valid = 0;
      ph = -2.0 * 3.14159265358979 * f * n / (2.0 ** 21);
      er = 1000.0 * $cos(ph) + 300.0 * $sin(ph);
      ei = 1000.0 * $sin(ph) - 300.0 * $cos(ph);
      checks++;
      if (!out_valid || (oi - er) > 3.0 || (er - oi) > 3.0 || (oq - ei) > 3.0 || (ei - oq) > 3.0) begin
        failures++;
        if (failures < 10) $display("fw=%0d n=%0d got %0d,%0d exp %f,%f", f, n, oi, oq, er, ei);
      end
    end
  endtask
  initial begin
    fw = 0; ii = 0; iq = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    run(0, 50);
    run(1024 * 5, 500);    // 5 spacings
    run(-3000, 500);
    run(1, 3000);          // 1/1024 spacing
    run(512, 500);         // 0.5 spacing
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
