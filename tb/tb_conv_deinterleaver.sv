// tb_conv_deinterleaver: a reference convolutional interleaver (branch j
// delays by j*17 bytes, 12 branches) feeds the de-interleaver; every output
// byte must equal the input byte sent 12*11*17 = 2244 bytes earlier.
module tb_conv_deinterleaver;
  localparam int I = 12, M = 17, D = I * (I - 1) * M;
  logic clk = 0, rst_n = 0, sync = 0, in_valid = 0, out_valid;
  logic [7:0] in_byte, out_byte;
  int checks = 0, failures = 0, nout = 0;
  byte unsigned src [$];
  byte unsigned fifo [I][$];
  conv_deinterleaver dut (.clk, .rst_n, .sync, .in_valid, .in_byte, .out_valid, .out_byte);
  always #5 clk = ~clk;
  initial begin #100000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) if (rst_n && out_valid) begin
    if (nout >= D) begin
      checks++;
      if (out_byte != src[nout - D]) begin failures++; if (failures < 10) $display("out %0d got %h exp %h", nout, out_byte, src[nout - D]); end
    end
    nout++;
  end
  initial begin
    for (int j = 0; j < I; j++) repeat (j * M) fifo[j].push_back(8'h00);
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < D + 3000; n++) begin
      byte unsigned b, t;
      b = (n % 204 == 0) ? 8'h47 : 8'($urandom_range(255));
      src.push_back(b);
      fifo[n % I].push_back(b);
      t = fifo[n % I].pop_front();
      @(negedge clk); in_valid = 1; in_byte = t; sync = (n == 0);
      @(negedge clk); in_valid = 0; sync = 0;
    end
    repeat (3) @(negedge clk);
    checks++; if (nout != D + 3000) begin failures++; $display("%0d outputs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
