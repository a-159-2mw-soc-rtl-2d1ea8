// tb_descrambler: scrambles random bits with a reference PRBS generated by
// the recursion p[n] = p[n-9] xor p[n-5] with p[-9..-1] = 1 (x^9 + x^5 + 1,
// all-ones start) and checks that the descrambler restores them, also after
// a restart in the middle of the stream; also checks the first PRBS bits
// (0000 0111 1011 ...) known for this generator.
module tb_descrambler;
  logic clk = 0, rst_n = 0, restart = 0, in_valid = 0, in_bit = 0, out_valid, out_bit;
  int checks = 0, failures = 0;
  bit expq [$];
  descrambler dut (.clk, .rst_n, .restart, .in_valid, .in_bit, .out_valid, .out_bit);
  always #5 clk = ~clk;
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) if (rst_n && out_valid) begin
    bit e; e = expq.pop_front(); checks++;
    if (out_bit != e) begin failures++; if (failures < 10) $display("got %0d exp %0d", out_bit, e); end
  end
  task automatic block(input int nbits, input bit zeros);
    bit p [$];
    for (int i = 0; i < 9; i++) p.push_back(1);
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    for (int n = 0; n < nbits; n++) begin
      bit b, pn;
      pn = p[n + 9 - 9] ^ p[n + 9 - 5];
      p.push_back(pn);
      b = zeros ? 1'b0 : 1'($urandom_range(1));
      expq.push_back(b);
      @(negedge clk); in_valid = 1; in_bit = b ^ pn; @(negedge clk); in_valid = 0;
    end
    @(negedge clk);
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    block(500, 0);
    block(300, 0);
    // known start of the sequence: descrambling ones gives the inverted PRBS
    begin
      bit ref12 [12] = '{0, 0, 0, 0, 0, 1, 1, 1, 1, 0, 1, 1};
      bit r [9]; bit got [$];
      @(negedge clk); restart = 1; @(negedge clk); restart = 0;
      for (int n = 0; n < 12; n++) begin
        @(negedge clk); in_valid = 1; in_bit = 0; expq.push_back(ref12[n]);
        @(negedge clk); in_valid = 0;
      end
    end
    repeat (3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
