// tb_viterbi_decoder: encodes random bits with the rate-1/4, K=7 code
// (133, 171, 145, 133 octal; tap t of a generator multiplies the input t
// bits back, the octal MSB being the current bit), maps them to soft values
// with noise, sign errors and erasures, and checks that the decoder returns
// the original bits with a delay of exactly TL = 128 groups.
module tb_viterbi_decoder;
  localparam int NB = 1500, TL = 128;
  localparam int GEN [4] = '{'o133, 'o171, 'o145, 'o133};
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [3:0][3:0] grp; logic out_valid, out_bit;
  int checks = 0, failures = 0, nout = 0, nin = 0, first_out = -1, nflip = 0;
  bit u [NB + TL + 6];
  viterbi_decoder dut (.clk, .rst_n, .in_valid, .in_grp(grp), .out_valid, .out_bit);
  always #5 clk = ~clk;
  initial begin #100000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) if (rst_n && out_valid) begin
    if (first_out < 0) first_out = nin;
    if (nout < NB) begin
      checks++;
      if (out_bit != u[nout]) begin failures++; if (failures < 10) $display("bit %0d got %0d exp %0d", nout, out_bit, u[nout]); end
    end
    nout++;
  end
  initial begin
    for (int n = 0; n < NB + TL + 6; n++) u[n] = (n < NB) ? 1'($urandom_range(1)) : 1'b0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < NB + TL + 6; n++) begin
      for (int g = 0; g < 4; g++) begin
        bit c; int s, r;
        c = 0;
        for (int t = 0; t < 7; t++) if (((GEN[g] >> (6 - t)) & 1) && n - t >= 0) c ^= u[n - t];
        s = c ? -6 : 6;
        s += $signed($urandom_range(4)) - 2;
        r = $urandom_range(999);
        if (r < 20) begin s = -s; nflip++; end       // 2 % hard errors
        else if (r < 80) s = 0;                     // 6 % erasures
        if (s > 7) s = 7;
        grp[g] = 4'(s);
      end
      @(negedge clk); in_valid = 1; nin++; @(negedge clk); in_valid = 0;
    end
    repeat (5) @(negedge clk);
    checks++; if (first_out != TL) begin failures++; $display("first output after %0d groups, exp %0d", first_out, TL); end
    checks++; if (nout != NB + 6 + 1) begin failures++; $display("%0d outputs, exp %0d", nout, NB + 7); end
    $display("flipped %0d soft values", nflip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
