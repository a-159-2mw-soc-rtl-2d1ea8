// tb_fine_freq_sync: builds OFDM-like symbols (random useful part with a
// cyclic-prefix guard), shifts them in frequency by eps subcarrier spacings
// and checks the estimate against eps*1024 within 4 units (0.004 spacing),
// for several offsets of both signs. Reduced size: NFFT=256, GUARD=64.
module tb_fine_freq_sync;
  localparam int NF = 256, G = 64;
  logic clk = 0, rst_n = 0, in_valid = 0, sym_start = 0;
  logic signed [11:0] ii, iq;
  logic eps_valid; logic signed [15:0] eps;
  int checks = 0, failures = 0;
  real ur [NF], ui [NF];
  fine_freq_sync #(.NFFT(NF), .GUARD(G)) dut (.clk, .rst_n, .sym_start, .in_valid, .in_i(ii), .in_q(iq), .eps_valid, .eps);
  always #5 clk = ~clk;
  initial begin #100000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic sym(input real e);
    int got;
    for (int k = 0; k < NF; k++) begin
      ur[k] = $itor($signed($urandom_range(1200)) - 600);
      ui[k] = $itor($signed($urandom_range(1200)) - 600);
    end
    got = 0;
    for (int n = 0; n < NF + G; n++) begin
      int k; real a;
      k = (n < G) ? NF - G + n : n - G;
      a = 2.0 * 3.14159265358979 * e * n / NF;
      @(negedge clk);
      ii = 12'($rtoi(ur[k] * $cos(a) - ui[k] * $sin(a)));
      iq = 12'($rtoi(ur[k] * $sin(a) + ui[k] * $cos(a)));
      in_valid = 1; sym_start = (n == 0);
      @(negedge clk); in_valid = 0; sym_start = 0;
      if (eps_valid) got++;
    end
    repeat (2) begin @(negedge clk); if (eps_valid) got++; end
    checks++;
    if (got != 1 || $itor(eps) - e * 1024.0 > 4.0 || e * 1024.0 - $itor(eps) > 4.0) begin
      failures++; $display("eps %f: got %0d (valid %0d) exp %f", e, eps, got, e * 1024.0);
    end
  endtask
  always @(posedge clk) if (eps_valid) ;
  initial begin
    ii = 0; iq = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    sym(0.0); sym(0.1); sym(-0.3); sym(0.45); sym(-0.017); sym(0.001 * 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
