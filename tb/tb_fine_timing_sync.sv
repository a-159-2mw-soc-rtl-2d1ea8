// tb_fine_timing_sync: a PRS spectrum R_k = A * Z_k * exp(-j*2*pi*k*d/N)
// (channel = pure delay d) is sent through the block; the products must be
// R_k*conj(Z_k)/2 exactly, and after the test bench's own inverse DFT of
// the products is fed back, delta must equal d (positive and negative d).
// Reduced size: N=64 with 48 active bins.
module tb_fine_timing_sync;
  localparam int N = 64;
  logic clk = 0, rst_n = 0, in_valid = 0, z_act = 0, cir_valid = 0;
  logic [5:0] in_idx, cir_idx; logic signed [15:0] ir, ii, cr, ci, pr, pi;
  logic [1:0] z_code; logic prod_valid, delta_valid; logic signed [6:0] delta;
  int checks = 0, failures = 0;
  int er, ei;
  real qr [N], qi [N];
  fine_timing_sync #(.N(N)) dut (.clk, .rst_n, .in_valid, .in_idx, .in_re(ir), .in_im(ii), .z_code, .z_act,
    .prod_valid, .prod_re(pr), .prod_im(pi), .cir_valid, .cir_idx, .cir_re(cr), .cir_im(ci), .delta_valid, .delta);
  always #5 clk = ~clk;
  initial begin #100000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic run(input int d);
    for (int k = 0; k < N; k++) begin
      real a, zr, zi, rr, ri; logic [1:0] zc; bit act;
      act = (k >= 1 && k <= 24) || k >= N - 24;
      zc = 2'($urandom_range(3));
      zr = zc[0] ? -1.0 : 1.0; zi = zc[1] ? -1.0 : 1.0;
      a = -2.0 * 3.14159265358979 * k * d / N;
      rr = act ? 1000.0 * (zr * $cos(a) - zi * $sin(a)) : 0.0;
      ri = act ? 1000.0 * (zr * $sin(a) + zi * $cos(a)) : 0.0;
      @(negedge clk); in_valid = 1; in_idx = 6'(k); ir = 16'($rtoi(rr)); ii = 16'($rtoi(ri)); z_code = zc; z_act = act;
      // expected product: (a+jb)(zr - j zi)/2 computed on the integers sent
      er = act ? ($rtoi(rr) * $rtoi(zr) + $rtoi(ri) * $rtoi(zi)) >>> 1 : 0;
      ei = act ? ($rtoi(ri) * $rtoi(zr) - $rtoi(rr) * $rtoi(zi)) >>> 1 : 0;
      @(negedge clk); in_valid = 0;
      checks++;
      if (!prod_valid || pr != 16'(er) || pi != 16'(ei)) begin failures++; if (failures < 10) $display("k=%0d prod %0d,%0d exp %0d,%0d", k, pr, pi, er, ei); end
      qr[k] = $itor(pr); qi[k] = $itor(pi);
    end
    for (int n = 0; n < N; n++) begin
      real sr, si, a;
      sr = 0; si = 0;
      for (int k = 0; k < N; k++) begin
        a = 2.0 * 3.14159265358979 * k * n / N;
        sr += qr[k] * $cos(a) - qi[k] * $sin(a);
        si += qr[k] * $sin(a) + qi[k] * $cos(a);
      end
      @(negedge clk); cir_valid = 1; cir_idx = 6'(n); cr = 16'($rtoi(sr / N)); ci = 16'($rtoi(si / N));
    end
    @(negedge clk); cir_valid = 0;
    checks++; if (!delta_valid || delta != 7'(d)) begin failures++; $display("d=%0d: delta %0d valid %0d", d, delta, delta_valid); end
  endtask
  initial begin
    in_idx = 0; ir = 0; ii = 0; cir_idx = 0; cr = 0; ci = 0; z_code = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    run(0); run(5); run(-3); run(17); run(-20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
