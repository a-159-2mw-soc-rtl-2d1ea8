// tb_coarse_freq_sync: builds the spectrum of a phase reference symbol
// (random QPSK reference Z, a linear phase slope from a timing offset, a
// little noise), moves it by s0 bins and checks that the estimate equals
// s0 for several shifts. Also checks the search time of (2S+1)*KC clocks.
// Reduced size: N=256, KC=192, S=8.
module tb_coarse_freq_sync;
  localparam int N = 256, KC = 192, S = 8;
  logic clk = 0, rst_n = 0, enable = 0, in_valid = 0;
  logic [7:0] in_idx; logic signed [15:0] ir, ii;
  logic [7:0] z_idx; logic [1:0] z_code;
  logic off_valid, busy; logic signed [7:0] off;
  int checks = 0, failures = 0;
  real yr [N], yi [N];
  coarse_freq_sync #(.N(N), .KC(KC), .S(S)) dut (.clk, .rst_n, .enable, .in_valid, .in_idx, .in_re(ir), .in_im(ii),
      .z_idx, .z_code, .off_valid, .off, .busy);
  always #5 clk = ~clk;
  function automatic logic [1:0] zc(input int c); return 2'((c * 37 + (c * c) / 7 + 3) % 4); endfunction
  assign z_code = zc(int'(z_idx));
  initial begin #100000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic run(input int s0, input real slope);
    int cyc;
    for (int b = 0; b < N; b++) begin yr[b] = $itor($signed($urandom_range(60)) - 30); yi[b] = $itor($signed($urandom_range(60)) - 30); end
    for (int c = 0; c < KC; c++) begin
      int f, b; real zr, zi, a;
      f = (c < KC / 2) ? c - KC / 2 : c - KC / 2 + 1;
      b = (f + s0 + N) % N;
      zr = zc(c)[0] ? -1.0 : 1.0; zi = zc(c)[1] ? -1.0 : 1.0;
      a = slope * f;
      yr[b] = 2000.0 * (zr * $cos(a) - zi * $sin(a)); yi[b] = 2000.0 * (zr * $sin(a) + zi * $cos(a));
    end
    enable = 1;
    for (int b = 0; b < N; b++) begin
      @(negedge clk); in_valid = 1; in_idx = 8'(b); ir = 16'($rtoi(yr[b])); ii = 16'($rtoi(yi[b]));
    end
    @(negedge clk); in_valid = 0; enable = 0; cyc = 0;
    while (!off_valid) begin @(negedge clk); cyc++; end
    checks++; if (off != 8'(s0)) begin failures++; $display("shift %0d: got %0d", s0, off); end
    checks++; if (cyc < (2 * S + 1) * KC - 2 || cyc > (2 * S + 1) * KC + 2) begin failures++; $display("search took %0d clocks", cyc); end
  endtask
  initial begin
    in_idx = 0; ir = 0; ii = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    run(0, 0.0); run(3, 0.2); run(-5, -0.7); run(8, 1.1); run(-8, 0.05);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
