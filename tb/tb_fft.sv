// tb_fft: loads random complex vectors and compares the FFT (forward, result
// DFT/N) and inverse FFT (result IDFT) with a direct DFT computed in real
// arithmetic, within 3 LSB. It also checks the compute latency: N/2*log2(N)
// butterfly clock enables, plus one or two for the bank hand-over and first
// read depending on the ce phase (ce is given every other clock), that the tag travels with its vector, and that a second
// vector loaded straight after the first (while the first is computed) is
// transformed correctly, and that a third one arriving with both banks busy
// raises overflow.
module tb_fft;
  localparam int N = 256;
  localparam int LN = 8;
  logic clk = 0, rst_n = 0, ce = 0, inverse = 0, in_valid = 0;
  logic [7:0] in_tag = 0, out_tag;
  logic signed [15:0] ir, ii, orr, oi;
  logic out_valid, busy, overflow; logic [LN-1:0] oidx;
  int checks = 0, failures = 0;
  real xr [4][N], xi [4][N];
  bit  vinv [4];
  int ncet, got;
  fft #(.N(N)) dut (.clk, .rst_n, .ce, .inverse, .in_tag, .in_valid, .in_re(ir), .in_im(ii),
                    .out_valid, .out_idx(oidx), .out_re(orr), .out_im(oi), .out_tag,
                    .busy, .overflow);
  always #5 clk = ~clk;
  always @(posedge clk) ce <= ~ce;
  initial begin #50000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic load(input bit inv, input int seed, input int t);
    vinv[t] = inv;
    for (int n = 0; n < N; n++) begin
      xr[t][n] = $itor($signed($urandom_range(16000)) - 8000);
      xi[t][n] = $itor($signed($urandom_range(16000)) - 8000);
      if (seed == 1) begin xr[t][n] = 6000.0 * $cos(2.0 * 3.14159265358979 * 5 * n / N); xi[t][n] = 0.0; end
    end
    for (int n = 0; n < N; n++) begin
      @(negedge clk); in_valid = 1; inverse = inv; in_tag = 8'(t);
      ir = 16'($rtoi(xr[t][n])); ii = 16'($rtoi(xi[t][n]));
    end
    @(negedge clk); in_valid = 0;
  endtask

  task automatic collect(input int nvec, input bit chk_lat, input int tag0);
    int first;
    ncet = 0; got = 0; first = 1;
    while (got < nvec * N) begin
      @(posedge clk);
      if (out_valid) begin
        real er, ei, a;
        int k, t;
        k = int'(oidx); t = int'(out_tag);
        if (first && chk_lat) begin
          checks++;
          if (ncet < N / 2 * LN + 1 || ncet > N / 2 * LN + 2) begin failures++; $display("latency %0d ce", ncet); end
        end
        first = 0;
        er = 0; ei = 0;
        for (int n = 0; n < N; n++) begin
          a = (vinv[t] ? 2.0 : -2.0) * 3.14159265358979 * k * n / N;
          er += xr[t][n] * $cos(a) - xi[t][n] * $sin(a);
          ei += xr[t][n] * $sin(a) + xi[t][n] * $cos(a);
        end
        er /= N; ei /= N;
        checks++;
        if (k != got % N || t != tag0 + got / N ||
            (orr - er) > 3.0 || (er - orr) > 3.0 || (oi - ei) > 3.0 || (ei - oi) > 3.0) begin
          failures++; if (failures < 40) $display("tag=%0d k=%0d got %0d,%0d exp %f,%f", t, k, orr, oi, er, ei);
        end
        got++;
      end else if (ce && busy) ncet++;
    end
  endtask

  initial begin
    ir = 0; ii = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    load(0, 1, 0); collect(1, 1, 0);
    load(0, 0, 1); collect(1, 1, 1);
    load(1, 0, 1); collect(1, 1, 1);
    // back to back: vector 3 loads while vector 2 is computed
    fork
      begin load(0, 0, 2); load(1, 0, 3); end
      collect(2, 0, 2);
    join
    checks++; if (overflow) begin failures++; $display("unexpected overflow"); end
    // three vectors at once: the third finds both banks full
    load(0, 0, 0); load(0, 0, 1); load(0, 0, 2);
    checks++; if (!overflow) begin failures++; $display("overflow not raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
