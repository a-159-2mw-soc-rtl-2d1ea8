// tb_qpsk_demod: sends a reference symbol and then differentially encoded
// QPSK symbols (each active carrier rotated by the phase of two known bits)
// in FFT-bin order. Checks the number of soft outputs (2*KC per symbol, none
// for the reference), their order (real parts of all carriers, then the
// imaginary parts) and that each soft value has the sign of its bit with
// full confidence. Reduced size: N=64, KC=48.
module tb_qpsk_demod;
  localparam int N = 64, KC = 48;
  logic clk = 0, rst_n = 0, first = 0, in_valid = 0;
  logic [5:0] in_idx; logic signed [15:0] ir, ii;
  logic out_valid, sym_done; logic signed [3:0] soft_o;
  int checks = 0, failures = 0;
  real pr [N], pim [N];
  bit b0 [$], b1 [$], exp_bits [$];
  int nout;
  qpsk_demod #(.N(N), .KC(KC), .SH(13)) dut (.clk, .rst_n, .first, .in_valid, .in_idx, .in_re(ir), .in_im(ii), .out_valid, .soft_o, .sym_done);
  always #5 clk = ~clk;
  initial begin #100000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) if (rst_n && out_valid) begin
    bit e;
    nout++;
    e = exp_bits.pop_front();
    checks++;
    if ((e && soft_o != -4'sd8) || (!e && soft_o != 4'sd7)) begin failures++; if (failures < 10) $display("soft %0d for bit %0d", soft_o, e); end
  end
  task automatic symbol(input bit isref);
    bit x0 [N], x1 [N];
    b0.delete(); b1.delete();
    for (int k = 0; k < N; k++) begin
      bit act;
      act = (k >= 1 && k <= KC / 2) || k >= N - KC / 2;
      x0[k] = 1'($urandom_range(1)); x1[k] = 1'($urandom_range(1));
      if (act && !isref) begin b0.push_back(x0[k]); b1.push_back(x1[k]); end
    end
    foreach (b0[i]) exp_bits.push_back(b0[i]);
    foreach (b1[i]) exp_bits.push_back(b1[i]);
    for (int k = 0; k < N; k++) begin
      bit act; real a, nr, ni, dr, di;
      act = (k >= 1 && k <= KC / 2) || k >= N - KC / 2;
      if (isref) begin a = 0.7 * k; pr[k] = 900.0 * $cos(a); pim[k] = 900.0 * $sin(a); end
      else if (act) begin
        dr = x0[k] ? -0.7071 : 0.7071; di = x1[k] ? -0.7071 : 0.7071;
        nr = pr[k] * dr - pim[k] * di; ni = pr[k] * di + pim[k] * dr;
        pr[k] = nr; pim[k] = ni;
      end
      @(negedge clk); in_valid = 1; in_idx = 6'(k); first = isref;
      ir = 16'($rtoi(pr[k])); ii = 16'($rtoi(pim[k]));
    end
    @(negedge clk); in_valid = 0;
    repeat (KC + 5) @(negedge clk);
  endtask
  initial begin
    in_idx = 0; ir = 0; ii = 0; nout = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    symbol(1);
    repeat (10) @(negedge clk);
    checks++; if (nout != 0) begin failures++; $display("outputs for the reference symbol"); end
    for (int s = 0; s < 4; s++) begin
      symbol(0);
    end
    repeat (10) @(negedge clk);
    checks++; if (nout != 4 * 2 * KC) begin failures++; $display("%0d outputs, exp %0d", nout, 8 * KC); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
