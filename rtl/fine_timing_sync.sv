// fine_timing_sync: fine symbol timing from the channel impulse response.
// The received phase reference symbol R_k (FFT output of the first symbol)
// is divided by the known reference Z_k and transformed back:
//   CIR = IFFT(R_k / Z_k),  delta = argmax |CIR|.
// Z_k is a QPSK point (+-1 +-j), so R_k / Z_k = R_k * conj(Z_k) / 2; the
// factor 1/2 does not move the peak and is dropped. Bins with z_act low (the
// centre bin and unused edge bins) are sent as zero.
// Phase 1: bins arrive in natural order (in_valid, in_idx, in_re/in_im with
// z_code = {sign of imaginary, sign of real}, 1 = negative); the products go
// out one clock later on prod_* to the inverse FFT.
// Phase 2: the CIR samples come back on cir_*; after bin N-1 the block
// reports delta (peak position, taken as negative above N/2) with
// delta_valid. The PRS table itself is supplied from outside.
module fine_timing_sync #(
  parameter int N  = 2048,
  parameter int DW = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [$clog2(N)-1:0]  in_idx,
  input  logic signed [DW-1:0]  in_re,
  input  logic signed [DW-1:0]  in_im,
  input  logic [1:0]            z_code,
  input  logic                  z_act,
  output logic                  prod_valid,
  output logic signed [DW-1:0]  prod_re,
  output logic signed [DW-1:0]  prod_im,
  input  logic                  cir_valid,
  input  logic [$clog2(N)-1:0]  cir_idx,
  input  logic signed [DW-1:0]  cir_re,
  input  logic signed [DW-1:0]  cir_im,
  output logic                  delta_valid,
  output logic signed [$clog2(N):0] delta
);
  localparam int LN = $clog2(N);
  logic [2*DW:0] best, p2;
  logic [LN-1:0] bidx;
  logic signed [DW+1:0] pr, pi;
  always_comb begin
    // R * conj(Z), Z = zr + j zi with zr, zi = +-1: (a+jb)(zr - j zi)
    pr = (z_code[0] ? -(DW+2)'(in_re) : (DW+2)'(in_re)) + (z_code[1] ? -(DW+2)'(in_im) : (DW+2)'(in_im));
    pi = (z_code[0] ? -(DW+2)'(in_im) : (DW+2)'(in_im)) - (z_code[1] ? -(DW+2)'(in_re) : (DW+2)'(in_re));
    p2 = (2*DW+1)'(cir_re * cir_re) + (2*DW+1)'(cir_im * cir_im);
  end
  always_ff @(posedge clk) begin
    prod_valid <= 1'b0; delta_valid <= 1'b0;
    if (!rst_n) begin
      prod_re <= '0; prod_im <= '0; best <= '0; bidx <= '0; delta <= '0;
    end else begin
      if (in_valid) begin
        prod_valid <= 1'b1;
        prod_re <= z_act ? DW'(pr >>> 1) : '0;
        prod_im <= z_act ? DW'(pi >>> 1) : '0;
      end
      if (cir_valid) begin
        if (cir_idx == '0 || p2 > best) begin best <= p2; bidx <= cir_idx; end
        if (cir_idx == LN'(N - 1)) begin
          delta_valid <= 1'b1;
          if (p2 > best) delta <= (cir_idx >= LN'(N/2)) ? signed'({1'b0, cir_idx}) - (LN+1)'(N) : signed'({1'b0, cir_idx});
          else           delta <= (bidx    >= LN'(N/2)) ? signed'({1'b0, bidx})    - (LN+1)'(N) : signed'({1'b0, bidx});
        end
      end
    end
  end
endmodule
