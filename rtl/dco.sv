// dco: digitally controlled oscillator that removes the carrier frequency
// offset by phase rotation. The frequency word fw is in units of 2^-10 of the
// subcarrier spacing (finer than the 0.001 spacing resolution the receiver
// requires). With NFFT samples per useful symbol (2048 in mode I), one
// subcarrier spacing is 1/NFFT turn per sample, so the phase accumulator
// (PW bits = one turn) adds fw << (PW - 10 - log2 NFFT) per sample and every
// sample is rotated by minus that phase:
//   out[n] = in[n] * exp(-j * 2*pi * fw * n / (1024 * NFFT)).
// Timing: out_valid follows in_valid by one clock. Loading `clear` resets the
// accumulated phase.
module dco #(
  parameter int DW = 12,
  parameter int PW = 24,
  parameter int FW = 16,
  parameter int NFFT = 2048
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic signed [FW-1:0] fw,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_i,
  input  logic signed [DW-1:0] in_q,
  output logic                 out_valid,
  output logic signed [DW-1:0] out_i,
  output logic signed [DW-1:0] out_q
);
  logic [PW-1:0] acc;
  logic signed [DW-1:0] ri, rq;
  cordic_rotate #(.DW(DW), .PW(PW), .NIT(16)) u_rot (
    .in_i(in_i), .in_q(in_q), .phase(-acc), .out_i(ri), .out_q(rq));
  always_ff @(posedge clk) begin
    out_valid <= 1'b0;
    if (!rst_n || clear) begin
      acc <= '0; out_i <= '0; out_q <= '0;
    end else if (in_valid) begin
      out_i <= ri; out_q <= rq; out_valid <= 1'b1;
      acc <= acc + PW'(signed'(fw) <<< (PW - 10 - $clog2(NFFT)));
    end
  end
endmodule
