// down_converter: sub-sampling IF to complex baseband converter.
// The ADC samples the IF at 8.192 MS/s. For any IF of 2.048 + n*4.096 MHz the
// wanted band aliases to fs/4, so mixing to zero reduces to multiplying the
// samples by the sequence 1, -j, -1, +j. The design then sums each group of
// four mixed samples (a four-tap boxcar low-pass, this design's choice of
// filter) and decimates by four, giving complex samples at 2.048 MS/s:
//   I = x0 - x2,  Q = x3 - x1  (x0..x3: four consecutive ADC samples).
// For odd n the spectrum is inverted; set INVERT to conjugate the output.
// Interface: one ADC sample per in_valid; out_valid pulses on every fourth
// sample, one clock after the fourth sample is taken.
module down_converter #(
  parameter int  AW     = 10,   // ADC resolution
  parameter bit  INVERT = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [AW-1:0] adc,
  output logic                 out_valid,
  output logic signed [AW+1:0] out_i,
  output logic signed [AW+1:0] out_q
);
  logic [1:0] ph;
  logic signed [AW+1:0] acc_i, acc_q;
  logic signed [AW+1:0] x;
  assign x = (AW+2)'(adc);
  always_ff @(posedge clk) begin
    out_valid <= 1'b0;
    if (!rst_n) begin
      ph <= '0; acc_i <= '0; acc_q <= '0; out_i <= '0; out_q <= '0;
    end else if (in_valid) begin
      ph <= ph + 2'd1;
      unique case (ph)
        2'd0: begin acc_i <= x;          acc_q <= '0;         end
        2'd1: begin                      acc_q <= -x;         end
        2'd2: begin acc_i <= acc_i - x;                       end
        2'd3: begin
          out_i     <= acc_i;
          out_q     <= INVERT ? -(acc_q + x) : (acc_q + x);
          out_valid <= 1'b1;
        end
      endcase
    end
  end
endmodule
