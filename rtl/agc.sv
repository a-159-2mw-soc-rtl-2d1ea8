// agc: automatic gain control in front of the FFT. It keeps the average
// sample magnitude near TARGET so that the FFT input neither overflows nor
// loses resolution. Each output is in * gain / 256, saturated to DW bits.
// Over every block of LEN samples the mean of |I|+|Q| at the output is
// measured; if it is above 5/4 TARGET the gain drops by 1/16, if it is below
// 3/4 TARGET the gain rises by 1/16 (gain limited to 1/16..255 in 8.8
// format). The block length, target and step are this design's choices.
// Timing: out_valid follows in_valid by one clock; a new gain takes effect at
// the first sample of the next block. sat_cnt counts saturated samples.
module agc #(
  parameter int DW     = 12,
  parameter int LEN    = 2048,
  parameter int TARGET = 512
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_i,
  input  logic signed [DW-1:0] in_q,
  output logic                 out_valid,
  output logic signed [DW-1:0] out_i,
  output logic signed [DW-1:0] out_q,
  output logic          [15:0] gain,
  output logic          [15:0] sat_cnt
);
  localparam int LW = $clog2(LEN);
  localparam logic signed [DW+16:0] MAXV = (DW+17)'((1 <<< (DW-1)) - 1);
  logic [LW-1:0]    n;
  logic [DW+LW:0]   sum;
  logic signed [DW+16:0] pi, pq;
  logic si, sq;

  function automatic logic signed [DW-1:0] sat(input logic signed [DW+16:0] v, output logic s);
    s = 1'b0;
    if (v > MAXV)       begin s = 1'b1; return DW'(MAXV);  end
    else if (v < -MAXV) begin s = 1'b1; return DW'(-MAXV); end
    return DW'(v);
  endfunction

  always_comb begin
    pi = (in_i * signed'({1'b0, gain})) >>> 8;
    pq = (in_q * signed'({1'b0, gain})) >>> 8;
  end

  always_ff @(posedge clk) begin
    logic signed [DW-1:0] oi, oq;
    logic [DW+LW:0] s2;
    out_valid <= 1'b0;
    if (!rst_n) begin
      n <= '0; sum <= '0; gain <= 16'd256; sat_cnt <= '0; out_i <= '0; out_q <= '0;
    end else if (in_valid) begin
      oi = sat(pi, si);
      oq = sat(pq, sq);
      out_i <= oi; out_q <= oq; out_valid <= 1'b1;
      if (si || sq) sat_cnt <= sat_cnt + 16'd1;
      s2 = sum + (DW+LW+1)'(oi < 0 ? -oi : oi) + (DW+LW+1)'(oq < 0 ? -oq : oq);
      n <= n + 1'b1;
      if (n == LW'(LEN - 1)) begin
        sum <= '0;
        if (s2 >> LW > (DW+LW+1)'(TARGET + TARGET / 4))
          gain <= (gain - (gain >> 4) < 16'd16) ? 16'd16 : gain - (gain >> 4);
        else if (s2 >> LW < (DW+LW+1)'(TARGET - TARGET / 4))
          gain <= (gain + (gain >> 4) > 16'hFF00) ? 16'hFF00 : gain + (gain >> 4);
      end else sum <= s2;
    end
  end
endmodule
