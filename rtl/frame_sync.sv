// frame_sync: DAB frame synchronisation by null-symbol detection.
// Every frame begins with a null symbol that carries no energy. The block
// keeps a moving sum of |I|+|Q| over the last WIN samples and a slow average
// of the per-sample magnitude (first-order IIR with time constant 2^AVG_SH
// samples, frozen while inside a null). When the moving mean drops below a
// quarter of the slow average the block is "in null"; when it rises above
// half of it again, and the null lasted at least MIN_NULL samples, it emits
// frame_start for that sample and reports the measured null length.
// The detection method and thresholds are this design's choice.
// Timing: frame_start is registered, one clock after the sample's in_valid.
module frame_sync #(
  parameter int DW       = 12,
  parameter int WIN      = 64,
  parameter int AVG_SH   = 10,
  parameter int MIN_NULL = 1024
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_i,
  input  logic signed [DW-1:0] in_q,
  output logic                 frame_start,
  output logic                 in_null,
  output logic          [15:0] null_len
);
  localparam int WL = $clog2(WIN);
  logic [DW:0]      hist [WIN];
  logic [WL-1:0]    wp;
  logic [DW+WL:0]   msum;
  logic [DW+AVG_SH:0] lavg;   // average magnitude scaled by 2^AVG_SH
  logic [15:0]      ncnt;
  logic [DW:0]      mag;
  logic [DW+WL:0]   nsum;
  logic [DW:0]      mean, lv;
  always_comb begin
    mag  = (DW+1)'(in_i < 0 ? -in_i : in_i) + (DW+1)'(in_q < 0 ? -in_q : in_q);
    nsum = msum + (DW+WL+1)'(mag) - (DW+WL+1)'(hist[wp]);
    mean = (DW+1)'(nsum >> WL);
    lv   = (DW+1)'(lavg >> AVG_SH);
  end
  always_ff @(posedge clk) begin
    frame_start <= 1'b0;
    if (!rst_n) begin
      wp <= '0; msum <= '0; lavg <= '0; ncnt <= '0; in_null <= 1'b0; null_len <= '0;
      for (int i = 0; i < WIN; i++) hist[i] <= '0;
    end else if (in_valid) begin
      hist[wp] <= mag;
      wp   <= wp + 1'b1;
      msum <= nsum;
      if (!in_null)
        lavg <= lavg + (DW+AVG_SH+1)'(mag) - (DW+AVG_SH+1)'(lavg >> AVG_SH);
      if (!in_null) begin
        if (enable && lv != '0 && mean < (lv >> 2)) begin in_null <= 1'b1; ncnt <= '0; end
      end else begin
        ncnt <= (ncnt == 16'hFFFF) ? ncnt : ncnt + 16'd1;
        if (mean > (lv >> 1)) begin
          in_null <= 1'b0;
          if (ncnt >= 16'(MIN_NULL)) begin frame_start <= 1'b1; null_len <= ncnt; end
        end
      end
    end
  end
endmodule
