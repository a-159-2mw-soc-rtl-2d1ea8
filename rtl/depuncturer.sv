// depuncturer: re-inserts the code bits removed by puncturing, as erasures
// (soft value 0), in front of the rate-1/4 Viterbi decoder. The puncturing
// vector pv holds 32 flags for 8 information bits (4 code bits each); flag
// j = 1 means code bit j was sent. Walking j = 0..31, a kept position takes
// the next received soft value and a removed one inserts 0. Every four
// positions form one output group (c0..c3 of one information bit).
// The vector is supplied by the host (the DAB puncturing tables are not part
// of this block). Timing: a removed position costs one clock, a kept one
// waits for in_valid; in_ready shows when a soft value is taken.
// `restart` returns to position 0 (start of a sub-channel block).
module depuncturer (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              restart,
  input  logic [31:0]       pv,
  input  logic              in_valid,
  input  logic signed [3:0] in_soft,
  output logic              in_ready,
  output logic              out_valid,
  output logic [3:0][3:0]   out_grp
);
  logic [4:0] j;
  logic [3:0][3:0] acc;
  logic adv;
  assign in_ready = pv[j] && !restart;
  assign adv      = !restart && (!pv[j] || in_valid);
  always_ff @(posedge clk) begin
    out_valid <= 1'b0;
    if (!rst_n || restart) begin
      j <= '0; acc <= '0; out_grp <= '0;
    end else if (adv) begin
      logic [3:0] v;
      v = pv[j] ? in_soft : 4'd0;
      acc[j[1:0]] <= v;
      j <= j + 5'd1;
      if (j[1:0] == 2'd3) begin
        out_valid <= 1'b1;
        out_grp   <= {v, acc[2], acc[1], acc[0]};
      end
    end
  end
endmodule
