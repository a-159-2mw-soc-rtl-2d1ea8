// viterbi_decoder: 64-state Viterbi decoder for the DAB rate-1/4, K=7
// convolutional mother code (generators 133, 171, 145, 133 octal) with 4-bit
// soft decisions and a truncation (trace-back) length of TL = 128.
// Soft input: signed, +7 = confident 0, -8 = confident 1, 0 = erasure.
// Branch metric per code bit: 7 - s for an expected 0, 7 + s for an expected
// 1 (s clamped to -7..7), so an erasure costs the same either way.
// All 64 add-compare-select operations run in one clock per input group;
// survivors are kept by register exchange (TL bits per state). The decision
// for the information bit TL groups back is read from the survivor of the
// state with the smallest metric. Path metrics are renormalised by
// subtracting that smallest metric every step.
// Timing: out_valid follows an in_valid by one clock, starting with the
// TL-th group; the bit then output belongs to the group received TL-1 groups
// before the current one (decoding delay TL groups).
// State s holds the last six input bits, bit 5 the newest.
module viterbi_decoder #(
  parameter int TL = 128,
  parameter int MW = 12
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [3:0][3:0] in_grp,   // in_grp[0] = first code bit
  output logic            out_valid,
  output logic            out_bit
);
  localparam logic [3:0][6:0] G = {7'o133, 7'o145, 7'o171, 7'o133}; // G[0]=133
  logic [MW-1:0]  pm  [64];
  logic [TL-1:0]  sp  [64];
  logic [MW-1:0]  npm [64];
  logic [TL-1:0]  nsp [64];
  logic [$clog2(TL+1)-1:0] fill;
  logic [5:0] best;
  logic [6:0] bm [16];   // metric for each 4-bit expected code word

  function automatic logic [3:0] enc(input logic [6:0] sr);
    for (int g = 0; g < 4; g++) enc[g] = ^(sr & G[g]);
  endfunction

  always_comb begin
    for (int w = 0; w < 16; w++) begin
      bm[w] = '0;
      for (int g = 0; g < 4; g++) begin
        logic signed [4:0] s;
        s = 5'(signed'(in_grp[g]));
        if (s < -7) s = -5'sd7;
        bm[w] = bm[w] + 7'(w[g] ? 5'sd7 + s : 5'sd7 - s);
      end
    end
    for (int ns = 0; ns < 64; ns++) begin
      logic [5:0] p0, p1;
      logic [MW-1:0] m0, m1;
      logic b;
      b  = ns[5];
      p0 = {ns[4:0], 1'b0};
      p1 = {ns[4:0], 1'b1};
      // shift register: {new bit, previous state}, newest bit at the MSB
      m0 = pm[p0] + MW'(bm[enc({b, p0})]);
      m1 = pm[p1] + MW'(bm[enc({b, p1})]);
      if (m1 < m0) begin npm[ns] = m1; nsp[ns] = {sp[p1][TL-2:0], b}; end
      else         begin npm[ns] = m0; nsp[ns] = {sp[p0][TL-2:0], b}; end
    end
    best = '0;
    for (int s = 1; s < 64; s++) if (npm[s] < npm[best]) best = 6'(s);
  end

  always_ff @(posedge clk) begin
    out_valid <= 1'b0;
    if (!rst_n) begin
      for (int s = 0; s < 64; s++) begin pm[s] <= (s == 0) ? '0 : MW'(64); sp[s] <= '0; end
      fill <= '0; out_bit <= 1'b0;
    end else if (in_valid) begin
      for (int s = 0; s < 64; s++) begin pm[s] <= npm[s] - npm[best]; sp[s] <= nsp[s]; end
      if (fill != ($clog2(TL+1))'(TL)) fill <= fill + 1'b1;
      if (fill >= ($clog2(TL+1))'(TL - 1)) begin out_valid <= 1'b1; out_bit <= nsp[best][TL-1]; end
    end
  end
endmodule
