// coarse_freq_sync: integer frequency offset estimator working on the
// FFT of the phase reference symbol (PRS). A frequency offset of s whole
// subcarrier spacings moves every carrier s bins. For each trial shift
// s = -S..S the block correlates the differential products of neighbouring
// received carriers with those of the known PRS,
//   A(s) = sum_c Y[c+s] * conj(Y[c-1+s]) * conj(Z[c] * conj(Z[c-1])),
// and reports the shift with the largest |Re A| + |Im A|. Differential
// products make the metric insensitive to the residual timing offset.
// The exact estimator is this design's choice.
// Carriers c = 0..KC-1 stand for frequencies -KC/2..-1, +1..KC/2; the pair
// across DC is skipped. Z[c] comes from an external PRS table through
// z_idx/z_code (combinational lookup; code bit 0 = sign of real part,
// bit 1 = sign of imaginary part, 1 = negative).
// Operation: with enable high, one FFT output symbol (N bins in natural
// order) is stored; the search then takes (2S+1)*KC clocks and ends with
// off_valid and off (signed shift, in spacings).
module coarse_freq_sync #(
  parameter int N  = 2048,
  parameter int KC = 1536,
  parameter int DW = 16,
  parameter int S  = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  enable,
  input  logic                  in_valid,
  input  logic [$clog2(N)-1:0]  in_idx,
  input  logic signed [DW-1:0]  in_re,
  input  logic signed [DW-1:0]  in_im,
  output logic [$clog2(KC)-1:0] z_idx,
  input  logic [1:0]            z_code,
  output logic                  off_valid,
  output logic signed [7:0]     off,
  output logic                  busy
);
  localparam int LN = $clog2(N);
  localparam int LK = $clog2(KC);
  localparam int AW = 2*DW + 2 + LK + 2;
  logic signed [DW-1:0] yr [N];
  logic signed [DW-1:0] yi [N];
  logic searching;
  logic [LK-1:0] c;
  logic signed [7:0] s;
  logic signed [DW-1:0] pr, pim;
  logic [1:0] pz;
  logic signed [AW-1:0] ar, ai;
  logic [AW-1:0] best;
  logic signed [7:0] bs;

  // bin of carrier c shifted by s
  logic signed [LN+1:0] f;
  logic [LN-1:0] bin;
  always_comb begin
    f   = (c < LK'(KC/2)) ? (LN+2)'(c) - (LN+2)'(KC/2) : (LN+2)'(c) - (LN+2)'(KC/2) + 1;
    f   = f + (LN+2)'(s);
    bin = LN'(f);     // modulo N
  end
  assign z_idx = c;

  // differential product and reference rotation
  logic signed [2*DW+1:0] dr, di, rr, ri;
  logic [1:0] zm, pm, q;
  function automatic logic [1:0] quad(input logic [1:0] code);
    unique case (code)
      2'b00: return 2'd0;   // +1 +j
      2'b01: return 2'd1;   // -1 +j
      2'b11: return 2'd2;   // -1 -j
      default: return 2'd3; // +1 -j
    endcase
  endfunction
  always_comb begin
    // Y[c] * conj(Y[c-1])
    dr = (2*DW+2)'(yr[bin] * pr) + (2*DW+2)'(yi[bin] * pim);
    di = (2*DW+2)'(yi[bin] * pr) - (2*DW+2)'(yr[bin] * pim);
    zm = quad(z_code); pm = quad(pz);
    q  = zm - pm;               // reference differential = j^q
    unique case (q)             // multiply by conj(j^q)
      2'd0: begin rr =  dr; ri =  di; end
      2'd1: begin rr =  di; ri = -dr; end
      2'd2: begin rr = -dr; ri = -di; end
      default: begin rr = -di; ri = dr; end
    endcase
  end


  always_ff @(posedge clk) begin
    off_valid <= 1'b0;
    if (!rst_n) begin
      searching <= 1'b0; busy <= 1'b0; c <= '0; s <= '0; pr <= '0; pim <= '0; pz <= '0;
      ar <= '0; ai <= '0; best <= '0; bs <= '0; off <= '0;
    end else if (!searching) begin
      if (enable && in_valid) begin
        yr[in_idx] <= in_re; yi[in_idx] <= in_im;
        busy <= 1'b1;
        if (in_idx == LN'(N - 1)) begin
          searching <= 1'b1; s <= -8'(S); c <= '0; ar <= '0; ai <= '0; best <= '0; bs <= -8'(S);
        end
      end
    end else begin
      // walk the carriers for the current shift
      if (c != '0 && c != LK'(KC/2)) begin
        ar <= ar + AW'(rr >>> DW);
        ai <= ai + AW'(ri >>> DW);
      end
      pr <= yr[bin]; pim <= yi[bin]; pz <= z_code;
      if (c == LK'(KC - 1)) begin
        logic [AW-1:0] m;
        m = AW'(((ar + AW'(rr >>> DW)) < 0) ? -(ar + AW'(rr >>> DW)) : (ar + AW'(rr >>> DW)))
          + AW'(((ai + AW'(ri >>> DW)) < 0) ? -(ai + AW'(ri >>> DW)) : (ai + AW'(ri >>> DW)));
        if (m > best) begin best <= m; bs <= s; end
        c <= '0; ar <= '0; ai <= '0;
        if (s == 8'(S)) begin
          searching <= 1'b0; busy <= 1'b0; off_valid <= 1'b1;
          off <= (m > best) ? s : bs;
        end else s <= s + 8'sd1;
      end else c <= c + 1'b1;
    end
  end
endmodule
