// fine_freq_sync: guard-interval-based (GIB) fractional frequency offset
// estimator. The guard interval of an OFDM symbol repeats the last GUARD
// samples of its useful part, so a frequency offset of eps subcarrier
// spacings rotates each guard sample by 2*pi*eps against its copy NFFT
// samples later. For each symbol (sym_start marks its first sample) the block
// stores the GUARD guard samples, accumulates
//   C = sum r[n+NFFT] * conj(r[n]),  n = 0..GUARD-1
// and returns eps = angle(C) / (2*pi) in units of 2^-10 subcarrier spacing
// (range -512..511, i.e. -1/2..1/2 spacing) with eps_valid one clock after
// the last guard copy arrives.
module fine_freq_sync #(
  parameter int DW    = 12,
  parameter int NFFT  = 2048,
  parameter int GUARD = 504
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sym_start,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_i,
  input  logic signed [DW-1:0] in_q,
  output logic                 eps_valid,
  output logic signed [15:0]   eps
);
  localparam int CW = 2*DW + $clog2(GUARD) + 1;
  localparam int NW = $clog2(NFFT + GUARD + 1);
  logic signed [DW-1:0] gi [GUARD];
  logic signed [DW-1:0] gq [GUARD];
  logic [NW-1:0] n;
  logic active;
  logic signed [CW-1:0] cre, cim;
  logic signed [DW-1:0] si, sq;
  logic signed [15:0] ang;
  logic signed [NW:0] j;
  logic [NW-1:0] cur;
  assign cur = sym_start ? '0 : n;
  assign j   = signed'({1'b0, cur}) - signed'((NW+1)'(NFFT));
  always_comb begin
    si = gi[j >= 0 && j < GUARD ? j[$clog2(GUARD)-1:0] : '0];
    sq = gq[j >= 0 && j < GUARD ? j[$clog2(GUARD)-1:0] : '0];
  end
  cordic_vector #(.DW(CW), .PW(16), .NIT(16)) u_vec (.x(cre), .y(cim), .angle(ang));
  assign eps = ang >>> 6;   // 2^16 per turn -> 2^10 per spacing

  always_ff @(posedge clk) begin
    eps_valid <= 1'b0;
    if (!rst_n) begin
      n <= '0; active <= 1'b0; cre <= '0; cim <= '0;
    end else if (in_valid && (active || sym_start)) begin
      if (sym_start) begin active <= 1'b1; cre <= '0; cim <= '0; end
      n <= cur + 1'b1;
      if (cur < NW'(GUARD)) begin
        gi[cur[$clog2(GUARD)-1:0]] <= in_i;
        gq[cur[$clog2(GUARD)-1:0]] <= in_q;
      end else if (cur >= NW'(NFFT)) begin
        // (a + jb)(c - jd) = ac + bd + j(bc - ad)
        cre <= cre + CW'(in_i * si) + CW'(in_q * sq);
        cim <= cim + CW'(in_q * si) - CW'(in_i * sq);
        if (cur == NW'(NFFT + GUARD - 1)) begin active <= 1'b0; eps_valid <= 1'b1; end
      end
    end
  end
endmodule
