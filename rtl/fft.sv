// fft: memory-based radix-2 decimation-in-time FFT / inverse FFT.
// It demodulates the OFDM symbols and, run inverse, turns the phase-reference
// products into the channel impulse response for fine timing.
// Operation: N complex samples are written in natural order (in_valid, one
// per clock, stored at bit-reversed addresses); inverse and an 8-bit tag
// (the symbol number) are sampled with the first one. Two memory banks
// alternate, so the next vector loads while the previous one is computed
// and unloaded; a sample that finds both banks occupied sets overflow.
// A full bank then runs log2(N) stages of N/2 butterflies, one butterfly
// per clock enable `ce`, in place. Every stage halves its result, so the output
// is DFT/N (forward) or IDFT (inverse) and cannot overflow. The N results
// then leave in natural bin order, one per ce, with out_idx = bin number
// and out_tag = the vector's tag.
// Twiddles e^(-j*2*pi*k/N) are computed at elaboration into a table of N/2
// entries (TW bits, 2^(TW-2) = 1.0). busy is high while any bank is loading
// or occupied. Compute latency: N/2*log2(N) ce cycles (11264 for N=2048).
module fft #(
  parameter int N  = 2048,
  parameter int DW = 16,
  parameter int TW = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ce,
  input  logic                  inverse,
  input  logic [7:0]            in_tag,
  input  logic                  in_valid,
  input  logic signed [DW-1:0]  in_re,
  input  logic signed [DW-1:0]  in_im,
  output logic                  out_valid,
  output logic [$clog2(N)-1:0]  out_idx,
  output logic signed [DW-1:0]  out_re,
  output logic signed [DW-1:0]  out_im,
  output logic [7:0]            out_tag,
  output logic                  busy,
  output logic                  overflow
);
  localparam int LN = $clog2(N);
  typedef logic signed [TW-1:0] tw_t [N/2];
  function automatic tw_t mk_tw(input bit sine);
    tw_t t;
    for (int k = 0; k < N/2; k++) begin
      real a, v;
      a = 2.0 * 3.14159265358979 * k / N;
      v = sine ? -$sin(a) : $cos(a);
      t[k] = TW'($rtoi(v * (2.0 ** (TW-2)) + ((v >= 0) ? 0.5 : -0.5)));
    end
    return t;
  endfunction
  localparam tw_t TWC = mk_tw(1'b0);
  localparam tw_t TWS = mk_tw(1'b1);

  typedef enum logic [1:0] {F_IDLE, F_CALC, F_OUT} fst_e;
  fst_e st;
  logic signed [DW-1:0] mre [2*N];    // bank b, entry a at {b, a}
  logic signed [DW-1:0] mim [2*N];
  logic [1:0]    full;             // bank holds a complete input vector
  logic          lb, cb;           // load bank, compute bank
  logic [LN-1:0] lcnt, cnt, bfly;
  logic [$clog2(LN+1)-1:0] stage;
  logic [1:0]    inv;
  logic [7:0]    tag [2];

  function automatic logic [LN-1:0] bitrev(input logic [LN-1:0] a);
    for (int i = 0; i < LN; i++) bitrev[i] = a[LN-1-i];
  endfunction

  // butterfly addressing for the current stage
  logic [LN-1:0] ia, ib, k;
  logic [LN-1:0] half, pos;
  always_comb begin
    half = LN'(1) << stage;
    pos  = bfly & (half - 1'b1);
    ia   = ((bfly - pos) << 1) + pos;
    ib   = ia + half;
    k    = pos << (($clog2(LN+1))'(LN - 1) - stage);
  end

  logic signed [DW-1:0]    ar, ai, br, bi;
  logic signed [TW-1:0]    wr, wi;
  logic signed [DW+TW:0]   tr, ti;
  logic signed [DW+1:0]    xr, xi, yr, yi;
  always_comb begin
    ar = mre[{cb, ia}]; ai = mim[{cb, ia}]; br = mre[{cb, ib}]; bi = mim[{cb, ib}];
    wr = TWC[k[LN-2:0]];
    wi = inv[cb] ? -TWS[k[LN-2:0]] : TWS[k[LN-2:0]];
    tr = (br * wr - bi * wi + (1 <<< (TW - 3))) >>> (TW - 2);
    ti = (br * wi + bi * wr + (1 <<< (TW - 3))) >>> (TW - 2);
    xr = (DW+2)'(ar) + (DW+2)'(tr);
    xi = (DW+2)'(ai) + (DW+2)'(ti);
    yr = (DW+2)'(ar) - (DW+2)'(tr);
    yi = (DW+2)'(ai) - (DW+2)'(ti);
  end
  assign busy = (full != 2'b00) || (lcnt != '0) || (st != F_IDLE);

  always_ff @(posedge clk) begin
    out_valid <= 1'b0;
    if (!rst_n) begin
      st <= F_IDLE; lcnt <= '0; cnt <= '0; bfly <= '0; stage <= '0; inv <= '0; full <= '0;
      lb <= 1'b0; cb <= 1'b0; tag[0] <= '0; tag[1] <= '0; overflow <= 1'b0;
      out_idx <= '0; out_re <= '0; out_im <= '0; out_tag <= '0;
    end else begin
      // load side: fills bank lb, then moves to the other bank
      if (in_valid) begin
        if (!full[lb]) begin
          if (lcnt == '0) begin inv[lb] <= inverse; tag[lb] <= in_tag; end
          mre[{lb, bitrev(lcnt)}] <= in_re;
          mim[{lb, bitrev(lcnt)}] <= in_im;
          lcnt <= lcnt + 1'b1;
          if (lcnt == LN'(N - 1)) begin full[lb] <= 1'b1; lb <= ~lb; end
        end else overflow <= 1'b1;
      end
      // compute side: works on bank cb
      unique case (st)
        F_IDLE: if (full[cb]) begin st <= F_CALC; stage <= '0; bfly <= '0; end
        F_CALC: if (ce) begin
          mre[{cb, ia}] <= DW'((xr + 1) >>> 1); mim[{cb, ia}] <= DW'((xi + 1) >>> 1);
          mre[{cb, ib}] <= DW'((yr + 1) >>> 1); mim[{cb, ib}] <= DW'((yi + 1) >>> 1);
          bfly <= bfly + 1'b1;
          if (bfly == LN'(N/2 - 1)) begin
            bfly <= '0;
            if (stage == ($clog2(LN+1))'(LN - 1)) begin st <= F_OUT; cnt <= '0; end
            else stage <= stage + 1'b1;
          end
        end
        F_OUT: if (ce) begin
          out_valid <= 1'b1; out_idx <= cnt; out_tag <= tag[cb];
          out_re <= mre[{cb, cnt}]; out_im <= mim[{cb, cnt}];
          cnt <= cnt + 1'b1;
          if (cnt == LN'(N - 1)) begin
            st <= F_IDLE; cb <= ~cb;
            full[cb] <= 1'b0;
          end
        end
        default: st <= F_IDLE;
      endcase
    end
  end
endmodule
