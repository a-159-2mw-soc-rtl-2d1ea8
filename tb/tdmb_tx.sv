// tdmb_tx: behavioural T-DMB (DAB) transmitter and channel used by the
// system testbenches; it is not synthesizable and not part of the receiver.
// Chain: 188-byte transport packets (sync 0x47, PID, a packet counter and a
// payload that is a function of both) -> RS(204,188) encoder (alpha^0 ..
// alpha^15 roots, field polynomial 0x11D) -> optional byte error injection
// (one byte of every ERR_EVERY-th packet) -> convolutional byte interleaver
// (12 branches, branch j delays j*CI_M bytes) -> bits, MSB first ->
// energy dispersal (x^9 + x^5 + 1, all ones at each CIF of CIFB/4 bits) ->
// rate-1/4 K=7 convolutional code (133, 171, 145, 133 octal, continuous) ->
// time interleaving (bit i delayed by P(i mod 16) CIFs) -> DQPSK on the
// KC carriers of the main service channel symbols, carriers in FFT bin
// order (cbin 1..KC/2, then NFFT-KC/2..NFFT-1), real parts carrying bits
// 0..KC-1 and imaginary parts bits KC..2KC-1 -> OFDM frame: null symbol,
// phase reference symbol from the table prs(c), NFIC random symbols, then
// the data symbols (random too in the partial first frame), each with a cyclic prefix of GUARD samples.
// Channel: carrier frequency offset FOFF (in subcarrier spacings), a start
// in the middle of a frame (START_OFS samples into it), scaling to AMP rms
// ADC steps and a little noise. The baseband sample rate is a quarter of the
// ADC rate: every baseband sample s becomes four real samples
// Re s, -Im s, -Re s, Im s (an IF of a quarter of the sampling rate).
// Interface: adc is updated at each `sample` strobe. pkt_sent counts
// packets given to the encoder.
module tdmb_tx #(
  parameter int  NFFT      = 2048,
  parameter int  GUARD     = 504,
  parameter int  NULLN     = 2656,
  parameter int  NSYM      = 76,
  parameter int  KC        = 1536,
  parameter int  NFIC      = 3,
  parameter int  CIFB      = 55296,
  parameter int  CI_M      = 17,
  parameter real FOFF      = 2.3,
  parameter int  START_OFS = 1000,
  parameter real AMP       = 100.0,
  parameter int  ERR_EVERY = 3,
  parameter int  PID_A     = 'h100,
  parameter int  PID_B     = 'h000
) (
  input  logic              clk,
  input  logic              sample,
  output logic signed [9:0] adc,
  output int                pkt_sent
);
  localparam int NMSC = NSYM - 1 - NFIC;
  localparam int SYM  = GUARD + NFFT;
  localparam int FLEN = NULLN + NSYM * SYM;
  localparam int CIFS_PER_FRAME = NMSC * 2 * KC / CIFB;
  localparam int PERM [16] = '{0, 8, 4, 12, 2, 10, 6, 14, 1, 9, 5, 13, 3, 11, 7, 15};
  localparam int GEN [4] = '{'o133, 'o171, 'o145, 'o133};
  localparam real PI = 3.14159265358979;

  // ---------------------------------------------------------------- tables
  real ctab [NFFT], stab [NFFT];
  int  lg [256], ex [512];
  byte unsigned gen [17];
  bit [1:0] prs [KC];
  function automatic byte unsigned gmul(byte unsigned a, byte unsigned b);
    if (a == 0 || b == 0) return 0;
    return 8'(ex[lg[a] + lg[b]]);
  endfunction

  // ------------------------------------------------------- byte/bit source
  byte unsigned ibyte [$];          // interleaved bytes waiting
  byte unsigned cif_fifo [12][$];   // interleaver branch delay lines
  int           br = 0;             // interleaver commutator
  int           pkt_no = 0;
  bit           ibits [$];
  bit  [8:0]    prbs;
  int           lf_pos = 0;
  bit  [5:0]    enc_st = 0;
  bit           codes [16][];       // last 16 encoded CIFs
  int           ncif = 0;

  function automatic void make_packet();
    byte unsigned m [188], par [16], cw [204];
    int pid;
    pid = (pkt_no % 4 == 3) ? PID_B : PID_A;
    m[0] = 8'h47; m[1] = 8'(pid >> 8) & 8'h1F; m[2] = 8'(pid);
    m[3] = 8'(pkt_no);
    for (int i = 4; i < 188; i++) m[i] = 8'(pkt_no * 7 + i * 13);
    for (int i = 0; i < 16; i++) par[i] = 0;
    for (int i = 0; i < 188; i++) begin
      byte unsigned fb;
      fb = m[i] ^ par[0];
      for (int k = 0; k < 15; k++) par[k] = par[k + 1] ^ gmul(fb, gen[15 - k]);
      par[15] = gmul(fb, gen[0]);
    end
    for (int i = 0; i < 188; i++) cw[i] = m[i];
    for (int i = 0; i < 16; i++) cw[188 + i] = par[i];
    if (ERR_EVERY > 0 && pkt_no % ERR_EVERY == 1) cw[50 + pkt_no % 100] ^= 8'h5A;
    for (int i = 0; i < 204; i++) begin
      // branch br delays by br*CI_M bytes
      cif_fifo[br].push_back(cw[i]);
      if (cif_fifo[br].size() > br * CI_M) ibyte.push_back(cif_fifo[br].pop_front());
      else ibyte.push_back(8'h00);
      br = (br + 1) % 12;
    end
    pkt_no++;
    pkt_sent = pkt_no;
  endfunction

  function automatic bit next_info_bit();
    bit b, p;
    if (ibits.size() == 0) begin
      byte unsigned v;
      if (ibyte.size() == 0) make_packet();
      v = ibyte.pop_front();
      for (int k = 7; k >= 0; k--) ibits.push_back(v[k]);
    end
    b = ibits.pop_front();
    if (lf_pos == 0) prbs = 9'h1FF;
    p = prbs[8] ^ prbs[4];
    prbs = {prbs[7:0], p};
    lf_pos = (lf_pos + 1) % (CIFB / 4);
    return b ^ p;
  endfunction

  // one encoded CIF into the history, then the time-interleaved CIF out
  bit txcif [];
  task automatic make_cif();
    bit c [];
    c = new[CIFB];
    for (int n = 0; n < CIFB / 4; n++) begin
      bit u;
      bit [6:0] r;
      u = next_info_bit();
      r = {u, enc_st};              // r[6] = current bit, r[5] = previous ...
      for (int g = 0; g < 4; g++) c[4 * n + g] = ^(7'(GEN[g]) & r);
      enc_st = r[6:1];
    end
    codes[ncif % 16] = c;
    txcif = new[CIFB];
    for (int i = 0; i < CIFB; i++) begin
      int src;
      src = ncif - PERM[i % 16];
      txcif[i] = (src < 0) ? 1'($urandom_range(1)) : codes[src % 16][i];
    end
    ncif++;
  endtask

  // ----------------------------------------------------------------- OFDM
  real xr [KC], xi [KC];            // current carrier values (differential)
  real sr [SYM], si [SYM];
  int  cbin [KC];
  int  cif_pos = 0;
  bit  started = 0;                 // data symbols only from the first whole frame

  task automatic build_symbol(input int l);
    real a, g;
    g = 1.0 / $sqrt(2.0);
    for (int c = 0; c < KC; c++) begin
      real zr, zi, nr, ni;
      if (l == 0) begin
        zr = prs[c][0] ? -g : g; zi = prs[c][1] ? -g : g;
        xr[c] = zr; xi[c] = zi;
      end else begin
        if (l <= NFIC || !started) begin
          zr = $urandom_range(1) ? -g : g; zi = $urandom_range(1) ? -g : g;
        end else begin
          zr = 0; zi = 0;
        end
        nr = xr[c]; ni = xi[c];
        if (l > NFIC && started) begin
          // bits are filled in by the caller below
          xr[c] = nr; xi[c] = ni;
        end else begin
          xr[c] = nr * zr - ni * zi; xi[c] = nr * zi + ni * zr;
        end
      end
    end
    if (l > NFIC && started) begin
      // 2KC bits from the time-interleaved stream
      bit b [];
      b = new[2 * KC];
      for (int k = 0; k < 2 * KC; k++) begin
        if (cif_pos == 0) make_cif();
        b[k] = txcif[cif_pos];
        cif_pos = (cif_pos + 1) % CIFB;
      end
      for (int c = 0; c < KC; c++) begin
        real zr, zi, nr, ni;
        zr = b[c] ? -g : g; zi = b[c + KC] ? -g : g;
        nr = xr[c]; ni = xi[c];
        xr[c] = nr * zr - ni * zi; xi[c] = nr * zi + ni * zr;
      end
    end
    a = AMP / $sqrt(1.0 * KC);
    for (int m = 0; m < SYM; m++) begin
      real accr, acci;
      int n;
      n = m - GUARD;
      accr = 0; acci = 0;
      for (int c = 0; c < KC; c++) begin
        int idx;
        idx = ((cbin[c] * n) % NFFT + NFFT) % NFFT;
        accr += xr[c] * ctab[idx] - xi[c] * stab[idx];
        acci += xr[c] * stab[idx] + xi[c] * ctab[idx];
      end
      sr[m] = a * accr; si[m] = a * acci;
    end
  endtask

  // ------------------------------------------------------ sample sequencer
  int  fpos, sub = 0;
  real bre = 0, bim = 0, ph = 0;
  initial begin
    int x;
    for (int i = 0; i < NFFT; i++) begin ctab[i] = $cos(2.0 * PI * i / NFFT); stab[i] = $sin(2.0 * PI * i / NFFT); end
    x = 1;
    for (int i = 0; i < 255; i++) begin ex[i] = x; ex[i + 255] = x; lg[x] = i; x = x << 1; if (x & 256) x ^= 'h11D; end
    for (int k = 0; k < 17; k++) gen[k] = 0;
    gen[0] = 1;
    for (int i = 0; i < 16; i++) begin
      for (int k = 16; k > 0; k--) gen[k] = gen[k - 1] ^ gmul(gen[k], 8'(ex[i]));
      gen[0] = gmul(gen[0], 8'(ex[i]));
    end
    // phase reference table: a fixed pseudo-random sequence
    x = 'h5A5;
    for (int c = 0; c < KC; c++) begin
      for (int k = 0; k < 2; k++) begin x = (x >> 1) ^ ((x & 1) ? 'hB400 : 0); prs[c][k] = x[0]; end
    end
    for (int c = 0; c < KC; c++) cbin[c] = (c < KC / 2) ? c + 1 : NFFT - KC + c;
    fpos = START_OFS;
    pkt_sent = 0;
    adc = '0;
  end

  always @(posedge clk) if (sample) begin
    real v;
    if (sub == 0) begin
      // next baseband sample
      int p, l, m;
      p = fpos;
      if (p == 0) started = 1;
      if (p < NULLN) begin bre = 0; bim = 0; end
      else begin
        l = (p - NULLN) / SYM; m = (p - NULLN) % SYM;
        if (m == 0) build_symbol(l);
        bre = sr[m]; bim = si[m];
      end
      // frequency offset
      begin
        real cr, ci, tr;
        cr = $cos(ph); ci = $sin(ph);
        tr = bre * cr - bim * ci; bim = bre * ci + bim * cr; bre = tr;
        ph += 2.0 * PI * FOFF / NFFT;
        if (ph > 2.0 * PI) ph -= 2.0 * PI;
      end
      fpos = (fpos + 1) % FLEN;
    end
    case (sub)
      0: v = bre;
      1: v = -bim;
      2: v = -bre;
      default: v = bim;
    endcase
    v += $itor($signed($urandom_range(2))) - 1.0;
    if (v > 511.0) v = 511.0;
    if (v < -511.0) v = -511.0;
    adc <= 10'($rtoi(v + (v >= 0 ? 0.5 : -0.5)));
    sub = (sub + 1) % 4;
  end
endmodule
