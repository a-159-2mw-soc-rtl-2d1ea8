// rs_decoder: Reed-Solomon (204,188, t=8) decoder over GF(2^8) with the
// primitive polynomial p(x) = x^8 + x^4 + x^3 + x^2 + 1 and a generator with
// the 2t = 16 roots alpha^0 .. alpha^15. The code is the (255,239) code
// shortened by 51 leading zero bytes; the first byte received is the
// coefficient of x^203, the last 16 are parity.
// Structure (two codewords in flight, ping-pong buffers):
//  * input stage: bytes arrive on in_valid (in_start marks byte 0); each is
//    stored and folded into the 16 syndromes by Horner's rule,
//    S_j = S_j * alpha^j + byte.
//  * correction stage, one step per clock enable ce:
//    Berlekamp-Massey, 16 iterations, gives the error locator Lambda(x);
//    one step forms the evaluator Omega(x) = S(x) Lambda(x) mod x^16;
//    a Chien search over the 204 positions finds the roots
//    Lambda(alpha^-d) = 0 and corrects byte d by Forney's formula
//    e = alpha^d * Omega(alpha^-d) / Lambda'(alpha^-d);
//    the 188 data bytes then leave on out_valid (out_start on the first).
//  * out_err is high for the whole packet if the number of roots found differs
//    from deg Lambda (more than 8 byte errors): the packet is then flagged
//    as uncorrectable for the TS layer. nerr reports the roots found.
// Latency after the last input byte: about 16 + 1 + 204 ce cycles, then 188
// output ce cycles. A codeword must complete its correction before the next
// one has fully arrived (ovf flags a violation).
module rs_decoder
  import tdmb_pkg::*;
#(
  parameter int N = 204,
  parameter int K = 188
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  input  logic       in_valid,
  input  logic       in_start,
  input  logic [7:0] in_byte,
  output logic       out_valid,
  output logic       out_start,
  output logic [7:0] out_byte,
  output logic       out_err,
  output logic [3:0] nerr,
  output logic       ovf
);
  localparam int T2 = N - K;           // 16
  localparam int AW = $clog2(N);
  logic [7:0] buff [2**(AW+1)];     // buffer b, byte i at {b, i}
  logic [7:0] syn [T2];
  logic [7:0] sp  [T2];
  logic [AW-1:0] icnt;
  logic wsel, psel, pending;
  logic pclr;

  // ---------------- input stage ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      icnt <= '0; wsel <= 1'b0; pending <= 1'b0; ovf <= 1'b0;
      for (int j = 0; j < T2; j++) begin syn[j] <= '0; sp[j] <= '0; end
    end else begin
      if (pclr) pending <= 1'b0;
      if (in_valid) begin
        logic [AW-1:0] c;
        c = in_start ? '0 : icnt;
        buff[{wsel, c}] <= in_byte;
        for (int j = 0; j < T2; j++)
          syn[j] <= (c == '0 ? 8'h00 : gf_mul(syn[j], gf_exp(j))) ^ in_byte;
        if (c == AW'(N - 1)) begin
          icnt <= '0;
          for (int j = 0; j < T2; j++) sp[j] <= gf_mul(syn[j], gf_exp(j)) ^ in_byte;
          if (pending && !pclr) ovf <= 1'b1;
          pending <= 1'b1; psel <= wsel; wsel <= ~wsel;
        end else icnt <= c + 1'b1;
      end
    end
  end

  // ---------------- correction stage ----------------
  typedef enum logic [2:0] {P_IDLE, P_BM, P_OMEGA, P_CHIEN, P_OUT} pst_e;
  pst_e st;
  logic [7:0] lam [T2/2+1];
  logic [7:0] bb  [T2/2+1];
  logic [7:0] om  [T2];
  logic [7:0] bd;
  logic [4:0] r;
  logic [3:0] L;
  logic [4:0] mm;
  logic [AW-1:0] pos;
  logic [7:0] xinv, xx;
  logic [3:0] nroot;
  assign pclr = (st == P_IDLE) && pending && ce;

  // Berlekamp-Massey step
  logic [7:0] disc, coef;
  logic [7:0] lam_n [T2/2+1];
  always_comb begin
    disc = sp[r[3:0]];
    for (int i = 1; i <= T2/2; i++)
      if (i <= int'(L) && int'(r) - i >= 0) disc ^= gf_mul(lam[i], sp[(int'(r) - i) & 15]);
    coef = gf_mul(disc, gf_inv(bd));
    for (int i = 0; i <= T2/2; i++) begin
      lam_n[i] = lam[i];
      if (i >= int'(mm)) lam_n[i] ^= gf_mul(coef, bb[4'(i - int'(mm))]);
    end
  end

  // Chien / Forney evaluation at xinv = alpha^-d
  logic [7:0] lv, ov, dv, ev, xp, x2, xq;
  always_comb begin
    lv = '0; ov = '0; dv = '0; xp = 8'h01; xq = 8'h01;
    x2 = gf_mul(xinv, xinv);
    for (int i = 0; i <= T2/2; i++) begin
      lv ^= gf_mul(lam[i], xp);
      // Lambda'(x) = sum over odd i of lambda_i x^(i-1)
      if (i % 2 == 1) begin dv ^= gf_mul(lam[i], xq); xq = gf_mul(xq, x2); end
      xp = gf_mul(xp, xinv);
    end
    xp = 8'h01;
    for (int i = 0; i < T2; i++) begin
      ov ^= gf_mul(om[i], xp);
      xp = gf_mul(xp, xinv);
    end
    ev = gf_mul(xx, gf_mul(ov, gf_inv(dv)));
  end

  always_ff @(posedge clk) begin
    out_valid <= 1'b0; out_start <= 1'b0;
    if (!rst_n) begin
      st <= P_IDLE; r <= '0; L <= '0; mm <= 5'd1; bd <= 8'h01; pos <= '0;
      xinv <= '0; xx <= '0; nroot <= '0; out_byte <= '0; out_err <= 1'b0; nerr <= '0;
      for (int i = 0; i <= T2/2; i++) begin lam[i] <= '0; bb[i] <= '0; end
      for (int i = 0; i < T2; i++) om[i] <= '0;
    end else if (ce) begin
      unique case (st)
        P_IDLE: if (pending) begin
          st <= P_BM; r <= '0; L <= '0; mm <= 5'd1; bd <= 8'h01;
          for (int i = 0; i <= T2/2; i++) begin
            lam[i] <= (i == 0) ? 8'h01 : 8'h00;
            bb[i]  <= (i == 0) ? 8'h01 : 8'h00;
          end
        end
        P_BM: begin
          if (disc == 8'h00) mm <= mm + 5'd1;
          else if (2 * int'(L) <= int'(r)) begin
            for (int i = 0; i <= T2/2; i++) begin lam[i] <= lam_n[i]; bb[i] <= lam[i]; end
            L <= 4'(int'(r) + 1 - int'(L)); bd <= disc; mm <= 5'd1;
          end else begin
            for (int i = 0; i <= T2/2; i++) lam[i] <= lam_n[i];
            mm <= mm + 5'd1;
          end
          r <= r + 5'd1;
          if (r == 5'(T2 - 1)) st <= P_OMEGA;
        end
        P_OMEGA: begin
          for (int i = 0; i < T2; i++) begin
            logic [7:0] acc;
            acc = '0;
            for (int k = 0; k <= T2/2; k++) if (k <= i) acc ^= gf_mul(sp[i - k], lam[k]);
            om[i] <= acc;
          end
          st <= P_CHIEN; pos <= '0; nroot <= '0;
          xinv <= gf_exp(255 - (N - 1)); xx <= gf_exp(N - 1);
        end
        P_CHIEN: begin
          if (lv == 8'h00) begin
            buff[{psel, pos}] <= buff[{psel, pos}] ^ ev;
            nroot <= nroot + 4'd1;
          end
          xinv <= gf_mul(xinv, 8'h02);
          xx   <= gf_mul(xx, gf_inv(8'h02));
          pos  <= pos + 1'b1;
          if (pos == AW'(N - 1)) begin
            st <= P_OUT; pos <= '0;
            out_err <= (nroot + ((lv == 8'h00) ? 4'd1 : 4'd0)) != L || L > 4'(T2/2);
            nerr    <= nroot + ((lv == 8'h00) ? 4'd1 : 4'd0);
          end
        end
        P_OUT: begin
          out_valid <= 1'b1; out_start <= (pos == '0);
          out_byte  <= buff[{psel, pos}];
          pos <= pos + 1'b1;
          if (pos == AW'(K - 1)) st <= P_IDLE;
        end
        default: st <= P_IDLE;
      endcase
    end
  end
endmodule
