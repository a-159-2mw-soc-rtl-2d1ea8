// qpsk_demod: differential QPSK demodulator with 4-bit soft outputs.
// For each active carrier the FFT output of symbol l is multiplied by the
// conjugate of the same carrier in symbol l-1, d = Y_l * conj(Y_(l-1)).
// A bit 0 maps to a positive component, so soft = sat4(component >>> SH):
// +7 = confident 0, -8 = confident 1, 0 = no information.
// Active carriers are the KC/2 bins above and below DC (1..KC/2 and
// N-KC/2..N-1), taken in FFT bin order; frequency de-interleaving is not
// part of this block. Per symbol the real parts of all carriers are output
// first (as they arrive) and then the imaginary parts from a buffer, which
// gives the DAB bit order p(k) then p(k+K). A symbol with `first` set (the
// phase reference) only loads the reference memory.
module qpsk_demod #(
  parameter int N  = 2048,
  parameter int KC = 1536,
  parameter int DW = 16,
  parameter int SH = 13
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  first,
  input  logic                  in_valid,
  input  logic [$clog2(N)-1:0]  in_idx,
  input  logic signed [DW-1:0]  in_re,
  input  logic signed [DW-1:0]  in_im,
  output logic                  out_valid,
  output logic signed [3:0]     soft_o,
  output logic                  sym_done
);
  localparam int LN = $clog2(N);
  localparam int LK = $clog2(KC);
  logic signed [DW-1:0] pre [KC];
  logic signed [DW-1:0] pim [KC];
  logic signed [3:0]    qbuf [KC];
  logic [LK-1:0] c, rd;
  logic flushing, isfirst;
  logic act;
  logic signed [2*DW:0] dr, di;
  assign act = (in_idx >= LN'(1) && in_idx <= LN'(KC/2)) || (in_idx >= LN'(N - KC/2));
  always_comb begin
    dr = (2*DW+1)'(in_re * pre[c]) + (2*DW+1)'(in_im * pim[c]);
    di = (2*DW+1)'(in_im * pre[c]) - (2*DW+1)'(in_re * pim[c]);
  end
  function automatic logic signed [3:0] sat4(input logic signed [2*DW:0] v);
    logic signed [2*DW:0] s;
    s = v >>> SH;
    if (s > 7) return 4'sd7;
    if (s < -8) return -4'sd8;
    return 4'(s);
  endfunction
  always_ff @(posedge clk) begin
    out_valid <= 1'b0; sym_done <= 1'b0;
    if (!rst_n) begin
      c <= '0; rd <= '0; flushing <= 1'b0; isfirst <= 1'b1; soft_o <= '0;
    end else if (flushing) begin
      out_valid <= 1'b1; soft_o <= qbuf[rd];
      rd <= rd + 1'b1;
      if (rd == LK'(KC - 1)) begin flushing <= 1'b0; sym_done <= 1'b1; end
    end else if (in_valid) begin
      if (in_idx == '0) isfirst <= first;
      if (act) begin
        pre[c] <= in_re; pim[c] <= in_im;
        if (!(in_idx == '0 ? first : isfirst)) begin
          out_valid <= 1'b1; soft_o <= sat4(dr);
          qbuf[c] <= sat4(di);
        end
        c <= (c == LK'(KC - 1)) ? '0 : c + 1'b1;
      end
      if (in_idx == LN'(N - 1)) begin
        if (!isfirst) begin flushing <= 1'b1; rd <= '0; end
        else sym_done <= 1'b1;
      end
    end
  end
endmodule
