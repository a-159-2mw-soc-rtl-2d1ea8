// h264_transform: H.264 inverse transforms with de-quantisation (flat
// scaling matrices, baseline profile). One block per in_valid, result one
// clock later. Modes:
//   M_4X4   : residual block; every coefficient is scaled
//             d = c * v(qp%6, pos) << (qp/6) and the 4x4 integer inverse
//             transform follows (butterflies with >>1 on the odd terms),
//             output (h + 32) >> 6.
//   M_4X4AC : same, but coefficient 0 is an already scaled DC value.
//   M_DC2X2 : chroma DC; f = H2 c H2, dc = (f * v0 << (qp/6)) >> 1,
//             results in positions 0..3.
//   M_DC4X4 : intra-16x16 luma DC; f = H4 c H4, then
//             dc = (f*16*v0) << (qp/6 - 6) for qp >= 36, else
//             (f*16*v0 + 2^(5 - qp/6)) >> (6 - qp/6).
// v(m, pos) is the standard's normAdjust table: v0 for positions with both
// indices even, v1 for both odd, v2 otherwise. Coefficients are in raster
// order (index 4*row + column). The transform equations are the H.264
// standard's; the single-cycle, fully parallel structure is this design's.
module h264_transform (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [1:0]               mode,
  input  logic [5:0]               qp,
  input  logic signed [15:0]       coef [16],
  output logic                     out_valid,
  output logic signed [15:0]       res  [16]
);
  localparam logic [1:0] M_4X4 = 2'd0, M_4X4AC = 2'd1, M_DC2X2 = 2'd2, M_DC4X4 = 2'd3;
  localparam logic [5:0][2:0][4:0] V = {
    {5'd23, 5'd29, 5'd18}, {5'd20, 5'd25, 5'd16}, {5'd18, 5'd23, 5'd14},
    {5'd16, 5'd20, 5'd13}, {5'd14, 5'd18, 5'd11}, {5'd13, 5'd16, 5'd10}};
  // V[m][0] = v0, V[m][1] = v1, V[m][2] = v2
  logic [2:0] qm;
  logic [3:0] qd;
  always_comb begin
    qm = 3'(qp % 6);
    qd = 4'(qp / 6);
  end

  function automatic logic signed [31:0] vsel(input int r, input int c, input logic [2:0] m);
    if (r % 2 == 0 && c % 2 == 0) return 32'(V[m][0]);
    if (r % 2 == 1 && c % 2 == 1) return 32'(V[m][1]);
    return 32'(V[m][2]);
  endfunction

  logic signed [31:0] d [16];
  logic signed [31:0] t [16];
  logic signed [31:0] o [16];
  always_comb begin
    logic signed [31:0] e0, e1, e2, e3, f0, f1, f2, f3, a, b, c2, e, p;
    logic signed [31:0] f [4];
    {e0, e1, e2, e3, f0, f1, f2, f3, a, b, c2, e, p} = '0;
    for (int i = 0; i < 4; i++) f[i] = '0;
    for (int i = 0; i < 16; i++) begin
      d[i] = (32'(coef[i]) * vsel(i / 4, i % 4, qm)) <<< qd;
      t[i] = '0; o[i] = '0;
    end
    if (mode == M_4X4AC) d[0] = 32'(coef[0]);
    if (mode == M_4X4 || mode == M_4X4AC) begin
      // rows
      for (int r = 0; r < 4; r++) begin
        e0 = d[4*r] + d[4*r+2];
        e1 = d[4*r] - d[4*r+2];
        e2 = (d[4*r+1] >>> 1) - d[4*r+3];
        e3 = d[4*r+1] + (d[4*r+3] >>> 1);
        t[4*r] = e0 + e3; t[4*r+1] = e1 + e2; t[4*r+2] = e1 - e2; t[4*r+3] = e0 - e3;
      end
      // columns
      for (int c = 0; c < 4; c++) begin
        e0 = t[c] + t[8+c];
        e1 = t[c] - t[8+c];
        e2 = (t[4+c] >>> 1) - t[12+c];
        e3 = t[4+c] + (t[12+c] >>> 1);
        o[c] = (e0 + e3 + 32) >>> 6;  o[4+c]  = (e1 + e2 + 32) >>> 6;
        o[8+c] = (e1 - e2 + 32) >>> 6; o[12+c] = (e0 - e3 + 32) >>> 6;
      end
    end else if (mode == M_DC2X2) begin
      f0 = 32'(coef[0]) + 32'(coef[1]) + 32'(coef[2]) + 32'(coef[3]);
      f1 = 32'(coef[0]) - 32'(coef[1]) + 32'(coef[2]) - 32'(coef[3]);
      f2 = 32'(coef[0]) + 32'(coef[1]) - 32'(coef[2]) - 32'(coef[3]);
      f3 = 32'(coef[0]) - 32'(coef[1]) - 32'(coef[2]) + 32'(coef[3]);
      o[0] = ((f0 * 32'(V[qm][0])) <<< qd) >>> 1;
      o[1] = ((f1 * 32'(V[qm][0])) <<< qd) >>> 1;
      o[2] = ((f2 * 32'(V[qm][0])) <<< qd) >>> 1;
      o[3] = ((f3 * 32'(V[qm][0])) <<< qd) >>> 1;
    end else begin
      // 4x4 Hadamard: rows then columns, H = [1 1 1 1; 1 1 -1 -1; 1 -1 -1 1; 1 -1 1 -1]
      for (int r = 0; r < 4; r++) begin
        a = 32'(coef[4*r]); b = 32'(coef[4*r+1]); c2 = 32'(coef[4*r+2]); e = 32'(coef[4*r+3]);
        t[4*r] = a + b + c2 + e; t[4*r+1] = a + b - c2 - e;
        t[4*r+2] = a - b - c2 + e; t[4*r+3] = a - b + c2 - e;
      end
      for (int c = 0; c < 4; c++) begin
        a = t[c]; b = t[4+c]; c2 = t[8+c]; e = t[12+c];
        f[0] = a + b + c2 + e; f[1] = a + b - c2 - e; f[2] = a - b - c2 + e; f[3] = a - b + c2 - e;
        for (int r = 0; r < 4; r++) begin
          p = f[r] * 32'(V[qm][0]) * 32'sd16;
          if (qp >= 6'd36) o[4*r+c] = p <<< (qd - 4'd6);
          else             o[4*r+c] = (p + (32'sd1 <<< (4'd5 - qd))) >>> (4'd6 - qd);
        end
      end
    end
  end
  always_ff @(posedge clk) begin
    out_valid <= 1'b0;
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) res[i] <= '0;
    end else if (in_valid) begin
      out_valid <= 1'b1;
      for (int i = 0; i < 16; i++) res[i] <= 16'(o[i]);
    end
  end
endmodule
