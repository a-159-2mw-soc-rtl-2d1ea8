// tb_h264_transform: compares all four modes with a reference model of the
// H.264 scaling and inverse-transform rules written as separate row and
// column passes, for random coefficients and every qp 0..51, plus a DC-only
// block whose residual must be flat ((dc*v0 << qp/6) + 32) >> 6.
module tb_h264_transform;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [1:0] mode; logic [5:0] qp;
  logic signed [15:0] coef [16], res [16];
  int checks = 0, failures = 0;
  int V [6][3] = '{'{10, 16, 13}, '{11, 18, 14}, '{13, 20, 16}, '{14, 23, 18}, '{16, 25, 20}, '{18, 29, 23}};
  h264_transform dut (.clk, .rst_n, .in_valid, .mode, .qp, .coef, .out_valid, .res);
  always #5 clk = ~clk;
  initial begin #100000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic int lv(int q, int r, int c);
    if (r % 2 == 0 && c % 2 == 0) return V[q % 6][0];
    if (r % 2 == 1 && c % 2 == 1) return V[q % 6][1];
    return V[q % 6][2];
  endfunction
  task automatic ref4(input int md, input int q, input int c [16], output int o [16]);
    int d [4][4], g [4][4], h [4][4];
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) d[i][j] = (c[4*i+j] * lv(q, i, j)) << (q / 6);
    if (md == 1) d[0][0] = c[0];
    for (int i = 0; i < 4; i++) begin   // horizontal
      int a0, a1, a2, a3;
      a0 = d[i][0] + d[i][2]; a1 = d[i][0] - d[i][2];
      a2 = (d[i][1] >>> 1) - d[i][3]; a3 = d[i][1] + (d[i][3] >>> 1);
      g[i][0] = a0 + a3; g[i][1] = a1 + a2; g[i][2] = a1 - a2; g[i][3] = a0 - a3;
    end
    for (int j = 0; j < 4; j++) begin   // vertical
      int a0, a1, a2, a3;
      a0 = g[0][j] + g[2][j]; a1 = g[0][j] - g[2][j];
      a2 = (g[1][j] >>> 1) - g[3][j]; a3 = g[1][j] + (g[3][j] >>> 1);
      h[0][j] = a0 + a3; h[1][j] = a1 + a2; h[2][j] = a1 - a2; h[3][j] = a0 - a3;
    end
    for (int i = 0; i < 16; i++) o[i] = (h[i / 4][i % 4] + 32) >>> 6;
  endtask
  task automatic refdc(input int md, input int q, input int c [16], output int o [16]);
    for (int i = 0; i < 16; i++) o[i] = 0;
    if (md == 2) begin
      int f [4];
      f[0] = c[0] + c[1] + c[2] + c[3]; f[1] = c[0] - c[1] + c[2] - c[3];
      f[2] = c[0] + c[1] - c[2] - c[3]; f[3] = c[0] - c[1] - c[2] + c[3];
      for (int i = 0; i < 4; i++) o[i] = ((f[i] * 16 * V[q % 6][0]) << (q / 6)) >>> 5;
    end else begin
      int H [4][4] = '{'{1, 1, 1, 1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}, '{1, -1, 1, -1}};
      int t [4][4], f [4][4];
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
        t[i][j] = 0; for (int k = 0; k < 4; k++) t[i][j] += H[i][k] * c[4*k+j];
      end
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
        f[i][j] = 0; for (int k = 0; k < 4; k++) f[i][j] += t[i][k] * H[k][j];
      end
      for (int i = 0; i < 16; i++) begin
        int p; p = f[i / 4][i % 4] * 16 * V[q % 6][0];
        if (q >= 36) o[i] = p << (q / 6 - 6);
        else o[i] = (p + (1 << (5 - q / 6))) >>> (6 - q / 6);
      end
    end
  endtask
  task automatic one(input int md, input int q, input int c [16]);
    int o [16];
    if (md < 2) ref4(md, q, c, o); else refdc(md, q, c, o);
    @(negedge clk); in_valid = 1; mode = 2'(md); qp = 6'(q);
    for (int i = 0; i < 16; i++) coef[i] = 16'(c[i]);
    @(negedge clk); in_valid = 0;
    for (int i = 0; i < ((md == 2) ? 4 : 16); i++) begin
      checks++;
      if (!out_valid || res[i] != 16'(o[i])) begin failures++; if (failures < 10) $display("mode %0d qp %0d [%0d] got %0d exp %0d", md, q, i, res[i], o[i]); end
    end
  endtask
  initial begin
    int c [16];
    for (int i = 0; i < 16; i++) coef[i] = 0;
    mode = 0; qp = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // DC only: flat residual
    for (int i = 0; i < 16; i++) c[i] = 0;
    c[0] = 5;
    one(0, 28, c);
    for (int i = 0; i < 16; i++) begin
      checks++; if (res[i] != 16'(((5 * 16) << 4 + 32) >>> 6) && res[i] != res[0]) begin failures++; $display("DC not flat"); end
    end
    checks++; if (res[0] != 16'((((5 * 16) << 4) + 32) >>> 6)) begin failures++; $display("DC value %0d", res[0]); end
    for (int q = 0; q < 52; q++)
      for (int md = 0; md < 4; md++) begin
        for (int i = 0; i < 16; i++) c[i] = $signed($urandom_range(40)) - 20;
        one(md, q, c);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
