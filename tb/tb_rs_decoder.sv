// tb_rs_decoder: encodes random 188-byte packets with its own systematic
// RS(204,188) encoder (generator with roots alpha^0..alpha^15 of
// p(x) = x^8+x^4+x^3+x^2+1, built from log tables), adds 0..8 byte errors at
// random positions, and checks that the decoder returns the packet with no
// error flag and the right error count. Packets with 9 errors must be
// flagged. Packets follow each other closely with ce every third clock;
// the two-packet buffering must not overflow.
module tb_rs_decoder;
  logic clk = 0, rst_n = 0, ce = 0, in_valid = 0, in_start = 0;
  logic [7:0] in_byte, out_byte; logic out_valid, out_start, out_err, ovf; logic [3:0] nerr;
  int checks = 0, failures = 0;
  int lg [256], ex [512];
  byte unsigned gen [17];
  byte unsigned expq [$]; int experr [$]; int expn [$];
  int nbyte;
  rs_decoder dut (.clk, .rst_n, .ce, .in_valid, .in_start, .in_byte, .out_valid, .out_start, .out_byte, .out_err, .nerr, .ovf);
  always #5 clk = ~clk;
  int cc = 0;
  always @(posedge clk) begin cc++; ce <= (cc % 3 == 0); end
  initial begin #400000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic byte unsigned mul(byte unsigned a, byte unsigned b);
    if (a == 0 || b == 0) return 0;
    return 8'(ex[lg[a] + lg[b]]);
  endfunction
  int pk = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    byte unsigned e;
    if (out_start) begin
      int fe, fn;
      fe = experr.pop_front(); fn = expn.pop_front();
      checks++;
      if (out_err != 1'(fe)) begin failures++; $display("packet %0d: err flag %0d exp %0d", pk, out_err, fe); end
      if (!fe) begin checks++; if (nerr != 4'(fn)) begin failures++; $display("packet %0d: nerr %0d exp %0d", pk, nerr, fn); end end
      pk++;
    end
    e = expq.pop_front();
    if (experr.size() >= 0 && !out_err) begin
      checks++;
      if (out_byte != e) begin failures++; if (failures < 10) $display("packet %0d byte got %h exp %h", pk, out_byte, e); end
    end
  end
  task automatic packet(input int nerrs);
    byte unsigned m [188], par [16], cw [204];
    int pos [$];
    for (int i = 0; i < 188; i++) m[i] = 8'($urandom_range(255));
    // remainder of m(x) x^16 mod g(x) by long division
    for (int i = 0; i < 16; i++) par[i] = 0;
    for (int i = 0; i < 188; i++) begin
      byte unsigned fb;
      fb = m[i] ^ par[0];
      for (int k = 0; k < 15; k++) par[k] = par[k + 1] ^ mul(fb, gen[15 - k]);
      par[15] = mul(fb, gen[0]);
    end
    for (int i = 0; i < 188; i++) cw[i] = m[i];
    for (int i = 0; i < 16; i++) cw[188 + i] = par[i];
    while (pos.size() < nerrs) begin
      int p; bit dup; p = $urandom_range(203); dup = 0;
      foreach (pos[k]) if (pos[k] == p) dup = 1;
      if (!dup) pos.push_back(p);
    end
    foreach (pos[k]) cw[pos[k]] ^= 8'($urandom_range(254) + 1);
    for (int i = 0; i < 188; i++) expq.push_back(m[i]);
    experr.push_back(nerrs > 8); expn.push_back(nerrs);
    for (int i = 0; i < 204; i++) begin
      @(negedge clk); in_valid = 1; in_start = (i == 0); in_byte = cw[i];
      @(negedge clk); in_valid = 0; in_start = 0;
      repeat (6) @(negedge clk);
    end
  endtask
  initial begin
    int x;
    x = 1;
    for (int i = 0; i < 255; i++) begin ex[i] = x; ex[i + 255] = x; lg[x] = i; x = x << 1; if (x & 256) x ^= 'h11D; end
    // g(x) = prod (x + alpha^i), gen[k] = coefficient of x^k
    for (int k = 0; k < 17; k++) gen[k] = 0;
    gen[0] = 1;
    for (int i = 0; i < 16; i++) begin
      for (int k = 16; k > 0; k--) gen[k] = gen[k - 1] ^ mul(gen[k], 8'(ex[i]));
      gen[0] = mul(gen[0], 8'(ex[i]));
    end
    in_byte = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    packet(0); packet(1); packet(2); packet(5); packet(8); packet(8); packet(3); packet(9); packet(0);
    repeat (3000) @(negedge clk);
    checks++; if (pk != 9) begin failures++; $display("%0d packets out", pk); end
    checks++; if (ovf) begin failures++; $display("overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
