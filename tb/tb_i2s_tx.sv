// tb_i2s_tx: sends stereo sample pairs and decodes the I2S lines with a
// receiver model (data sampled on rising sck, word starts one bit after a
// ws change, MSB first, ws low = left). Checks the decoded words, the bit
// clock period of 2*DIV clocks and 2*SW bit clocks per frame.
module tb_i2s_tx;
  localparam int SW = 16, DIV = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, sck, ws, sd;
  logic [SW-1:0] l, r; logic [15:0] underrun;
  int checks = 0, failures = 0;
  logic [SW-1:0] expl [$], expr [$];
  i2s_tx #(.SW(SW), .DIV(DIV)) dut (.clk, .rst_n, .in_valid, .in_left(l), .in_right(r), .in_ready, .sck, .ws, .sd, .underrun);
  always #5 clk = ~clk;
  initial begin #100000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  // receiver
  logic pws = 1; int bitc = -1; logic [SW-1:0] sh; logic cur; int nwords = 0; bit insync = 0; int lastrise = 0, period = 0, cyc = 0;
  always @(posedge clk) cyc++;
  always @(posedge sck) begin
    if (lastrise != 0) period = cyc - lastrise;
    lastrise = cyc;
    if (bitc >= 0 && bitc < SW) begin sh = {sh[SW-2:0], sd}; bitc++; end
    if (bitc == SW) begin
      logic [SW-1:0] e;
      // words before the first sent pair carry the reset value
      if (!insync && !cur && expl.size() > 0 && sh == expl[0]) insync = 1;
      if (insync && (cur ? expr.size() : expl.size()) > 0) begin
        e = cur ? expr.pop_front() : expl.pop_front();
        checks++;
        if (sh != e) begin failures++; if (failures < 10) $display("%s word got %h exp %h", cur ? "right" : "left", sh, e); end
        nwords++;
      end
      bitc = -1;
    end
    if (ws != pws) begin bitc = 0; cur = ws; end
    pws = ws;
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 20; k++) begin
      logic [SW-1:0] a, b;
      a = SW'($urandom); b = SW'($urandom);
      while (!in_ready) @(negedge clk);
      @(negedge clk); in_valid = 1; l = a; r = b; expl.push_back(a); expr.push_back(b);
      @(negedge clk); in_valid = 0;
    end
    repeat (2 * SW * 2 * DIV * 3) @(negedge clk);
    checks++; if (period != 2 * DIV) begin failures++; $display("sck period %0d", period); end
    checks++; if (nwords != 40 || expl.size() != 0) begin failures++; $display("only %0d words", nwords); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
