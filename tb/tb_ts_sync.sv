// tb_ts_sync: sends a few hundred random bits (no alignment), then packets
// of 204 bytes starting with 0x47 and random contents, at a random bit
// offset. Checks that output starts with a sync byte flagged out_start, that
// every later byte equals the sent byte in order, that out_start falls every
// 204 bytes, and that after the stream turns random again the lock is lost.
module tb_ts_sync;
  logic clk = 0, rst_n = 0, in_valid = 0, in_bit = 0;
  logic out_valid, out_start, locked; logic [7:0] out_byte; logic [15:0] n_lock;
  int checks = 0, failures = 0;
  byte unsigned sent [$];
  int nout = 0, first_idx = -1;
  ts_sync dut (.*);
  always #5 clk = ~clk;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic send_bit(input bit b);
    @(negedge clk); in_valid = 1; in_bit = b;
    @(negedge clk); in_valid = 0;
  endtask
  bit tail = 0;
  always @(posedge clk) if (rst_n && out_valid && !tail) begin
    checks++;
    if (nout == 0) begin
      // locate the first output in the sent byte list: must be a sync byte
      if (!out_start || out_byte != 8'h47) begin failures++; $display("first output not sync"); end
    end
    if (out_byte != sent[nout + first_idx] || out_start != ((nout % 204) == 0)) begin
      failures++; if (failures < 10) $display("byte %0d got %h exp %h start %0d", nout, out_byte, sent[nout + first_idx], out_start);
    end
    nout++;
  end
  initial begin
    int noise;
    repeat (3) @(negedge clk); rst_n = 1;
    noise = 100 + $urandom_range(60);
    for (int i = 0; i < noise; i++) send_bit(1'($urandom_range(1)) & ~(i % 7 == 0));
    for (int p = 0; p < 12; p++)
      for (int j = 0; j < 204; j++) begin
        byte unsigned v;
        v = (j == 0) ? 8'h47 : 8'($urandom_range(255));
        if (j > 0 && v == 8'h47) v = 8'h46;
        sent.push_back(v);
      end
    // the third sync byte completes the lock, output starts at packet 3
    first_idx = 408;
    foreach (sent[i]) for (int b = 7; b >= 0; b--) send_bit(sent[i][b]);
    repeat (8) send_bit(1'b0);
    tail = 1;
    checks++; if (!locked) begin failures++; $display("not locked"); end
    checks++; if (nout != 10 * 204) begin failures++; $display("outputs %0d", nout); end
    for (int i = 0; i < 204 * 8 * 4; i++) send_bit(1'($urandom_range(1)));
    checks++; if (locked) begin failures++; $display("lock not lost"); end
    checks++; if (n_lock != 1) begin failures++; $display("n_lock %0d", n_lock); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
