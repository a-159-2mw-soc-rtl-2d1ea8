// tb_frame_sync: three frames of noise-like signal separated by 2656-sample
// null symbols (with weak residual noise). Checks that exactly one
// frame_start is produced per null, no earlier than the end of the null and
// at most WIN samples after it, and that the reported null length is within
// WIN samples of the true one.
module tb_frame_sync;
  logic clk = 0, rst_n = 0, in_valid = 0, enable = 1;
  logic signed [11:0] ii, iq;
  logic frame_start, in_null; logic [15:0] null_len;
  int checks = 0, failures = 0, n = 0, nfs = 0, last_fs = -1;
  frame_sync dut (.clk, .rst_n, .enable, .in_valid, .in_i(ii), .in_q(iq), .frame_start, .in_null, .null_len);
  always #5 clk = ~clk;
  initial begin #200000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) if (rst_n && frame_start) begin nfs++; last_fs = n - 1; end
  task automatic put(input int amp, input int cnt);
    for (int k = 0; k < cnt; k++) begin
      @(negedge clk);
      ii = 12'($signed($urandom_range(2 * amp)) - amp);
      iq = 12'($signed($urandom_range(2 * amp)) - amp);
      in_valid = 1; n++;
      @(negedge clk); in_valid = 0;
    end
  endtask
  initial begin
    ii = 0; iq = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    put(900, 20000);
    checks++; if (nfs != 0) begin failures++; $display("false frame start in signal"); end
    for (int f = 0; f < 3; f++) begin
      int endn;
      put(8, 2656);
      endn = n;
      put(900, 12000);
      checks++;
      if (nfs != f + 1 || last_fs < endn || last_fs > endn + 64) begin
        failures++; $display("frame %0d: nfs=%0d at %0d, null ended at %0d", f, nfs, last_fs, endn);
      end
      checks++;
      if (int'(null_len) < 2656 - 64 || int'(null_len) > 2656 + 64) begin failures++; $display("null_len %0d", null_len); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
