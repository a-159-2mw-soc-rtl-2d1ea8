// tb_agc: checks the output = in*gain/256 rule sample by sample against a
// model of the gain recurrence, that a weak input is amplified towards the
// target, and that a strong input is attenuated with saturations counted.
module tb_agc;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [11:0] ii, iq, oi, oq;
  logic out_valid; logic [15:0] gain, sat_cnt;
  int checks = 0, failures = 0;
  int mgain = 256, msum = 0, mn = 0;
  agc #(.LEN(64), .TARGET(512)) dut (.clk, .rst_n, .in_valid, .in_i(ii), .in_q(iq), .out_valid, .out_i(oi), .out_q(oq), .gain, .sat_cnt);
  always #5 clk = ~clk;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic int sat(int v); if (v > 2047) return 2047; if (v < -2047) return -2047; return v; endfunction
  function automatic int absi(int v); return v < 0 ? -v : v; endfunction
  task automatic feed(input int amp, input int nsamp);
    for (int n = 0; n < nsamp; n++) begin
      int a, b, ea, eb;
      a = $rtoi(amp * $cos(0.37 * n)); b = $rtoi(amp * $sin(0.37 * n + 0.5));
      ii = 12'(a); iq = 12'(b);
      @(negedge clk); in_valid = 1; @(negedge clk); in_valid = 0;
      ea = sat((a * mgain) >>> 8); eb = sat((b * mgain) >>> 8);
      checks++;
      if (oi != ea || oq != eb) begin failures++; if (failures < 10) $display("n=%0d got %0d %0d exp %0d %0d g=%0d", n, oi, oq, ea, eb, mgain); end
      msum += absi(ea) + absi(eb); mn++;
      if (mn == 64) begin
        if (msum / 64 > 640) mgain = mgain - mgain / 16 < 16 ? 16 : mgain - mgain / 16;
        else if (msum / 64 < 384) mgain = mgain + mgain / 16;
        msum = 0; mn = 0;
      end
    end
  endtask
  initial begin
    ii = 0; iq = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    feed(60, 64 * 60);
    checks++; if (gain <= 16'd1024) begin failures++; $display("weak input not amplified, gain=%0d", gain); end
    feed(1900, 64 * 60);
    checks++; if (sat_cnt == 0) begin failures++; $display("no saturation seen"); end
    checks++; if (gain >= 16'd256) begin failures++; $display("strong input not attenuated, gain=%0d", gain); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
