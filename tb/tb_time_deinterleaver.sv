// tb_time_deinterleaver: interleaves a known soft-value stream the way the
// transmitter does (bit i of CIF m is sent in CIF m + P(i mod 16)), passes
// it through the de-interleaver and its PSRAM model, and checks that from
// the 16th CIF on, every output equals the original value of CIF c-15 in bit
// order, that out_ok rises exactly then, and that no value is lost.
// Reduced CIF size: 64 soft values.
module tb_time_deinterleaver;
  localparam int CB = 64, NC = 22;
  localparam int P [16] = '{0, 8, 4, 12, 2, 10, 6, 14, 1, 9, 5, 13, 3, 11, 7, 15};
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [3:0] in_soft, out_soft;
  logic out_valid, out_ok, overflow;
  logic mce_n, mwe_n, moe_n; logic [17:0] maddr; logic [15:0] mwd, mrd;
  int checks = 0, failures = 0, nout = 0, nok = 0;
  function automatic logic [3:0] val(input int m, input int i); return 4'((m * 7 + i * 3 + (i / 5)) % 16); endfunction
  time_deinterleaver #(.CIFB(CB)) dut (.clk, .rst_n, .in_valid, .in_soft, .out_valid, .out_soft, .out_ok, .overflow,
    .mem_ce_n(mce_n), .mem_we_n(mwe_n), .mem_oe_n(moe_n), .mem_addr(maddr), .mem_wdata(mwd), .mem_rdata(mrd));
  psram u_mem (.clk, .ce_n(mce_n), .we_n(mwe_n), .oe_n(moe_n), .addr(maddr), .dq_i(mwd), .dq_o(mrd));
  always #5 clk = ~clk;
  initial begin #100000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) if (rst_n && out_valid) begin
    int c, i, m;
    c = nout / CB; i = nout % CB; m = c - 15;
    if (c >= 15) begin
      checks++;
      if (out_soft != val(m, i)) begin failures++; if (failures < 10) $display("CIF %0d bit %0d got %0d exp %0d", m, i, out_soft, val(m, i)); end
      checks++;
      if (!out_ok) begin failures++; $display("out_ok low at CIF %0d", c); end
    end else if (out_ok) begin failures++; checks++; $display("out_ok early at CIF %0d", c); end
    nout++;
  end
  initial begin
    in_soft = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int c = 0; c < NC; c++)
      for (int i = 0; i < CB; i++) begin
        // transmitted in CIF c: bit i of logical CIF c - P(i mod 16) (zero before the start)
        int m;
        m = c - P[i % 16];
        @(negedge clk); in_valid = 1; in_soft = (m >= 0) ? val(m, i) : 4'd0;
        @(negedge clk); in_valid = 0;
      end
    repeat (4000) @(negedge clk);
    checks++; if (nout != NC * CB) begin failures++; $display("%0d outputs, exp %0d", nout, NC * CB); end
    checks++; if (overflow) begin failures++; $display("fifo overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
