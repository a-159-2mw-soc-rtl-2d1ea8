// tb_ts_buffer_pid: programs two PIDs, then sends TS packets with matching
// PIDs, other PIDs and an errored packet. Checks that matching packets are
// copied byte for byte to consecutive ring-buffer addresses (with wrap),
// that other packets raise irq and can be read back by the processor, that
// packets arriving while irq is pending and errored packets are dropped,
// and the three counters.
module tb_ts_buffer_pid;
  logic clk = 0, rst_n = 0, in_valid = 0, in_start = 0, in_err = 0;
  logic [7:0] in_byte, rd_addr, rd_data, dma_data;
  logic reg_we = 0; logic [3:0] reg_addr = 0; logic [31:0] reg_wdata = 0;
  logic irq, irq_ack = 0, dma_valid, dma_ready = 1; logic [22:0] dma_addr;
  logic [15:0] n_match, n_irq, n_drop;
  int checks = 0, failures = 0;
  byte unsigned dq [$]; int addr_exp;
  byte unsigned last [188];
  ts_buffer_pid dut (.clk, .rst_n, .in_valid, .in_start, .in_byte, .in_err, .reg_we, .reg_addr, .reg_wdata,
    .irq, .irq_ack, .rd_addr, .rd_data, .dma_valid, .dma_addr, .dma_data, .dma_ready, .n_match, .n_irq, .n_drop);
  always #5 clk = ~clk;
  initial begin #100000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) if (rst_n && dma_valid && dma_ready) begin
    byte unsigned e; e = dq.pop_front(); checks++;
    if (dma_data != e || dma_addr != 23'(addr_exp)) begin failures++; if (failures < 10) $display("dma %h @%h exp %h @%h", dma_data, dma_addr, e, addr_exp); end
    addr_exp = (addr_exp + 1 - 'h1000) % 500 + 'h1000;
  end
  task automatic wr(input int a, input int d); @(negedge clk); reg_we = 1; reg_addr = 4'(a); reg_wdata = d; @(negedge clk); reg_we = 0; endtask
  task automatic pkt(input int pid, input bit match, input bit err);
    for (int i = 0; i < 188; i++) begin
      byte unsigned b;
      b = (i == 0) ? 8'h47 : (i == 1) ? 8'(pid >> 8) : (i == 2) ? 8'(pid) : 8'($urandom_range(255));
      last[i] = b;
      if (match && !err) dq.push_back(b);
      @(negedge clk); in_valid = 1; in_start = (i == 0); in_byte = b; in_err = err && (i == 50);
      @(negedge clk); in_valid = 0; in_start = 0; in_err = 0;
    end
    repeat (3) @(negedge clk);
  endtask
  initial begin
    in_byte = 0; rd_addr = 0; addr_exp = 'h1000;
    repeat (2) @(posedge clk); rst_n = 1;
    wr(0, (1 << 13) | 'h100); wr(3, (1 << 13) | 'h1FFF); wr(8, 'h1000); wr(9, 500);
    pkt('h100, 1, 0); pkt('h1FFF, 1, 0);
    checks++; if (irq) begin failures++; $display("irq for matched packets"); end
    pkt('h0, 0, 0);     // PAT: goes to the processor
    checks++; if (!irq) begin failures++; $display("no irq for unmatched packet"); end
    for (int i = 0; i < 188; i++) begin
      @(negedge clk); rd_addr = 8'(i); #1; checks++;
      if (rd_data != last[i]) begin failures++; if (failures < 10) $display("rd %0d got %h exp %h", i, rd_data, last[i]); end
    end
    pkt('h20, 0, 0);    // unmatched while irq is pending: dropped
    @(negedge clk); irq_ack = 1; @(negedge clk); irq_ack = 0;
    checks++; if (irq) begin failures++; $display("irq not cleared"); end
    pkt('h100, 1, 1);   // errored: dropped
    pkt('h100, 1, 0);
    repeat (400) @(negedge clk);
    checks++; if (n_match != 3 || n_irq != 1 || n_drop != 2) begin failures++; $display("counters %0d %0d %0d", n_match, n_irq, n_drop); end
    checks++; if (dq.size() != 0) begin failures++; $display("%0d bytes not moved", dq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
