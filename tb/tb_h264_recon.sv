// tb_h264_recon: random predictions and residuals (including ones that
// under- and overflow) must give pred + res clipped to 0..255.
module tb_h264_recon;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [7:0] pred [16], pix [16]; logic signed [15:0] res [16];
  int checks = 0, failures = 0;
  h264_recon dut (.clk, .rst_n, .in_valid, .pred, .res, .out_valid, .pix);
  always #5 clk = ~clk;
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int e [16];
      for (int i = 0; i < 16; i++) begin
        pred[i] = 8'($urandom_range(255)); res[i] = 16'($signed($urandom_range(700)) - 350);
        e[i] = int'(pred[i]) + int'(res[i]);
        e[i] = e[i] < 0 ? 0 : e[i] > 255 ? 255 : e[i];
      end
      @(negedge clk); in_valid = 1; @(negedge clk); in_valid = 0;
      for (int i = 0; i < 16; i++) begin
        checks++; if (!out_valid || pix[i] != 8'(e[i])) begin failures++; if (failures < 10) $display("got %0d exp %0d", pix[i], e[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
