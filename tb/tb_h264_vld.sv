// tb_h264_vld: writes a random sequence of u(n), ue(v) and se(v) syntax
// elements into a bit stream with its own encoder (ue: z zeros then k+1 in
// z+1 bits; se: k = 2v-1 for v > 0, -2v otherwise), feeds it in 32-bit
// words and checks that the decoder returns every value in order.
module tb_h264_vld;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, cmd_valid = 0, cmd_ready, res_valid;
  logic [31:0] in_word; logic [1:0] cmd_op; logic [5:0] cmd_n; logic signed [31:0] res;
  int checks = 0, failures = 0;
  bit bits [$]; int ops [$], ns [$], vals [$];
  int wi = 0;
  h264_vld dut (.clk, .rst_n, .in_valid, .in_word, .in_ready, .cmd_valid, .cmd_op, .cmd_n, .cmd_ready, .res_valid, .res);
  always #5 clk = ~clk;
  initial begin #100000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic put(input longint unsigned v, input int n); for (int i = n - 1; i >= 0; i--) bits.push_back(v[i]); endtask
  task automatic put_ue(input int k);
    int z; z = 0; while ((longint'(k) + 1) >> (z + 1) != 0) z++;
    put(0, z); put(longint'(k) + 1, z + 1);
  endtask
  // word feeder
  always @(negedge clk) begin
    in_valid = 0;
    if (rst_n && in_ready && wi * 32 < bits.size()) begin
      for (int b = 0; b < 32; b++) in_word[31 - b] = (wi * 32 + b < bits.size()) ? bits[wi * 32 + b] : 1'b0;
      in_valid = 1; wi++;
    end
  end
  initial begin
    for (int i = 0; i < 300; i++) begin
      int op, v, n;
      op = $urandom_range(2);
      if (op == 0) begin n = $urandom_range(1, 32); v = int'($urandom) & int'((64'd1 << n) - 1); put(longint'(unsigned'(v)), n); end
      else if (op == 1) begin n = 0; v = ($urandom_range(3) == 0) ? int'($urandom_range(60000)) : int'($urandom_range(20)); put_ue(v); end
      else begin n = 0; v = $signed($urandom_range(400)) - 200; put_ue(v > 0 ? 2 * v - 1 : -2 * v); end
      ops.push_back(op); ns.push_back(n); vals.push_back(v);
    end
    put(32'hFFFFFFFF, 64);   // padding
    repeat (2) @(posedge clk); rst_n = 1;
    foreach (ops[i]) begin
      @(negedge clk); #1; cmd_valid = 1; cmd_op = 2'(ops[i]); cmd_n = 6'(ns[i]);
      do @(posedge clk); while (!cmd_ready);
      @(negedge clk); cmd_valid = 0;
      checks++;
      if (!res_valid || res != vals[i]) begin failures++; if (failures < 10) $display("item %0d op %0d got %0d exp %0d", i, ops[i], res, vals[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
