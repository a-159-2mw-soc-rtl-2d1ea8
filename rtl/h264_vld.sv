// h264_vld: bit-stream reader of the H.264 variable-length decoder for the
// syntax elements outside the residual data: fixed-length codes u(n) and
// exp-Golomb codes ue(v) and se(v). The bit stream enters as 32-bit words
// (first bit = MSB) into a 64-bit window. A command (cmd_valid, cmd_op,
// cmd_n) is executed once enough bits are buffered:
//   OP_U : value = next n bits (n = 1..32)
//   OP_UE: z leading zeros, a one, then z bits: value = 2^z - 1 + bits
//   OP_SE: k = ue; value = (k+1)/2 for odd k, -k/2 for even k
// The result appears on res_valid/res one clock after the command is taken
// (cmd_ready high). Codes up to 16 leading zeros are supported.
// Only this part of the VLD is built; the CAVLC residual tables are not.
module h264_vld (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [31:0]        in_word,
  output logic               in_ready,
  input  logic               cmd_valid,
  input  logic [1:0]         cmd_op,
  input  logic [5:0]         cmd_n,
  output logic               cmd_ready,
  output logic               res_valid,
  output logic signed [31:0] res
);
  localparam logic [1:0] OP_U = 2'd0, OP_UE = 2'd1, OP_SE = 2'd2;
  logic [63:0] win;     // valid bits are left aligned
  logic [6:0]  nb;      // number of valid bits
  logic [4:0]  lz;
  logic [6:0]  need;
  logic [31:0] ue;
  always_comb begin
    lz = 5'd16;
    for (int i = 16; i >= 0; i--) if (win[63 - i]) lz = 5'(i);
    if (lz > 5'd16) lz = 5'd16;
    need = (cmd_op == OP_U) ? 7'(cmd_n) : 7'(2 * lz + 1);
    ue = ((32'd1 << lz) - 32'd1) + 32'((win << (lz + 1)) >> (64 - 32'(lz)));
    if (lz == 5'd0) ue = 32'd0;
  end
  assign cmd_ready = cmd_valid && (nb >= need) && (cmd_op != OP_UE || lz < 5'd16 || nb >= 7'd33)
                     && (cmd_op != OP_SE || lz < 5'd16 || nb >= 7'd33);
  assign in_ready  = (nb <= 7'd32) && !cmd_ready;
  always_ff @(posedge clk) begin
    res_valid <= 1'b0;
    if (!rst_n) begin
      win <= '0; nb <= '0; res <= '0;
    end else if (cmd_ready) begin
      res_valid <= 1'b1;
      unique case (cmd_op)
        OP_U:    res <= 32'(win >> (64 - 32'(cmd_n)));
        OP_UE:   res <= ue;
        default: res <= ue[0] ? 32'((ue + 32'd1) >> 1) : -32'(ue >> 1);
      endcase
      win <= win << need;
      nb  <= nb - need;
    end else if (in_valid && in_ready) begin
      win <= win | (64'(in_word) << (32 - 32'(nb)));
      nb  <= nb + 7'd32;
    end
  end
endmodule
