// h264_recon: picture reconstruction of one 4x4 block. Adds the residual
// from the transform block to the intra or inter prediction and clips every
// sample to 0..255. Registered: out_valid follows in_valid by one clock.
// The block is named in the H.264 core's block diagram; adding and clipping
// is the standard's reconstruction rule.
module h264_recon (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [7:0]         pred [16],
  input  logic signed [15:0] res  [16],
  output logic               out_valid,
  output logic [7:0]         pix  [16]
);
  always_ff @(posedge clk) begin
    out_valid <= 1'b0;
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) pix[i] <= '0;
    end else if (in_valid) begin
      out_valid <= 1'b1;
      for (int i = 0; i < 16; i++) begin
        logic signed [16:0] s;
        s = 17'(signed'({1'b0, pred[i]})) + 17'(res[i]);
        pix[i] <= (s < 0) ? 8'd0 : (s > 255) ? 8'd255 : 8'(s);
      end
    end
  end
endmodule
