// i2s_tx: I2S transmitter to the external audio DAC. Stereo samples of SW
// bits are shifted out MSB first on sd, changing on the falling edge of
// sck; ws is low for the left and high for the right channel and changes one
// sck period before the MSB of its word (standard I2S framing). Each word
// slot is SW bit clocks, so a frame is 2*SW sck periods. sck runs at
// clk / (2*DIV). A sample pair is taken on in_valid && in_ready; in_ready is
// high while the holding register is empty. If no new pair is ready at the
// start of a frame the last pair is repeated (underrun counted).
module i2s_tx #(
  parameter int SW  = 16,
  parameter int DIV = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [SW-1:0] in_left,
  input  logic [SW-1:0] in_right,
  output logic          in_ready,
  output logic          sck,
  output logic          ws,
  output logic          sd,
  output logic [15:0]   underrun
);
  localparam int BW = $clog2(2 * SW);
  logic [$clog2(DIV)-1:0] dc;
  logic [BW-1:0] bitn;          // bit position in the frame, advanced at sck fall
  logic [2*SW-1:0] sh, hold;
  logic full, fall;
  assign in_ready = !full;
  assign fall = sck && (dc == ($clog2(DIV))'(DIV - 1));
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dc <= '0; sck <= 1'b0; bitn <= BW'(2 * SW - 2); ws <= 1'b1; sd <= 1'b0;
      sh <= '0; hold <= '0; full <= 1'b0; underrun <= '0;
    end else begin
      if (in_valid && !full) begin hold <= {in_left, in_right}; full <= 1'b1; end
      dc <= (dc == ($clog2(DIV))'(DIV - 1)) ? '0 : dc + 1'b1;
      if (dc == ($clog2(DIV))'(DIV - 1)) sck <= ~sck;
      if (fall) begin
        logic [BW-1:0] nb;
        nb = (bitn == BW'(2 * SW - 1)) ? '0 : bitn + 1'b1;
        bitn <= nb;
        // ws leads the data by one bit: it shows the channel of the next bit
        ws <= (nb == BW'(2 * SW - 1)) ? 1'b0 : ((nb >= BW'(SW - 1)) ? 1'b1 : 1'b0);
        if (nb == '0) begin
          if (full || (in_valid && !full)) begin
            logic [2*SW-1:0] w;
            w = full ? hold : {in_left, in_right};
            sd <= w[2*SW-1]; sh <= {w[2*SW-2:0], 1'b0};
            full <= 1'b0;
          end else begin
            underrun <= underrun + 16'd1;
            sd <= hold[2*SW-1]; sh <= {hold[2*SW-2:0], 1'b0};
          end
        end else begin
          sd <= sh[2*SW-1]; sh <= {sh[2*SW-2:0], 1'b0};
        end
      end
    end
  end
endmodule
