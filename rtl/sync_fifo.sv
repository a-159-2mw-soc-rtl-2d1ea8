// sync_fifo: single-clock first-in first-out buffer with show-ahead output.
// Writes while full are dropped and counted in `overflow` (sticky);
// rd_data is valid while !empty and advances on rd_en.
module sync_fifo #(
  parameter int W     = 4,
  parameter int DEPTH = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic         full,
  output logic         overflow
);
  localparam int AW = $clog2(DEPTH);
  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp;
  assign empty   = (wp == rp);
  assign full    = (wp[AW] != rp[AW]) && (wp[AW-1:0] == rp[AW-1:0]);
  assign rd_data = mem[rp[AW-1:0]];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; overflow <= 1'b0;
    end else begin
      if (wr_en) begin
        if (!full) begin mem[wp[AW-1:0]] <= wr_data; wp <= wp + 1'b1; end
        else overflow <= 1'b1;
      end
      if (rd_en && !empty) rp <= rp + 1'b1;
    end
  end
endmodule
