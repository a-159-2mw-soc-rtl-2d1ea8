// descrambler: DAB energy-dispersal descrambler. The data are XORed with the
// pseudo-random sequence of the polynomial x^9 + x^5 + 1, generated by a
// 9-bit shift register loaded with all ones at `restart` (start of each
// logical frame). Per bit: prbs = r[8] ^ r[4]; output = in ^ prbs; the
// register shifts prbs in. The polynomial and the initial word come from
// the DAB standard, not from the receiver description.
// Timing: out_valid/out_bit follow in_valid/in_bit by one clock.
module descrambler (
  input  logic clk,
  input  logic rst_n,
  input  logic restart,
  input  logic in_valid,
  input  logic in_bit,
  output logic out_valid,
  output logic out_bit
);
  logic [8:0] r;
  logic [8:0] rs;
  logic p;
  assign rs = restart ? 9'h1FF : r;
  assign p  = rs[8] ^ rs[4];
  always_ff @(posedge clk) begin
    out_valid <= 1'b0;
    if (!rst_n) begin
      r <= 9'h1FF; out_bit <= 1'b0;
    end else begin
      if (in_valid) begin
        out_valid <= 1'b1;
        out_bit   <= in_bit ^ p;
        r <= {rs[7:0], p};
      end else if (restart) r <= 9'h1FF;
    end
  end
endmodule
