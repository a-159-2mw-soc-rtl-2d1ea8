// psram: behavioural model of the 4 Mb pseudo-SRAM die stacked on the chip
// and used as the time de-interleaving memory. Organised as 256K x 16.
// The real part is an asynchronous SRAM-like device; this model presents it
// as a synchronous port clocked by the controller: with ce_n low, we_n low
// writes dq_i to addr, and oe_n low returns mem[addr] on dq_o one clock
// later. Refresh is hidden inside a pseudo-SRAM and is not modelled.
// Contents start at zero.
module psram #(
  parameter int AW = 18,
  parameter int DW = 16
) (
  input  logic          clk,
  input  logic          ce_n,
  input  logic          we_n,
  input  logic          oe_n,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] dq_i,
  output logic [DW-1:0] dq_o
);
  logic [DW-1:0] mem [2**AW];
  initial for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  always_ff @(posedge clk) begin
    if (!ce_n && !we_n) mem[addr] <= dq_i;
    if (!ce_n && !oe_n && we_n) dq_o <= mem[addr];
  end
endmodule
