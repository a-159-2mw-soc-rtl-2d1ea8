// clk_rst_ctrl: clock-enable and reset generator for one clock group.
// The receiver's functional blocks run at the rates of the clock-domain
// table (2.048, 4.096, 8.192, 16.384 and 24.576 MHz from the baseband
// oscillator; 27 and 13.5 MHz from the 54 MHz multimedia oscillator).
// Because 16.384 MHz is not an integer division of 24.576 MHz, this design
// assumes a master clock at twice the oscillator (49.152 MHz) from the PLL
// and produces every rate as a one-cycle clock-enable strobe at master/DIVS[i].
// All strobes are phase aligned: every strobe fires on the cycle after reset
// release and then every DIVS[i] cycles. rst_n_o is the asynchronously
// asserted, synchronously released (two-flop) reset.
module clk_rst_ctrl #(
  parameter int NDIV = 5,
  parameter logic [NDIV-1:0][7:0] DIVS = {8'd24, 8'd12, 8'd6, 8'd3, 8'd2}
) (
  input  logic            clk,
  input  logic            arst_n,
  output logic            rst_n_o,
  output logic [NDIV-1:0] ce
);
  logic [1:0] sync;
  always_ff @(posedge clk or negedge arst_n)
    if (!arst_n) sync <= '0;
    else         sync <= {sync[0], 1'b1};
  assign rst_n_o = sync[1];

  for (genvar g = 0; g < NDIV; g++) begin : g_div
    logic [7:0] cnt;
    always_ff @(posedge clk)
      if (!rst_n_o)                cnt <= '0;
      else if (cnt == DIVS[g] - 1) cnt <= '0;
      else                         cnt <= cnt + 8'd1;
    assign ce[g] = rst_n_o && (cnt == 8'd0);
  end
endmodule
