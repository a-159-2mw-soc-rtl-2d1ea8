// cordic_rotate: combinational CORDIC rotation of a complex sample by an
// angle given as a binary fraction of a full turn (2^PW = one turn).
// Quadrant folding brings the angle into +-45 degrees, then NIT unrolled
// micro-rotations follow. The CORDIC gain (about 1.647) is removed with a
// constant multiply, so |out| equals |in| within rounding.
module cordic_rotate #(
  parameter int DW  = 12,
  parameter int PW  = 16,
  parameter int NIT = 14
) (
  input  logic signed [DW-1:0] in_i,
  input  logic signed [DW-1:0] in_q,
  input  logic        [PW-1:0] phase,
  output logic signed [DW-1:0] out_i,
  output logic signed [DW-1:0] out_q
);
  localparam int XW = DW + 6;   // 2 guard bits for growth, 4 fraction bits
  typedef logic signed [PW-1:0] ang_t [NIT];
  function automatic ang_t mk_atan();
    ang_t t;
    for (int k = 0; k < NIT; k++)
      t[k] = PW'($rtoi($atan(1.0 / (2.0 ** k)) / (2.0 * 3.14159265358979) * (2.0 ** PW) + 0.5));
    return t;
  endfunction
  localparam ang_t ATAN = mk_atan();
  localparam int KSCALE = 19898; // round(0.607253 * 2^15)

  always_comb begin
    logic signed [XW-1:0] x, y, xn;
    logic signed [PW-1:0] z;
    logic signed [XW+15:0] px, py;
    // fold quadrants: rotate by a multiple of 90 degrees first
    unique case (phase[PW-1 -: 2] + {1'b0, phase[PW-3]})
      2'd0: begin x =  XW'(in_i) <<< 4; y =  XW'(in_q) <<< 4; end
      2'd1: begin x = -(XW'(in_q) <<< 4); y =  XW'(in_i) <<< 4; end
      2'd2: begin x = -(XW'(in_i) <<< 4); y = -(XW'(in_q) <<< 4); end
      default: begin x = XW'(in_q) <<< 4; y = -(XW'(in_i) <<< 4); end
    endcase
    z = signed'({2'b00, phase[PW-3:0]});
    if (phase[PW-3]) z = z - signed'(PW'(1) << (PW - 2));
    for (int k = 0; k < NIT; k++) begin
      if (z >= 0) begin xn = x - (y >>> k); y = y + (x >>> k); z = z - ATAN[k]; end
      else        begin xn = x + (y >>> k); y = y - (x >>> k); z = z + ATAN[k]; end
      x = xn;
    end
    px = (XW+16)'(x) * KSCALE;
    py = (XW+16)'(y) * KSCALE;
    out_i = DW'((px + (1 <<< 18)) >>> 19);
    out_q = DW'((py + (1 <<< 18)) >>> 19);
  end
endmodule
