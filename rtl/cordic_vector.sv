// cordic_vector: combinational CORDIC in vectoring mode. Returns the angle
// of (x, y) as a signed binary fraction of a full turn (2^PW = one turn,
// so the range is -1/2..1/2 turn). Left-half-plane inputs are first turned
// by 180 degrees, then NIT micro-rotations drive y to zero.
module cordic_vector #(
  parameter int DW  = 24,
  parameter int PW  = 16,
  parameter int NIT = 16
) (
  input  logic signed [DW-1:0] x,
  input  logic signed [DW-1:0] y,
  output logic signed [PW-1:0] angle
);
  typedef logic signed [PW-1:0] ang_t [NIT];
  function automatic ang_t mk_atan();
    ang_t t;
    for (int k = 0; k < NIT; k++)
      t[k] = PW'($rtoi($atan(1.0 / (2.0 ** k)) / (2.0 * 3.14159265358979) * (2.0 ** PW) + 0.5));
    return t;
  endfunction
  localparam ang_t ATAN = mk_atan();
  always_comb begin
    logic signed [DW+1:0] cx, cy, nx;
    logic signed [PW-1:0] z;
    if (x < 0) begin cx = -(DW+2)'(x); cy = -(DW+2)'(y); z = signed'(PW'(1) << (PW-1)); end
    else       begin cx =  (DW+2)'(x); cy =  (DW+2)'(y); z = '0; end
    for (int k = 0; k < NIT; k++) begin
      if (cy >= 0) begin nx = cx + (cy >>> k); cy = cy - (cx >>> k); z = z + ATAN[k]; end
      else         begin nx = cx - (cy >>> k); cy = cy + (cx >>> k); z = z - ATAN[k]; end
      cx = nx;
    end
    angle = z;
  end
endmodule
