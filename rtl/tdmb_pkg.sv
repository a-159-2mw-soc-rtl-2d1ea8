// tdmb_pkg: constants and types shared by the T-DMB receiver blocks.
// The sample rates and the outer-code sizes follow the receiver description;
// the DAB transmission-mode-I frame sizes (FFT length, guard, null symbol,
// carriers, CIF size) are the standard's values for the 2.048 MS/s baseband
// rate and are this design's choice of mode.
package tdmb_pkg;
  localparam int FFT_N     = 2048;   // mode I useful symbol length (samples)
  localparam int GUARD_N   = 504;    // mode I guard interval (samples)
  localparam int NULL_N    = 2656;   // mode I null symbol (samples)
  localparam int NCARR     = 1536;   // mode I active carriers
  localparam int NSYM      = 76;     // symbols per frame after the null symbol
  localparam int CIF_BITS  = 55296;  // capacity units * 64 bits
  localparam int TDI_DEPTH = 16;     // 16 CIFs of 24 ms = 384 ms
  localparam int TS_LEN    = 188;
  localparam int RS_N      = 204;
  localparam int RS_K      = 188;
  localparam int RS_T      = 8;

  typedef struct packed {
    logic signed [15:0] re;
    logic signed [15:0] im;
  } cplx16_t;

  typedef enum logic [2:0] {
    SY_IDLE, SY_FRAME, SY_FINE_FREQ, SY_COARSE, SY_TIMING, SY_TRACK
  } sync_state_e;

  // GF(2^8) multiply for p(x) = x^8 + x^4 + x^3 + x^2 + 1
  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r, x;
    r = '0; x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= x;
      x = x[7] ? ((x << 1) ^ 8'h1D) : (x << 1);
    end
    return r;
  endfunction

  // alpha^k, alpha = x (a primitive element for this p(x))
  function automatic logic [7:0] gf_exp(input int unsigned k);
    logic [7:0] r;
    r = 8'h01;
    for (int unsigned i = 0; i < k % 255; i++) r = gf_mul(r, 8'h02);
    return r;
  endfunction

  // multiplicative inverse a^254 (a = 0 gives 0)
  function automatic logic [7:0] gf_inv(input logic [7:0] a);
    logic [7:0] r, x;
    r = 8'h01; x = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, x);   // exponent 254 = 0b11111110
      x = gf_mul(x, x);
    end
    return r;
  endfunction
endpackage
