// conv_deinterleaver: convolutional (Forney) byte de-interleaver of the
// outer code, I = 12 branches with unit delay M = 17 bytes (the values used
// by T-DMB/DVB; the receiver description gives only the block's function).
// Byte n goes through branch n mod 12; branch j delays by (I-1-j)*M bytes,
// so together with the interleaver's j*M every byte sees (I-1)*M*I bytes of
// delay. The branch FIFOs share one RAM of M*I*(I-1)/2 = 1122 bytes: branch
// j owns a region of (I-1-j)*M bytes, and a read-then-write at the branch's
// pointer implements its delay line. `sync` forces the next byte onto
// branch 0 (TS sync bytes travel through branch 0).
// Timing: out_valid/out_byte follow in_valid by one clock. Memory starts
// cleared, so the first (I-1)*M*I outputs are zeros.
module conv_deinterleaver #(
  parameter int I = 12,
  parameter int M = 17
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sync,
  input  logic       in_valid,
  input  logic [7:0] in_byte,
  output logic       out_valid,
  output logic [7:0] out_byte
);
  localparam int TOT = M * I * (I - 1) / 2;
  localparam int AW  = $clog2(TOT);
  localparam int PW  = $clog2(M * (I - 1) + 1);
  logic [7:0]    mem [TOT];
  logic [PW-1:0] ptr [I];
  logic [$clog2(I)-1:0] br, b;
  logic [AW-1:0] base, a;
  logic [PW-1:0] len;
  always_comb begin
    b    = sync ? '0 : br;
    len  = PW'((I - 1 - int'(b)) * M);
    base = '0;
    for (int i = 0; i < I; i++) if (i < int'(b)) base = base + AW'((I - 1 - i) * M);
    a    = base + AW'(ptr[b]);
  end
  always_ff @(posedge clk) begin
    out_valid <= 1'b0;
    if (!rst_n) begin
      br <= '0; out_byte <= '0;
      for (int i = 0; i < I; i++) ptr[i] <= '0;
      for (int i = 0; i < TOT; i++) mem[i] <= '0;
    end else if (in_valid) begin
      out_valid <= 1'b1;
      if (len == '0) out_byte <= in_byte;
      else begin
        out_byte <= mem[a];
        mem[a]   <= in_byte;
        ptr[b]   <= (ptr[b] == len - 1'b1) ? '0 : ptr[b] + 1'b1;
      end
      br <= (b == ($clog2(I))'(I - 1)) ? '0 : b + 1'b1;
    end
  end
endmodule
