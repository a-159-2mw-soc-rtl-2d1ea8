// ts_sync: bit-to-byte packing and transport-packet alignment in front of
// the outer de-interleaver. The decoded, de-scrambled bit stream has no byte
// marks, so the block searches it for the sync byte SYNC (MSB first) at
// every bit position at once: a table with one small counter per bit
// position of a packet (PLEN*8 entries) counts how many times in a row SYNC
// ended at that position, packet after packet. When a counter reaches
// CONFIRM the block locks there, packs the following bits into bytes and
// keeps checking that SYNC comes back every PLEN bytes; MISS_MAX missing
// sync bytes in a row drop the lock and the search starts again.
// Sync bytes pass through the convolutional interleaver undelayed, which is
// why they can be searched before de-interleaving.
// Outputs: out_valid/out_byte, one byte per eight in_valid bits while
// locked, out_start on each sync byte (the first output is the sync byte
// that completed the lock). n_lock counts lock events.
// Timing: outputs are registered, one clock after the byte's last bit.
module ts_sync #(
  parameter int         PLEN     = 204,
  parameter logic [7:0] SYNC     = 8'h47,
  parameter int         MISS_MAX = 3,
  parameter int         CONFIRM  = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_bit,
  output logic       out_valid,
  output logic       out_start,
  output logic [7:0] out_byte,
  output logic       locked,
  output logic [15:0] n_lock
);
  localparam int PB = PLEN * 8;
  localparam int PW = $clog2(PB);
  typedef enum logic {T_HUNT, T_LOCK} tst_e;
  tst_e st;
  logic [6:0] sh;
  logic [7:0] nsh;
  logic [2:0] bcnt;
  logic [$clog2(PLEN)-1:0] byte_no;
  logic [$clog2(MISS_MAX+1)-1:0] miss;
  logic [1:0] hist [PB];          // consecutive sync hits per bit position
  logic [PW-1:0] ptr;
  logic wrapped;                  // table holds one full packet of history
  logic [1:0] h;
  assign nsh = {sh, in_bit};
  assign locked = (st == T_LOCK);
  assign h = wrapped ? hist[ptr] : 2'd0;

  always_ff @(posedge clk) begin
    out_valid <= 1'b0; out_start <= 1'b0;
    if (!rst_n) begin
      st <= T_HUNT; sh <= '0; bcnt <= '0; byte_no <= '0; miss <= '0;
      out_byte <= '0; n_lock <= '0; ptr <= '0; wrapped <= 1'b0;
    end else if (in_valid) begin
      sh <= nsh[6:0];
      ptr <= (ptr == PW'(PB - 1)) ? '0 : ptr + 1'b1;
      if (ptr == PW'(PB - 1)) wrapped <= 1'b1;
      hist[ptr] <= (nsh == SYNC) ? ((h == 2'd3) ? h : h + 2'd1) : 2'd0;
      unique case (st)
        T_HUNT: if (nsh == SYNC && 32'(h) + 1 >= CONFIRM) begin
          st <= T_LOCK; bcnt <= '0; byte_no <= '0; miss <= '0;
          n_lock <= n_lock + 1'b1;
          out_valid <= 1'b1; out_byte <= nsh; out_start <= 1'b1;
        end
        default: begin
          bcnt <= bcnt + 1'b1;
          if (bcnt == 3'd7) begin
            // a complete byte; byte_no counts bytes since the last sync byte
            byte_no <= (byte_no == ($clog2(PLEN))'(PLEN - 1)) ? '0 : byte_no + 1'b1;
            out_valid <= 1'b1;
            out_byte  <= nsh;
            out_start <= (byte_no == ($clog2(PLEN))'(PLEN - 1));
            if (byte_no == ($clog2(PLEN))'(PLEN - 1)) begin
              if (nsh == SYNC) miss <= '0;
              else if (miss == ($clog2(MISS_MAX+1))'(MISS_MAX - 1)) st <= T_HUNT;
              else miss <= miss + 1'b1;
            end
          end
        end
      endcase
    end
  end
endmodule
