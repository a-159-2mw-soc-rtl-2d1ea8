// time_deinterleaver: DAB time de-interleaver over 16 CIFs (16 x 24 ms =
// 384 ms) using the external PSRAM. The transmitter delays bit i of every
// common interleaved frame (CIF) by P(i mod 16) CIFs, with
// P = 0,8,4,12,2,10,6,14,1,9,5,13,3,11,7,15. While CIF c arrives the block
// rebuilds CIF c-15: its bit i is bit i of the CIF received P(i mod 16)+c-15,
// held in PSRAM slot (c+1+P) mod 16, or, for P = 15, the bit arriving now.
// Memory layout: 16 slots of CIFB/4 words; a 16-bit word holds four
// consecutive 4-bit soft values of one CIF. Per group of four input values
// the block reads up to four words (one per output value, different slots)
// and writes one, so the PSRAM sees 5 accesses per 4 soft values.
// Soft values arrive one per in_valid into a FIFO of FIFO_D entries (the
// demodulator delivers them in bursts). Outputs leave in bit order; out_ok
// goes high once 15 whole CIFs have been stored, before that the outputs
// are not yet meaningful. CIF boundaries are counted from reset.
module time_deinterleaver #(
  parameter int CIFB   = 55296,
  parameter int AW     = 18,
  parameter int FIFO_D = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic signed [3:0] in_soft,
  output logic              out_valid,
  output logic signed [3:0] out_soft,
  output logic              out_ok,
  output logic              overflow,
  // PSRAM port
  output logic              mem_ce_n,
  output logic              mem_we_n,
  output logic              mem_oe_n,
  output logic [AW-1:0]     mem_addr,
  output logic [15:0]       mem_wdata,
  input  logic [15:0]       mem_rdata
);
  localparam int WPC = CIFB / 4;
  localparam int IW  = $clog2(CIFB);
  localparam logic [15:0][3:0] PERM = {4'd15, 4'd7, 4'd11, 4'd3, 4'd13, 4'd5, 4'd9, 4'd1,
                                       4'd14, 4'd6, 4'd10, 4'd2, 4'd12, 4'd4, 4'd8, 4'd0};
  typedef enum logic [1:0] {T_COL, T_RD, T_WR} tst_e;
  tst_e st;
  logic [3:0]      wbuf [4];
  logic [1:0]      j;
  logic [2:0]      k;          // read step 0..4
  logic [IW-1:0]   gbase;      // bit index of the group's first value
  logic [3:0]      cif;        // slot of the CIF being received
  logic [3:0]      ncif;       // CIFs stored, saturating at 15
  logic            pend_byp;   // value read in previous step came from wbuf
  logic [1:0]      pend_j;
  logic            pend;
  logic [3:0]      fq;
  logic            f_empty, f_full, f_rd;

  sync_fifo #(.W(4), .DEPTH(FIFO_D)) u_fifo (
    .clk, .rst_n, .wr_en(in_valid), .wr_data(in_soft), .rd_en(f_rd),
    .rd_data(fq), .empty(f_empty), .full(f_full), .overflow(overflow));
  assign f_rd = (st == T_COL) && !f_empty;

  logic [3:0] p_k, src;
  logic [IW-1:0] bi;
  always_comb begin
    bi  = gbase + IW'(k[1:0]);
    p_k = PERM[bi[3:0]];
    src = cif + 4'd1 + p_k;
    mem_ce_n = 1'b1; mem_we_n = 1'b1; mem_oe_n = 1'b1; mem_addr = '0; mem_wdata = '0;
    if (st == T_RD && k < 3'd4 && p_k != 4'd15) begin
      mem_ce_n = 1'b0; mem_oe_n = 1'b0;
      mem_addr = AW'(src) * AW'(WPC) + AW'(gbase >> 2);
    end
    if (st == T_WR) begin
      mem_ce_n = 1'b0; mem_we_n = 1'b0;
      mem_addr = AW'(cif) * AW'(WPC) + AW'(gbase >> 2);
      mem_wdata = {wbuf[3], wbuf[2], wbuf[1], wbuf[0]};
    end
  end

  always_ff @(posedge clk) begin
    out_valid <= 1'b0;
    if (!rst_n) begin
      st <= T_COL; j <= '0; k <= '0; gbase <= '0; cif <= '0; ncif <= '0;
      pend <= 1'b0; pend_byp <= 1'b0; pend_j <= '0; out_soft <= '0; out_ok <= 1'b0;
      for (int i = 0; i < 4; i++) wbuf[i] <= '0;
    end else begin
      unique case (st)
        T_COL: if (!f_empty) begin
          wbuf[j] <= fq;
          j <= j + 2'd1;
          if (j == 2'd3) begin st <= T_RD; k <= '0; pend <= 1'b0; end
        end
        T_RD: begin
          // capture the value requested in the previous step
          if (pend) begin
            out_valid <= 1'b1;
            out_soft  <= pend_byp ? wbuf[pend_j] : mem_rdata[pend_j*4 +: 4];
          end
          if (k < 3'd4) begin
            pend <= 1'b1; pend_j <= k[1:0]; pend_byp <= (p_k == 4'd15);
            k <= k + 3'd1;
          end else begin
            pend <= 1'b0; st <= T_WR;
          end
        end
        T_WR: begin
          st <= T_COL;
          if (gbase == IW'(CIFB - 4)) begin
            gbase <= '0; cif <= cif + 4'd1;
            if (ncif != 4'd15) ncif <= ncif + 4'd1;
            if (ncif == 4'd14) out_ok <= 1'b1;
          end else gbase <= gbase + IW'(4);
        end
        default: st <= T_COL;
      endcase
    end
  end
endmodule
