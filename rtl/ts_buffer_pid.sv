// ts_buffer_pid: transport-stream buffer with PID matching.
// Bytes from the outer decoder are captured into a 188-byte packet buffer,
// starting at a byte that carries the sync value 0x47 with in_start. When a
// packet is complete its 13-bit PID (low 5 bits of byte 1, byte 2) is
// compared with NPID programmable PID registers:
//  * a match, on an error-free packet, is moved by the block itself to the
//    SDRAM-side write port (one byte per accepted dma_ready), into a ring
//    buffer [base, base+size) with a wrapping write pointer, without the
//    processor;
//  * otherwise the packet is left in the buffer and irq is raised; the
//    processor reads it through rd_addr/rd_data and clears irq with irq_ack.
//    A second unmatched packet arriving while irq is pending is dropped.
// Two packet buffers alternate, so a packet is captured while the previous
// one is still being moved or read; with both held, new packets are dropped.
// Packets flagged by the Reed-Solomon decoder (in_err) are dropped.
// Register port (processor side): reg_we writes reg_wdata to reg_addr:
// 0..NPID-1 = {enable(bit 13), PID(12:0)}, NPID = ring base, NPID+1 = size.
// Counters: n_match, n_irq, n_drop. The register map, the ring buffer and the
// drop policy are this design's choices.
module ts_buffer_pid #(
  parameter int NPID = 8,
  parameter int AW   = 23            // SDRAM byte address width (64 Mb = 8 MB)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_start,
  input  logic [7:0]    in_byte,
  input  logic          in_err,
  // processor side
  input  logic          reg_we,
  input  logic [3:0]    reg_addr,
  input  logic [31:0]   reg_wdata,
  output logic          irq,
  input  logic          irq_ack,
  input  logic [7:0]    rd_addr,
  output logic [7:0]    rd_data,
  // SDRAM write port
  output logic          dma_valid,
  output logic [AW-1:0] dma_addr,
  output logic [7:0]    dma_data,
  input  logic          dma_ready,
  output logic [15:0]   n_match,
  output logic [15:0]   n_irq,
  output logic [15:0]   n_drop
);
  // two packet buffers: while one is held for the DMA or the processor,
  // the next packet is captured into the other
  typedef enum logic [1:0] {B_FREE, B_CAP, B_DMA, B_CPU} bown_e;
  logic [7:0]  pbuf [2][188];
  bown_e       own [2];
  logic [13:0] pidr [NPID];
  logic [AW-1:0] base, size, wp;
  logic [7:0]  cnt, dcnt;
  logic        csel, dsel, isel, errf, done;
  logic [12:0] pid;
  logic        hit, moving;
  assign pid = {pbuf[csel][1][4:0], pbuf[csel][2]};
  always_comb begin
    hit = 1'b0;
    for (int i = 0; i < NPID; i++) if (pidr[i][13] && pidr[i][12:0] == pid) hit = 1'b1;
  end
  assign moving    = (own[dsel] == B_DMA);
  assign rd_data   = pbuf[isel][rd_addr < 8'd188 ? rd_addr : 8'd0];
  assign dma_valid = moving;
  assign dma_data  = pbuf[dsel][dcnt];
  assign dma_addr  = base + wp;
  assign irq       = (own[isel] == B_CPU);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0; dcnt <= '0; errf <= 1'b0; done <= 1'b0; csel <= 1'b0; dsel <= 1'b0; isel <= 1'b0;
      own[0] <= B_FREE; own[1] <= B_FREE;
      base <= '0; size <= AW'(188 * 64); wp <= '0;
      n_match <= '0; n_irq <= '0; n_drop <= '0;
      for (int i = 0; i < NPID; i++) pidr[i] <= '0;
    end else begin
      done <= 1'b0;
      if (reg_we) begin
        if (reg_addr < 4'(NPID)) pidr[reg_addr[$clog2(NPID)-1:0]] <= reg_wdata[13:0];
        else if (reg_addr == 4'(NPID))     base <= reg_wdata[AW-1:0];
        else if (reg_addr == 4'(NPID + 1)) begin size <= reg_wdata[AW-1:0]; wp <= '0; end
      end
      if (irq_ack && own[isel] == B_CPU) own[isel] <= B_FREE;
      if (in_valid) begin
        if (in_start && in_byte == 8'h47) begin
          // a packet in capture is abandoned if a new sync byte arrives
          if (own[csel] == B_CAP || own[csel] == B_FREE) begin
            own[csel] <= B_CAP; pbuf[csel][0] <= in_byte; cnt <= 8'd1; errf <= in_err;
          end else if (own[~csel] == B_FREE) begin
            csel <= ~csel; own[~csel] <= B_CAP; pbuf[~csel][0] <= in_byte; cnt <= 8'd1; errf <= in_err;
          end else n_drop <= n_drop + 16'd1;
        end else if (own[csel] == B_CAP) begin
          pbuf[csel][cnt] <= in_byte;
          errf <= errf | in_err;
          cnt  <= cnt + 8'd1;
          if (cnt == 8'd187) done <= 1'b1;
        end
      end
      if (done) begin
        if (errf) begin own[csel] <= B_FREE; n_drop <= n_drop + 16'd1; end
        else if (hit) begin own[csel] <= B_DMA; n_match <= n_match + 16'd1; end
        else if (own[isel] == B_CPU) begin own[csel] <= B_FREE; n_drop <= n_drop + 16'd1; end
        else begin own[csel] <= B_CPU; isel <= csel; n_irq <= n_irq + 16'd1; end
        csel <= ~csel;
      end
      // DMA serves a held buffer, one byte per accepted beat
      if (!moving && own[~dsel] == B_DMA) begin dsel <= ~dsel; dcnt <= '0; end
      else if (moving && dma_ready) begin
        wp   <= (wp + 1'b1 == size) ? '0 : wp + 1'b1;
        dcnt <= dcnt + 8'd1;
        if (dcnt == 8'd187) begin own[dsel] <= B_FREE; dcnt <= '0; end
      end
    end
  end
endmodule
