// dsp_if: DSP interface unit between the microprocessor and the audio DSP.
// The processor announces each audio elementary-stream frame stored in
// SDRAM by writing its start address and length; the DSP polls or takes an
// interrupt, reads the descriptor and acknowledges it once it has fetched
// the data. Descriptors wait in a FIFO of DEPTH entries so the processor
// need not wait for the DSP. Processor side: up_we with up_addr/up_len
// pushes a descriptor (up_full shows the FIFO is full). DSP side: dsp_irq
// is high while a descriptor is waiting, dsp_addr/dsp_len show the oldest,
// dsp_ack pops it. The mailbox form is this design's choice.
module dsp_if #(
  parameter int AW    = 23,
  parameter int DEPTH = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          up_we,
  input  logic [AW-1:0] up_addr,
  input  logic [15:0]   up_len,
  output logic          up_full,
  output logic          dsp_irq,
  output logic [AW-1:0] dsp_addr,
  output logic [15:0]   dsp_len,
  input  logic          dsp_ack
);
  logic empty, ovf;
  sync_fifo #(.W(AW + 16), .DEPTH(DEPTH)) u_q (
    .clk, .rst_n, .wr_en(up_we), .wr_data({up_addr, up_len}), .rd_en(dsp_ack),
    .rd_data({dsp_addr, dsp_len}), .empty(empty), .full(up_full), .overflow(ovf));
  assign dsp_irq = !empty;
endmodule
