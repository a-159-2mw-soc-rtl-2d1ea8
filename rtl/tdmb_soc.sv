// tdmb_soc: top level of the T-DMB receiver SoC (baseband demodulator and
// channel decoder plus the multimedia blocks built here).
// Clocking: the baseband runs on one master clock `clk` of 49.152 MHz
// (twice the 24.576 MHz reference); the rates of the clock table are clock
// enables from clk_rst_ctrl: 24.576 MHz (FFT), 16.384 MHz (RS decoder),
// 8.192 MHz (ADC sampling strobe adc_sample, down-converter), 4.096 MHz and
// 2.048 MHz (baseband sample rate, produced by the down-converter). The
// multimedia blocks run on `clk_mm` (54 MHz), with 27 and 13.5 MHz enables
// brought out for the processor, SDRAM and display side.
// Baseband chain (all data moves with valid pulses):
//   ADC (10 bit, IF sub-sampled at 8.192 MHz) -> down_converter (fs/4 mix,
//   decimate by 4) -> dco (frequency correction) -> agc -> frame_sync,
//   fine_freq_sync and sync_ctrl (symbol timer, acquisition sequence)
//   -> fft (FFT window of each symbol) -> qpsk_demod (differential QPSK,
//   4-bit soft bits) -> time_deinterleaver (16 CIFs in external PSRAM)
//   -> depuncturer -> viterbi_decoder -> descrambler -> ts_sync (byte and
//   packet alignment) -> conv_deinterleaver -> rs_decoder -> ts_buffer_pid
//   (PID filter, packet buffer, DMA toward SDRAM, interrupt to the host).
// Synchronisation feedback: fine frequency estimates and the coarse
// (integer) estimate of coarse_freq_sync steer the DCO word; fine timing
// (fine_timing_sync with a second fft instance run inverse for the channel
// impulse response) moves the symbol timer. The phase reference symbol
// (PRS) table is outside this block: prs_idx (carrier 0..KC-1, frequencies
// -KC/2..-1, +1..KC/2) is answered combinationally on prs_code.
// Soft bits of the fast information channel (symbols 1..NFIC) are not
// decoded here; the main service channel symbols go to the time
// de-interleaver from the first complete frame after fine timing has
// locked. The code-rate profile (punct_pv, punct_restart) and the logical
// frame length in decoded bits (lf_bits, restarts the energy-dispersal
// sequence) are set by the host, which owns the service organisation.
// Outside this block (ports): RF tuner and ADC, PSRAM, SDRAM controller and
// SDRAM (ts DMA port), MP2 audio decoder (PCM samples in to the I2S
// transmitter), DSP core (mailbox in dsp_if), H.264 command processor,
// prediction, deblocking and display (VLD, inverse transform and
// reconstruction are built and exposed as engines).
// Parameters default to DAB transmission mode I; smaller values are used
// for quick simulation.
module tdmb_soc #(
  parameter int NFFT     = 2048,
  parameter int GUARD    = 504,
  parameter int NULLN    = 2656,
  parameter int NSYM     = 76,
  parameter int KC       = 1536,
  parameter int NFIC     = 3,
  parameter int CIFB     = 55296,
  parameter int QPSK_SH  = 12,
  parameter int CFS_S    = 8,
  parameter int MEM_AW   = 18,
  parameter int TDI_FIFO = 1024,
  parameter int I2S_DIV  = 16
) (
  // clocks and resets
  input  logic                    clk,
  input  logic                    arst_n,
  input  logic                    clk_mm,
  input  logic                    arst_mm_n,
  // ADC
  output logic                    adc_sample,
  input  logic signed [9:0]       adc_data,
  // acquisition control and status
  input  logic                    sync_start,
  output logic [2:0]              sync_state,
  output logic signed [15:0]      dco_fw,
  output logic [15:0]             frame_no,
  output logic [15:0]             agc_gain,
  output logic [15:0]             agc_sat_cnt,
  output logic                    frame_det,
  output logic                    fft_overflow,
  // phase reference table
  output logic [$clog2(KC)-1:0]   prs_idx,
  input  logic [1:0]              prs_code,
  // PSRAM (time de-interleaver memory)
  output logic                    mem_ce_n,
  output logic                    mem_we_n,
  output logic                    mem_oe_n,
  output logic [MEM_AW-1:0]       mem_addr,
  output logic [15:0]             mem_wdata,
  input  logic [15:0]             mem_rdata,
  output logic                    tdi_ok,
  output logic                    tdi_overflow,
  // channel decoder configuration and status
  input  logic [31:0]             punct_pv,
  input  logic                    punct_restart,
  input  logic [23:0]             lf_bits,
  output logic                    ts_locked,
  output logic                    rs_pkt,
  output logic                    rs_pkt_err,
  output logic [3:0]              rs_pkt_nerr,
  // transport stream buffer: host registers, interrupt, DMA to SDRAM
  input  logic                    ts_reg_we,
  input  logic [3:0]              ts_reg_addr,
  input  logic [31:0]             ts_reg_wdata,
  output logic                    ts_irq,
  input  logic                    ts_irq_ack,
  input  logic [7:0]              ts_rd_addr,
  output logic [7:0]              ts_rd_data,
  output logic                    dma_valid,
  output logic [22:0]             dma_addr,
  output logic [7:0]              dma_data,
  input  logic                    dma_ready,
  output logic [15:0]             ts_n_match,
  output logic [15:0]             ts_n_irq,
  output logic [15:0]             ts_n_drop,
  // audio PCM in, I2S out
  input  logic                    aud_valid,
  input  logic [15:0]             aud_left,
  input  logic [15:0]             aud_right,
  output logic                    aud_ready,
  output logic                    i2s_sck,
  output logic                    i2s_ws,
  output logic                    i2s_sd,
  output logic [15:0]             aud_underrun,
  // multimedia side (clk_mm)
  output logic                    ce_27,
  output logic                    ce_13_5,
  input  logic                    mb_we,
  input  logic [22:0]             mb_addr,
  input  logic [15:0]             mb_len,
  output logic                    mb_full,
  output logic                    dsp_irq,
  output logic [22:0]             dsp_addr,
  output logic [15:0]             dsp_len,
  input  logic                    dsp_ack,
  input  logic                    vld_in_valid,
  input  logic [31:0]             vld_in_word,
  output logic                    vld_in_ready,
  input  logic                    vld_cmd_valid,
  input  logic [1:0]              vld_cmd_op,
  input  logic [5:0]              vld_cmd_n,
  output logic                    vld_cmd_ready,
  output logic                    vld_res_valid,
  output logic signed [31:0]      vld_res,
  input  logic                    xf_valid,
  input  logic [1:0]              xf_mode,
  input  logic [5:0]              xf_qp,
  input  logic [255:0]            xf_coef,
  input  logic [127:0]            rc_pred,
  output logic                    rc_valid,
  output logic [127:0]            rc_pix
);
  import tdmb_pkg::*;
  localparam int LN = $clog2(NFFT);
  localparam int LK = $clog2(KC);

  // ---------------------------------------------------------------- clocks
  logic       rst_n, rst_mm_n;
  logic [4:0] ce;
  logic [1:0] ce_mm;
  clk_rst_ctrl #(.NDIV(5), .DIVS({8'd24, 8'd12, 8'd6, 8'd3, 8'd2})) u_crg (
    .clk, .arst_n, .rst_n_o(rst_n), .ce);
  clk_rst_ctrl #(.NDIV(2), .DIVS({8'd4, 8'd2})) u_crg_mm (
    .clk(clk_mm), .arst_n(arst_mm_n), .rst_n_o(rst_mm_n), .ce(ce_mm));
  logic ce24, ce16;
  assign ce24 = ce[0];
  assign ce16 = ce[1];
  assign adc_sample = ce[2];
  assign ce_27   = ce_mm[0];
  assign ce_13_5 = ce_mm[1];

  // ------------------------------------------------------------ front end
  logic               dc_v, dco_v, ag_v;
  logic signed [11:0] dc_i, dc_q, dco_i, dco_q, ag_i, ag_q;
  logic signed [15:0] fw;
  down_converter #(.AW(10)) u_ddc (
    .clk, .rst_n, .in_valid(adc_sample), .adc(adc_data),
    .out_valid(dc_v), .out_i(dc_i), .out_q(dc_q));
  dco #(.DW(12), .PW(24), .FW(16), .NFFT(NFFT)) u_dco (
    .clk, .rst_n, .clear(sync_start), .fw, .in_valid(dc_v), .in_i(dc_i), .in_q(dc_q),
    .out_valid(dco_v), .out_i(dco_i), .out_q(dco_q));
  agc #(.DW(12), .LEN(NFFT), .TARGET(512)) u_agc (
    .clk, .rst_n, .in_valid(dco_v), .in_i(dco_i), .in_q(dco_q),
    .out_valid(ag_v), .out_i(ag_i), .out_q(ag_q), .gain(agc_gain), .sat_cnt(agc_sat_cnt));
  assign dco_fw = fw;

  // ------------------------------------------------------- synchronisation
  logic fs_en, cfs_en, fts_en, sym_start, fft_win, frame_start, in_null;
  logic [15:0] null_len;
  logic [7:0]  sym_idx;
  logic        ffs_v, cfs_v, fts_v;
  logic signed [15:0] ffs_eps;
  logic signed [7:0]  cfs_off;
  logic signed [LN:0] fts_delta;
  sync_state_e state;
  frame_sync #(.DW(12), .WIN(64), .AVG_SH(10), .MIN_NULL(NULLN / 2)) u_fs (
    .clk, .rst_n, .enable(fs_en), .in_valid(ag_v), .in_i(ag_i), .in_q(ag_q),
    .frame_start, .in_null, .null_len);
  fine_freq_sync #(.DW(12), .NFFT(NFFT), .GUARD(GUARD)) u_ffs (
    .clk, .rst_n, .sym_start, .in_valid(ag_v), .in_i(ag_i), .in_q(ag_q),
    .eps_valid(ffs_v), .eps(ffs_eps));
  sync_ctrl #(.NFFT(NFFT), .GUARD(GUARD), .NULLN(NULLN), .NSYM(NSYM)) u_sync (
    .clk, .rst_n, .start(sync_start), .in_valid(ag_v), .frame_start,
    .ffs_valid(ffs_v), .ffs_eps, .cfs_valid(cfs_v), .cfs_off,
    .fts_valid(fts_v), .fts_delta(16'(fts_delta)),
    .state, .fw, .fs_en, .cfs_en, .fts_en, .sym_start, .fft_win, .sym_idx, .frame_no);
  assign sync_state = state;
  assign frame_det  = frame_start;

  // ------------------------------------------------------------------ FFT
  logic               f_v, fo_ovf, cir_fft_ovf;
  logic [LN-1:0]      f_idx;
  logic signed [15:0] f_re, f_im;
  logic [7:0]         f_tag, cir_tag;
  logic               f_busy, cir_busy;
  fft #(.N(NFFT), .DW(16), .TW(16)) u_fft (
    .clk, .rst_n, .ce(ce24), .inverse(1'b0), .in_tag(sym_idx), .in_valid(fft_win),
    .in_re({ag_i, 4'b0}), .in_im({ag_q, 4'b0}),
    .out_valid(f_v), .out_idx(f_idx), .out_re(f_re), .out_im(f_im), .out_tag(f_tag),
    .busy(f_busy), .overflow(fo_ovf));

  // PRS table access: the coarse search while it runs, else the carrier of
  // the bin leaving the FFT (fine timing)
  logic [LK-1:0] cfs_zidx, bin_car;
  logic          bin_act, prs_sym;
  always_comb begin
    bin_act = (f_idx >= LN'(1) && f_idx <= LN'(KC / 2)) || (f_idx >= LN'(NFFT - KC / 2));
    if (f_idx <= LN'(KC / 2)) bin_car = LK'(f_idx + LN'(KC / 2 - 1));
    else                      bin_car = LK'(f_idx - LN'(NFFT - KC / 2));
  end
  assign prs_idx = cfs_en ? cfs_zidx : bin_car;
  assign prs_sym = f_v && (f_tag == 8'd0);

  logic cfs_busy;
  coarse_freq_sync #(.N(NFFT), .KC(KC), .DW(16), .S(CFS_S)) u_cfs (
    .clk, .rst_n, .enable(cfs_en), .in_valid(prs_sym), .in_idx(f_idx), .in_re(f_re), .in_im(f_im),
    .z_idx(cfs_zidx), .z_code(prs_code), .off_valid(cfs_v), .off(cfs_off), .busy(cfs_busy));

  logic               prod_v, cir_v;
  logic signed [15:0] prod_re, prod_im, cir_re, cir_im;
  logic [LN-1:0]      cir_idx;
  fine_timing_sync #(.N(NFFT), .DW(16)) u_fts (
    .clk, .rst_n, .in_valid(prs_sym && fts_en), .in_idx(f_idx), .in_re(f_re), .in_im(f_im),
    .z_code(prs_code), .z_act(bin_act),
    .prod_valid(prod_v), .prod_re, .prod_im,
    .cir_valid(cir_v), .cir_idx, .cir_re, .cir_im,
    .delta_valid(fts_v), .delta(fts_delta));
  fft #(.N(NFFT), .DW(16), .TW(16)) u_fft_cir (
    .clk, .rst_n, .ce(ce24), .inverse(1'b1), .in_tag(8'd0), .in_valid(prod_v),
    .in_re(prod_re), .in_im(prod_im),
    .out_valid(cir_v), .out_idx(cir_idx), .out_re(cir_re), .out_im(cir_im), .out_tag(cir_tag),
    .busy(cir_busy), .overflow(cir_fft_ovf));
  assign fft_overflow = fo_ovf | cir_fft_ovf;

  // ---------------------------------------------------------- demodulator
  logic              q_v, q_done, msc_on, msc_sym;
  logic signed [3:0] q_soft;
  qpsk_demod #(.N(NFFT), .KC(KC), .DW(16), .SH(QPSK_SH)) u_qpsk (
    .clk, .rst_n, .first(f_tag == 8'd0), .in_valid(f_v), .in_idx(f_idx), .in_re(f_re), .in_im(f_im),
    .out_valid(q_v), .soft_o(q_soft), .sym_done(q_done));
  // main service channel symbols only, from the first whole frame in tracking
  assign msc_sym = (f_tag > 8'(NFIC)) && (f_tag < 8'(NSYM));
  always_ff @(posedge clk) begin
    if (!rst_n || sync_start) msc_on <= 1'b0;
    else if (state == SY_TRACK && f_v && f_idx == '0 && f_tag == 8'(NFIC + 1)) msc_on <= 1'b1;
  end

  // ------------------------------------------------------ channel decoder
  logic              tdi_v, tdi_okr, fifo_empty, fifo_full, fifo_ovf, dp_rdy, dp_v;
  logic signed [3:0] tdi_soft;
  logic [3:0]        fifo_q;
  logic [3:0][3:0]   dp_grp;
  time_deinterleaver #(.CIFB(CIFB), .AW(MEM_AW), .FIFO_D(TDI_FIFO)) u_tdi (
    .clk, .rst_n, .in_valid(q_v && msc_sym && msc_on), .in_soft(q_soft),
    .out_valid(tdi_v), .out_soft(tdi_soft), .out_ok(tdi_okr), .overflow(tdi_overflow),
    .mem_ce_n, .mem_we_n, .mem_oe_n, .mem_addr, .mem_wdata, .mem_rdata);
  assign tdi_ok = tdi_okr;
  sync_fifo #(.W(4), .DEPTH(TDI_FIFO)) u_dfifo (
    .clk, .rst_n, .wr_en(tdi_v && tdi_okr), .wr_data(tdi_soft),
    .rd_en(dp_rdy && !fifo_empty), .rd_data(fifo_q),
    .empty(fifo_empty), .full(fifo_full), .overflow(fifo_ovf));
  depuncturer u_dpunct (
    .clk, .rst_n, .restart(punct_restart), .pv(punct_pv),
    .in_valid(!fifo_empty), .in_soft(fifo_q), .in_ready(dp_rdy),
    .out_valid(dp_v), .out_grp(dp_grp));

  logic vit_v, vit_b, ds_v, ds_b;
  logic [23:0] lf_cnt;
  viterbi_decoder #(.TL(128), .MW(12)) u_vit (
    .clk, .rst_n, .in_valid(dp_v), .in_grp(dp_grp), .out_valid(vit_v), .out_bit(vit_b));
  // logical frame counter: the energy-dispersal sequence restarts every
  // lf_bits decoded bits
  always_ff @(posedge clk) begin
    if (!rst_n || punct_restart) lf_cnt <= '0;
    else if (vit_v) lf_cnt <= (lf_cnt == lf_bits - 24'd1) ? '0 : lf_cnt + 24'd1;
  end
  descrambler u_desc (
    .clk, .rst_n, .restart(vit_v && lf_cnt == '0), .in_valid(vit_v), .in_bit(vit_b),
    .out_valid(ds_v), .out_bit(ds_b));

  logic       tb_v, tb_start, cd_v, cd_start;
  logic [7:0] tb_byte, cd_byte;
  logic [15:0] n_lock;
  ts_sync #(.PLEN(204), .SYNC(8'h47)) u_tssync (
    .clk, .rst_n, .in_valid(ds_v), .in_bit(ds_b),
    .out_valid(tb_v), .out_start(tb_start), .out_byte(tb_byte), .locked(ts_locked), .n_lock);
  conv_deinterleaver #(.I(12), .M(17)) u_cdi (
    .clk, .rst_n, .sync(tb_v && tb_start), .in_valid(tb_v), .in_byte(tb_byte),
    .out_valid(cd_v), .out_byte(cd_byte));
  // the de-interleaver delay, 11 * 17 * 12 bytes, is exactly 11 packets, so
  // packet starts keep their place; the start flag follows the one-clock
  // latency
  always_ff @(posedge clk) cd_start <= !rst_n ? 1'b0 : (tb_v && tb_start);

  logic       rs_v, rs_start, rs_err, rs_ovf;
  logic [7:0] rs_byte;
  logic [3:0] rs_nerr;
  rs_decoder #(.N(204), .K(188)) u_rs (
    .clk, .rst_n, .ce(ce16), .in_valid(cd_v), .in_start(cd_start), .in_byte(cd_byte),
    .out_valid(rs_v), .out_start(rs_start), .out_byte(rs_byte), .out_err(rs_err),
    .nerr(rs_nerr), .ovf(rs_ovf));
  assign rs_pkt      = rs_v && rs_start;
  assign rs_pkt_err  = rs_err;
  assign rs_pkt_nerr = rs_nerr;

  ts_buffer_pid #(.NPID(8), .AW(23)) u_tsbuf (
    .clk, .rst_n, .in_valid(rs_v), .in_start(rs_start), .in_byte(rs_byte), .in_err(rs_err),
    .reg_we(ts_reg_we), .reg_addr(ts_reg_addr), .reg_wdata(ts_reg_wdata),
    .irq(ts_irq), .irq_ack(ts_irq_ack), .rd_addr(ts_rd_addr), .rd_data(ts_rd_data),
    .dma_valid, .dma_addr, .dma_data, .dma_ready,
    .n_match(ts_n_match), .n_irq(ts_n_irq), .n_drop(ts_n_drop));

  // ---------------------------------------------------------------- audio
  i2s_tx #(.SW(16), .DIV(I2S_DIV)) u_i2s (
    .clk, .rst_n, .in_valid(aud_valid), .in_left(aud_left), .in_right(aud_right),
    .in_ready(aud_ready), .sck(i2s_sck), .ws(i2s_ws), .sd(i2s_sd), .underrun(aud_underrun));

  // ------------------------------------------------------ multimedia side
  dsp_if #(.AW(23), .DEPTH(4)) u_dspif (
    .clk(clk_mm), .rst_n(rst_mm_n), .up_we(mb_we), .up_addr(mb_addr), .up_len(mb_len),
    .up_full(mb_full), .dsp_irq, .dsp_addr, .dsp_len, .dsp_ack);
  h264_vld u_vld (
    .clk(clk_mm), .rst_n(rst_mm_n), .in_valid(vld_in_valid), .in_word(vld_in_word),
    .in_ready(vld_in_ready), .cmd_valid(vld_cmd_valid), .cmd_op(vld_cmd_op), .cmd_n(vld_cmd_n),
    .cmd_ready(vld_cmd_ready), .res_valid(vld_res_valid), .res(vld_res));
  logic signed [15:0] xc [16];
  logic signed [15:0] xr [16];
  logic [7:0]         pp [16];
  logic [7:0]         px [16];
  logic               xr_v;
  for (genvar g = 0; g < 16; g++) begin : g_flat
    assign xc[g] = xf_coef[16*g +: 16];
    assign pp[g] = rc_pred[8*g +: 8];
    assign rc_pix[8*g +: 8] = px[g];
  end
  h264_transform u_xform (
    .clk(clk_mm), .rst_n(rst_mm_n), .in_valid(xf_valid), .mode(xf_mode), .qp(xf_qp),
    .coef(xc), .out_valid(xr_v), .res(xr));
  h264_recon u_recon (
    .clk(clk_mm), .rst_n(rst_mm_n), .in_valid(xr_v), .pred(pp), .res(xr),
    .out_valid(rc_valid), .pix(px));
endmodule
