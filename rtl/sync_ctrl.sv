// sync_ctrl: synchronisation sequencer and symbol timer.
// Initial acquisition runs in the order the algorithms depend on each other:
//   1. frame sync, once, for the first frame (SY_FRAME);
//   2. fine frequency sync for every symbol from then on (SY_FINE_FREQ);
//   3. coarse (integer) frequency sync, only in the third frame (SY_COARSE);
//   4. fine timing sync, last (SY_TIMING; this design runs it in frame 4);
// then tracking (SY_TRACK): fine frequency per symbol corrects frequency
// drift and fine timing per frame corrects timing drift.
// Symbol timer: after frame_start the frame is NULLN null samples followed
// by NSYM symbols of GUARD+NFFT samples; frame_start (from the frame
// synchroniser) means that the next sample is the first one of symbol 0. The timer then free-runs frame by frame.
// sym_start marks the first sample of each symbol, fft_win the NFFT samples
// after its guard. A fine-timing result delta delays (or advances) the next
// frame by delta samples. Frequency: the DCO word fw integrates the fine
// estimates (fw += eps, units 2^-10 spacing) and jumps by 1024 per integer
// spacing from the coarse estimate.
module sync_ctrl
  import tdmb_pkg::*;
#(
  parameter int NFFT  = 2048,
  parameter int GUARD = 504,
  parameter int NULLN = 2656,
  parameter int NSYM  = 76
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               in_valid,
  input  logic               frame_start,
  input  logic               ffs_valid,
  input  logic signed [15:0] ffs_eps,
  input  logic               cfs_valid,
  input  logic signed [7:0]  cfs_off,
  input  logic               fts_valid,
  input  logic signed [15:0] fts_delta,
  output sync_state_e        state,
  output logic signed [15:0] fw,
  output logic               fs_en,
  output logic               cfs_en,
  output logic               fts_en,
  output logic               sym_start,
  output logic               fft_win,
  output logic [7:0]         sym_idx,
  output logic [15:0]        frame_no
);
  localparam int SYM  = GUARD + NFFT;
  localparam int FLEN = NULLN + NSYM * SYM;
  localparam int CW   = $clog2(FLEN) + 2;
  logic signed [CW-1:0] pos;       // position inside the frame body
  logic [$clog2(SYM)-1:0] spos;
  logic running;
  logic signed [15:0] tadj;

  assign fs_en  = (state == SY_FRAME);
  assign cfs_en = (state == SY_COARSE);
  assign fts_en = (state == SY_TIMING) || (state == SY_TRACK);
  assign sym_start = running && in_valid && pos >= 0 && pos < CW'(NSYM * SYM) && spos == '0;
  assign fft_win   = running && in_valid && pos >= 0 && pos < CW'(NSYM * SYM) && spos >= ($clog2(SYM))'(GUARD);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= SY_IDLE; fw <= '0; pos <= '0; spos <= '0; sym_idx <= '0;
      frame_no <= '0; running <= 1'b0; tadj <= '0;
    end else begin
      if (ffs_valid && state != SY_IDLE && state != SY_FRAME) fw <= fw + ffs_eps;
      if (cfs_valid && state == SY_COARSE) begin
        fw <= fw + 16'(signed'(cfs_off) * 1024);
        state <= SY_TIMING;
      end
      if (fts_valid && fts_en) begin
        tadj <= fts_delta;
        if (state == SY_TIMING) state <= SY_TRACK;
      end
      unique case (state)
        SY_IDLE:  if (start) state <= SY_FRAME;
        SY_FRAME: if (frame_start) begin
          state <= SY_FINE_FREQ; running <= 1'b1; frame_no <= 16'd1;
          pos <= '0; spos <= '0; sym_idx <= '0;
        end
        default: ;
      endcase
      if (running && in_valid && !(state == SY_FRAME && frame_start)) begin
        if (pos >= 0 && pos < CW'(NSYM * SYM)) begin
          if (spos == ($clog2(SYM))'(SYM - 1)) begin spos <= '0; sym_idx <= sym_idx + 8'd1; end
          else spos <= spos + 1'b1;
        end
        if (pos == CW'(FLEN - 1)) begin
          // end of the null symbol: next frame body, moved by the timing offset
          pos  <= -CW'(tadj);
          spos <= (tadj < 0) ? ($clog2(SYM))'(-tadj) : '0;
          tadj <= '0;
          sym_idx <= '0;
          frame_no <= frame_no + 16'd1;
          if (state == SY_FINE_FREQ && frame_no == 16'd2) state <= SY_COARSE;
        end else pos <= pos + 1'b1;
      end
    end
  end
endmodule
