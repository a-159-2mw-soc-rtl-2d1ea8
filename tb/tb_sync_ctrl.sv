// tb_sync_ctrl: runs the acquisition sequence with a small frame (NFFT=16,
// GUARD=4, NULLN=8, NSYM=4) and checks: frame sync only before the first
// frame; the state order FRAME -> FINE_FREQ -> COARSE (third frame) ->
// TIMING -> TRACK; NSYM symbol starts and NSYM*NFFT FFT-window samples per
// frame; the frame period; fw integrating fine estimates and adding 1024 per
// coarse spacing; a fine-timing result moving the next frame by delta.
module tb_sync_ctrl;
  import tdmb_pkg::*;
  localparam int NF = 16, G = 4, NL = 8, NS = 4, SYM = NF + G, FL = NL + NS * SYM;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, frame_start = 0;
  logic ffs_valid = 0, cfs_valid = 0, fts_valid = 0;
  logic signed [15:0] ffs_eps = 0, fts_delta = 0; logic signed [7:0] cfs_off = 0;
  sync_state_e state; logic signed [15:0] fw;
  logic fs_en, cfs_en, fts_en, sym_start, fft_win; logic [7:0] sym_idx; logic [15:0] frame_no;
  int checks = 0, failures = 0;
  int nsym, nwin, n, first_sym [$];
  sync_ctrl #(.NFFT(NF), .GUARD(G), .NULLN(NL), .NSYM(NS)) dut (.clk, .rst_n, .start, .in_valid, .frame_start,
    .ffs_valid, .ffs_eps, .cfs_valid, .cfs_off, .fts_valid, .fts_delta, .state, .fw, .fs_en, .cfs_en, .fts_en,
    .sym_start, .fft_win, .sym_idx, .frame_no);
  always #5 clk = ~clk;
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(input bit c, input string m); checks++; if (!c) begin failures++; $display("FAIL: %s (state %s fw %0d)", m, state.name(), fw); end endtask
  // one sample per call; counts symbol starts and window samples
  task automatic samp(input bit fs = 0);
    @(negedge clk); in_valid = 1; frame_start = fs;
    #1; if (sym_start) begin nsym++; if (sym_idx == 0) first_sym.push_back(n); end
    if (fft_win) nwin++;
    n++;
    @(negedge clk); in_valid = 0; frame_start = 0;
  endtask
  task automatic pulse_ffs(input int e); @(negedge clk); ffs_valid = 1; ffs_eps = 16'(e); @(negedge clk); ffs_valid = 0; endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    chk(state == SY_IDLE, "idle after reset");
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    chk(state == SY_FRAME && fs_en, "frame sync enabled");
    n = 0; nsym = 0; nwin = 0;
    repeat (5) samp();
    chk(state == SY_FRAME, "waits for frame start");
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;  // next sample starts symbol 0
    chk(state == SY_FINE_FREQ && !fs_en, "fine frequency after frame sync");
    nsym = 0; nwin = 0;
    repeat (FL) samp();
    chk(nsym == NS, $sformatf("symbols per frame %0d", nsym));
    chk(nwin == NS * NF, $sformatf("window samples per frame %0d", nwin));
    pulse_ffs(10); pulse_ffs(-4);
    chk(fw == 6, "fw integrates fine estimates");
    chk(frame_no == 2, "frame 2");
    repeat (FL) samp();
    chk(state == SY_COARSE && cfs_en, "coarse sync in third frame");
    @(negedge clk); cfs_valid = 1; cfs_off = -3; @(negedge clk); cfs_valid = 0;
    chk(fw == 6 - 3 * 1024, "coarse offset applied");
    chk(state == SY_TIMING && fts_en, "fine timing after coarse");
    @(negedge clk); fts_valid = 1; fts_delta = 3; @(negedge clk); fts_valid = 0;
    chk(state == SY_TRACK, "tracking after fine timing");
    first_sym.delete();
    repeat (3 * FL + 10) samp();
    chk(first_sym.size() >= 2, "frames seen in tracking");
    if (first_sym.size() >= 3) begin
      chk(first_sym[1] - first_sym[0] == FL + 3 || first_sym[2] - first_sym[1] == FL + 3, "timing offset delays one frame by delta");
      chk(first_sym[2] - first_sym[1] == FL || first_sym[1] - first_sym[0] == FL, "frame period restored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
