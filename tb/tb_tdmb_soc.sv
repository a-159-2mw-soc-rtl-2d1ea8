// tb_tdmb_soc: end-to-end test of the receiver SoC at reduced OFDM sizes
// (256-point FFT, 192 carriers, 12 symbols per frame, CIF of 768 bits). A behavioural transmitter sends transport
// packets through the whole DAB chain with a carrier offset of 2.3
// subcarrier spacings and a start in the middle of a frame; a PSRAM model
// holds the time de-interleaver data.
// The test follows acquisition (frame sync, fine frequency, coarse
// frequency in frame 3, fine timing, tracking) and the data path to the
// DMA port: every packet written to SDRAM is checked byte by byte against
// the packet formula, and packets of the second PID are taken from the
// processor buffer after an interrupt. Alongside, the multimedia engines
// are exercised: DSP mailbox, I2S output, VLD, inverse transform and
// reconstruction. Each mechanism is counted; one that never happened is a
// failure.
module tb_tdmb_soc;
  localparam int NFFT = 256, GUARD = 64, NULLN = 320, NSYM = 12, KC = 192, NFIC = 3;
  localparam int CIFB = 768, CI_M = 17, MEM_AW = 12;
  localparam int PID_A = 'h100, PID_B = 'h000;

  logic clk = 0, clk_mm = 0, arst_n = 0, arst_mm_n = 0;
  always #5 clk = ~clk;
  always #9 clk_mm = ~clk_mm;

  logic adc_sample; logic signed [9:0] adc_data;
  logic sync_start = 0; logic [2:0] sync_state; logic signed [15:0] dco_fw;
  logic [15:0] frame_no, agc_gain, agc_sat_cnt; logic frame_det, fft_overflow;
  logic [$clog2(KC)-1:0] prs_idx; logic [1:0] prs_code;
  logic mem_ce_n, mem_we_n, mem_oe_n; logic [MEM_AW-1:0] mem_addr; logic [15:0] mem_wdata, mem_rdata;
  logic tdi_ok, tdi_overflow, ts_locked, rs_pkt, rs_pkt_err; logic [3:0] rs_pkt_nerr;
  logic [31:0] punct_pv = '1; logic punct_restart = 0; logic [23:0] lf_bits = 24'(CIFB / 4);
  logic ts_reg_we = 0; logic [3:0] ts_reg_addr = 0; logic [31:0] ts_reg_wdata = 0;
  logic ts_irq, ts_irq_ack = 0; logic [7:0] ts_rd_addr = 0, ts_rd_data;
  logic dma_valid, dma_ready = 1; logic [22:0] dma_addr; logic [7:0] dma_data;
  logic [15:0] ts_n_match, ts_n_irq, ts_n_drop;
  logic aud_valid = 0, aud_ready, i2s_sck, i2s_ws, i2s_sd; logic [15:0] aud_left = 0, aud_right = 0, aud_underrun;
  logic ce_27, ce_13_5;
  logic mb_we = 0, mb_full, dsp_irq, dsp_ack = 0; logic [22:0] mb_addr = 0, dsp_addr; logic [15:0] mb_len = 0, dsp_len;
  logic vld_in_valid = 0, vld_in_ready, vld_cmd_valid = 0, vld_cmd_ready, vld_res_valid;
  logic [31:0] vld_in_word = 0; logic [1:0] vld_cmd_op = 0; logic [5:0] vld_cmd_n = 0; logic signed [31:0] vld_res;
  logic xf_valid = 0; logic [1:0] xf_mode = 0; logic [5:0] xf_qp = 0; logic [255:0] xf_coef = 0;
  logic [127:0] rc_pred = 0, rc_pix; logic rc_valid;
  int pkt_sent;

  tdmb_soc #(.NFFT(NFFT), .GUARD(GUARD), .NULLN(NULLN), .NSYM(NSYM), .KC(KC), .NFIC(NFIC),
             .CIFB(CIFB), .QPSK_SH(16), .MEM_AW(MEM_AW), .I2S_DIV(4)) dut (.*);
  psram #(.AW(MEM_AW), .DW(16)) u_mem (.clk, .ce_n(mem_ce_n), .we_n(mem_we_n), .oe_n(mem_oe_n),
                                      .addr(mem_addr), .dq_i(mem_wdata), .dq_o(mem_rdata));
  tdmb_tx #(.NFFT(NFFT), .GUARD(GUARD), .NULLN(NULLN), .NSYM(NSYM), .KC(KC), .NFIC(NFIC),
            .CIFB(CIFB), .CI_M(CI_M), .FOFF(2.3), .START_OFS(1500), .AMP(100.0),
            .ERR_EVERY(3), .PID_A(PID_A), .PID_B(PID_B)) u_tx (.clk, .sample(adc_sample), .adc(adc_data), .pkt_sent);
  // phase reference table lookup (carrier index -KC/2.. order to the
  // transmitter's bin order)
  assign prs_code = u_tx.prs[(int'(prs_idx) < KC / 2) ? int'(prs_idx) + KC / 2 : int'(prs_idx) - KC / 2];

  int checks = 0, failures = 0;
  localparam int NM = 18;
  int mech [NM];
  string mname [NM] = '{"frame sync", "fine freq state", "coarse freq state", "fine timing state",
                        "tracking state", "fine DCO update", "coarse DCO jump", "AGC gain change",
                        "time de-interleaver full", "TS packet lock", "RS packet", "RS correction",
                        "DMA packet checked", "processor packet irq", "I2S word frame",
                        "DSP mailbox irq", "VLD ue decode", "transform+reconstruction"};
  task automatic fin();
    for (int i = 0; i < NM; i++) begin
      checks++;
      $display("mechanism %-26s : %0d", mname[i], mech[i]);
      if (mech[i] == 0) begin failures++; $display("  never happened"); end
    end
    checks++;
    if (fft_overflow || tdi_overflow) begin failures++; $display("overflow fft=%0d tdi=%0d", fft_overflow, tdi_overflow); end
    $display("frames %0d, packets sent %0d, rs packets %0d, matched %0d, irq %0d, drop %0d, fw %0d, gain %0d, sat %0d",
             frame_no, pkt_sent, mech[10], ts_n_match, ts_n_irq, ts_n_drop, dco_fw, agc_gain, agc_sat_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  initial begin #150000000; failures++; $display("watchdog"); fin(); end

  // ---------------------------------------------------- baseband monitors
  logic [2:0] st_q = 0; logic signed [15:0] fw_q = 0; logic [15:0] gain_q = 256;
  logic tdi_ok_q = 0, lock_q = 0;
  int dma_cnt = 0; byte unsigned dpkt [188];
  always @(posedge clk) if (arst_n) begin
    if (frame_det) mech[0]++;
    if (sync_state != st_q) begin
      $display("%0t: sync state %0d -> %0d, frame %0d, fw %0d", $time, st_q, sync_state, frame_no, dco_fw);
      if (sync_state >= 3'd1 && sync_state <= 3'd5 && sync_state != 3'd1) mech[sync_state - 1]++;
    end
    if (dco_fw != fw_q) begin
      if (dco_fw - fw_q >= 512 || fw_q - dco_fw >= 512) mech[6]++; else mech[5]++;
    end
    if (agc_gain != gain_q) mech[7]++;
    if (tdi_ok && !tdi_ok_q) begin mech[8]++; $display("%0t: time de-interleaver full", $time); end
    if (ts_locked && !lock_q) begin mech[9]++; $display("%0t: TS lock", $time); end
    if (rs_pkt) begin
      mech[10]++;
      if (!rs_pkt_err && rs_pkt_nerr != 0) mech[11]++;
    end
    st_q <= sync_state; fw_q <= dco_fw; gain_q <= agc_gain; tdi_ok_q <= tdi_ok; lock_q <= ts_locked;
    // DMA packets: whole packets of PID_A
    if (dma_valid && dma_ready) begin
      dpkt[dma_cnt] = dma_data;
      dma_cnt++;
      if (dma_cnt == 188) begin
        int bad;
        bad = 0;
        checks++;
        if (dpkt[0] != 8'h47 || {dpkt[1][4:0], dpkt[2]} != 13'(PID_A)) bad++;
        for (int i = 4; i < 188; i++) if (dpkt[i] != 8'(dpkt[3] * 7 + i * 13)) bad++;
        if (bad) begin failures++; $display("DMA packet %0d: %0d bad bytes", dpkt[3], bad); end
        else mech[12]++;
        dma_cnt = 0;
      end
    end
  end
  // sync_state codes: 1 frame, 2 fine freq, 3 coarse, 4 timing, 5 track;
  // mech[1..4] count entries to states 2..5

  // processor side: packets of PID_B raise irq
  initial begin
    forever begin
      @(posedge clk);
      if (ts_irq) begin
        byte unsigned b0, b1, b2;
        @(negedge clk); ts_rd_addr = 0; @(negedge clk); b0 = ts_rd_data;
        ts_rd_addr = 1; @(negedge clk); b1 = ts_rd_data;
        ts_rd_addr = 2; @(negedge clk); b2 = ts_rd_data;
        checks++;
        if (b0 != 8'h47 || {b1[4:0], b2} != 13'(PID_B)) begin failures++; $display("cpu packet header %h %h %h", b0, b1, b2); end
        else mech[13]++;
        ts_irq_ack = 1; @(negedge clk); ts_irq_ack = 0;
      end
    end
  end

  task automatic reg_wr(input int a, input int d);
    @(negedge clk); ts_reg_we = 1; ts_reg_addr = 4'(a); ts_reg_wdata = d;
    @(negedge clk); ts_reg_we = 0;
  endtask

  initial begin
    for (int i = 0; i < NM; i++) mech[i] = 0;
    repeat (5) @(negedge clk); arst_n = 1; arst_mm_n = 1;
    repeat (5) @(negedge clk);
    reg_wr(0, (1 << 13) | PID_A);
    reg_wr(8, 'h1000);
    reg_wr(9, 188 * 16);
    @(negedge clk); sync_start = 1; @(negedge clk); sync_start = 0;
    wait (mech[12] >= 4 && mech[13] >= 1);
    repeat (1000) @(negedge clk);
    fin();
  end

  // ------------------------------------------------------------- audio
  int ws_edges = 0; logic ws_q = 0;
  always @(posedge clk) begin ws_q <= i2s_ws; if (i2s_ws != ws_q) ws_edges++; if (ws_edges >= 4 && mech[14] == 0) mech[14] = 1; end
  initial begin
    repeat (20) @(negedge clk);
    for (int k = 0; k < 4; k++) begin
      aud_valid = 1; aud_left = 16'hA5C3 + 16'(k); aud_right = 16'h3C5A;
      do @(posedge clk); while (!aud_ready);
      @(negedge clk); aud_valid = 0;
    end
  end

  // ------------------------------------------------------- multimedia side
  initial begin
    repeat (20) @(negedge clk_mm);
    // DSP mailbox
    mb_we = 1; mb_addr = 23'h12340; mb_len = 16'd512; @(negedge clk_mm); mb_we = 0;
    repeat (10) @(negedge clk_mm);
    checks++;
    if (dsp_irq && dsp_addr == 23'h12340 && dsp_len == 16'd512) mech[15]++;
    else begin failures++; $display("mailbox: irq %0d addr %h len %0d", dsp_irq, dsp_addr, dsp_len); end
    dsp_ack = 1; @(negedge clk_mm); dsp_ack = 0;
    // VLD: ue codes 1, 010, 011, 00100 -> 0, 1, 2, 3
    vld_in_valid = 1; vld_in_word = {12'b1_010_011_00100, 20'b0};
    do @(posedge clk_mm); while (!vld_in_ready);
    @(negedge clk_mm); vld_in_valid = 0;
    for (int k = 0; k < 4; k++) begin
      vld_cmd_valid = 1; vld_cmd_op = 2'd1; vld_cmd_n = 0;
      do @(posedge clk_mm); while (!vld_cmd_ready);
      @(negedge clk_mm); vld_cmd_valid = 0;
      while (!vld_res_valid) @(negedge clk_mm);
      checks++;
      if (vld_res == k) mech[16]++; else begin failures++; $display("vld ue %0d got %0d", k, vld_res); end
      @(negedge clk_mm);
    end
    // inverse transform of a scaled DC of 64 (all residuals 1) plus prediction
    for (int i = 0; i < 16; i++) rc_pred[8*i +: 8] = 8'(10 * i + 3);
    xf_coef = '0; xf_coef[15:0] = 16'sd64; xf_mode = 2'd1; xf_qp = 6'd20;
    xf_valid = 1; @(negedge clk_mm); xf_valid = 0;
    while (!rc_valid) @(negedge clk_mm);
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (rc_pix[8*i +: 8] != 8'(10 * i + 4)) begin failures++; $display("pix %0d = %0d", i, rc_pix[8*i +: 8]); end
      else mech[17]++;
    end
  end
endmodule
