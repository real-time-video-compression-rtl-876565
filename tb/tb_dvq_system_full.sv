// tb_dvq_system_full: end-to-end test of the DVQ system with every parameter at its default (910 x 526-sample frames, 512K frame buffer).
//
// The host port loads a 128-codeword codebook; a synthetic composite-video
// signal (broad vertical-sync pulses at each field start, horizontal sync
// dips, a subcarrier-like 4-sample pattern that flips phase line by line,
// bright areas and noise) is fed through the A/D port. Then:
//  1. live coding: after a RESTART command the encoder codes the A/D
//     samples for 482300 samples; every prediction, index (at clock 4k+13)
//     and reconstruction (at clock n+16) is compared with a reference model,
//     the decoder output must equal the encoder's reconstruction on every
//     clock, and the D/A port must show the selected source;
//  2. frame capture: CAPTURE, wait for cap_done, then read bytes back over
//     the host port and compare with the frame that began at frame_start;
//  3. frame upload: overwrite bytes from the host;
//  4. playback coding: PLAY and RESTART; the encoder now codes the stored
//     frame played repeatedly; the played samples and the coding are checked
//     as in 1, over more than one full frame.
// Each mechanism (codebook download, restart, capture, host read/write,
// playback wrap-around, both quantizer sets, winners in chips other than
// the first, difference saturation, reconstruction clamping, the three D/A
// sources) is counted and must occur at least once.
module tb_dvq_system_full;
  import dvq_pkg::*;
  import dvq_ref_pkg::*;
  localparam int L = 910, FL = 526, FB_AW = 19, VSR = 200;
  localparam int FS = L * FL, FIELD = FS / 2, HS = L / 20 + 1, BROAD = L / 2 - 4;
  localparam int RUN = 482300;

  logic clk = 0, rst_n = 1;
  sample_t adc_data = '0, dac_data, rsp_data, enc_recon, dec_recon;
  logic host_valid = 0, host_ready, rsp_valid, cap_done, chan_valid, dec_valid;
  logic frame_start;
  host_cmd_e host_cmd = CMD_NOP;
  logic [FB_AW-1:0] host_addr = '0;
  logic [31:0] host_data = '0;
  logic [6:0] chan_index;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial #2 rst_n = 0;

  dvq_system dut (
    .clk(clk), .rst_n(rst_n), .adc_data(adc_data), .dac_data(dac_data),
    .host_valid(host_valid), .host_cmd(host_cmd), .host_addr(host_addr),
    .host_data(host_data), .host_ready(host_ready), .rsp_valid(rsp_valid),
    .rsp_data(rsp_data), .cap_done(cap_done), .chan_index(chan_index),
    .chan_valid(chan_valid), .enc_recon(enc_recon), .dec_recon(dec_recon),
    .dec_valid(dec_valid), .frame_start(frame_start));

  task automatic check(string what, int g, int e);
    checks++;
    if (g != e) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", what, g, e);
    end
  endtask

  // ---------------------------------------------------------------- video
  function automatic sample_t video(int s);
    int pos = s % FIELD, line = pos / L, x = pos % L, v;
    int sc[4] = '{0, 30, 0, -30};
    if (line < 3) return ((x % (L / 2)) < BROAD) ? 8'd4 : 8'd60;
    if (x < HS) return 8'd4;
    v = 90 + ((((s / L) / 16) % 3) * 30) + ((x > L / 2 && x < 3 * L / 4) ? 110 : 0);
    v += sc[s % 4] * (((s / L) % 2) ? -1 : 1) + int'($urandom_range(0, 8)) - 4;
    return sample_t'((v < 0) ? 0 : (v > 255) ? 255 : v);
  endfunction

  int adc_idx = 0;      // index of the sample now on adc_data
  always @(negedge clk) begin
    adc_data <= video(adc_idx + 1);
    adc_idx  <= adc_idx + 1;
  end
  initial adc_data = video(0);

  // ---------------------------------------------------------------- host
  task automatic host(host_cmd_e c, int a, logic [31:0] d);
    @(negedge clk);
    host_valid = 1; host_cmd = c; host_addr = FB_AW'(a); host_data = d;
    do @(posedge clk); while (!host_ready);
    @(negedge clk);
    host_valid = 0; host_cmd = CMD_NOP;
  endtask

  int rsp_q [$];
  always @(posedge clk) if (rsp_valid) rsp_q.push_back(int'(rsp_data));

  // ---------------------------------------------------------------- recorder
  bit rec = 0;
  int rcyc = 0;
  int r_pix [$], r_pv [$], r_rc [$], r_rcc [$], r_ix [$], r_ixc [$];
  int n_set [2] = '{0, 0};
  int n_hi_chip = 0, n_dac [3] = '{0, 0, 0}, n_dec_cmp = 0;
  sample_t prev_video, prev_enc, prev_dec;
  dac_sel_e prev_sel = DAC_VIDEO;
  logic rst_d = 0;
  always @(posedge clk) rst_d <= rst_n;
  int cap_s_rec = -1;
  always @(posedge clk) if (frame_start && dut.u_fb.armed) cap_s_rec = adc_idx;
  int play_cnt = 0, play_start = 0, play_first = -1;
  int sat_total = 0, clamp_total = 0;

  always @(posedge clk) begin
    // D/A shows last clock's selected source
    if (rst_n && rst_d) begin
      unique case (prev_sel)
        DAC_ENCODER: begin check("dac enc", int'(dac_data), int'(prev_enc)); n_dac[1]++; end
        DAC_DECODER: begin check("dac dec", int'(dac_data), int'(prev_dec)); n_dac[2]++; end
        default:     begin check("dac video", int'(dac_data), int'(prev_video)); n_dac[0]++; end
      endcase
    end
    prev_sel   = dut.dac_sel;
    prev_video = dut.video_bus;
    prev_enc   = enc_recon;
    prev_dec   = dec_recon;
    if (dut.play_valid) play_cnt++;
    if (rec) begin
      if (rcyc == 0) play_first = play_cnt - int'(dut.play_valid);
      r_pix.push_back(int'(dut.video_bus));
      r_pv.push_back(int'(dut.enc_pv));
      if (dut.enc_recon_valid) begin r_rc.push_back(int'(enc_recon)); r_rcc.push_back(rcyc); end
      if (chan_valid) begin
        r_ix.push_back(int'(chan_index)); r_ixc.push_back(rcyc);
        n_set[dut.u_enc.u_vq.set_sel]++;
        if (chan_index >= 7'd32) n_hi_chip++;
      end
      checks++;
      if (dec_recon != enc_recon || dec_valid != dut.enc_recon_valid) begin
        failures++;
        if (failures < 20) $display("FAIL decoder differs at %0d", rcyc);
      end
      n_dec_cmp++;
      rcyc++;
    end
  end

  byte unsigned cb [128][4];

  task automatic coding_run(string what);
    dvq_model m;
    int nt = RUN / 4;
    r_pix.delete(); r_pv.delete(); r_rc.delete(); r_rcc.delete();
    r_ix.delete(); r_ixc.delete();
    host(CMD_RESTART, 0, 0);
    // the coding loop leaves reset one clock after the command's clock
    @(negedge clk);
    rcyc = 0; rec = 1;
    repeat (RUN + 40) @(negedge clk);
    rec = 0;
    m = new(L, 128);
    foreach (cb[j]) m.cb[j] = cb[j];
    for (int k = 0; k < nt; k++) begin
      byte unsigned t[4];
      for (int c = 0; c < 4; c++) t[c] = byte'(r_pix[4 * k + c]);
      m.code_tile(t);
    end
    for (int k = 0; k < nt; k++) begin
      check({what, " index"}, r_ix[k], int'(m.idx[k]));
      check({what, " index clock"}, r_ixc[k], 4 * k + 13);
    end
    for (int n = 0; n < 4 * nt; n++) begin
      check({what, " pv"}, r_pv[n], int'(m.pvs[n]));
      check({what, " recon"}, r_rc[n], int'(m.recon[n]));
      check({what, " recon clock"}, r_rcc[n], n + 16);
    end
    sat_total += m.n_sat;
    clamp_total += m.n_clamp;
    $display("%s: %0d tiles, saturated %0d, clamped %0d", what, nt, m.n_sat, m.n_clamp);
  endtask

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cap_s, n_cw = 0, n_restart = 0, n_rd = 0, n_wr = 0;
    byte unsigned frame [];
    frame = new[FS];
    repeat (3) @(negedge clk);
    rst_n = 1;
    // codebook download: half small differences, half anything
    for (int j = 0; j < 128; j++) begin
      for (int c = 0; c < 4; c++)
        cb[j][c] = (j % 2 == 0) ? byte'(128 + $urandom_range(0, 48) - 24) : byte'($urandom_range(0, 255));
      host(CMD_LOAD_CW, j, {cb[j][3], cb[j][2], cb[j][1], cb[j][0]});
      n_cw++;
    end
    // 1. live coding, D/A showing the encoder's reconstruction
    host(CMD_SET_MODE, 0, 32'(DAC_ENCODER) << 1);
    coding_run("live");
    n_restart++;
    // 2. frame capture
    host(CMD_SET_MODE, 0, 32'(DAC_VIDEO) << 1);
    host(CMD_CAPTURE, 0, 0);
    while (!cap_done) @(posedge clk);
    cap_s = cap_s_rec;
    // the captured frame must be the A/D samples from the frame start on
    for (int a = 0; a < FS; a++) frame[a] = adc_log[cap_s + a];
    for (int i = 0; i < 80; i++) begin
      int a = (i == 0) ? 0 : (i == 1) ? FS - 1 : $urandom_range(0, FS - 1);
      host(CMD_FB_READ, a, 0);
      @(posedge clk);
      @(negedge clk);
      n_rd++;
      check("fb read count", rsp_q.size(), 1);
      if (rsp_q.size() > 0) check("fb read", rsp_q.pop_front(), int'(frame[a]));
    end
    // 3. frame upload of a few bytes
    for (int a = 100; a < 116; a++) begin
      frame[a] = byte'(a * 7);
      host(CMD_FB_WRITE, a, 32'(a * 7));
      n_wr++;
    end
    host(CMD_FB_READ, 105, 0);
    @(posedge clk);
    @(negedge clk);
    check("fb write-back count", rsp_q.size(), 1);
    if (rsp_q.size() > 0) check("fb write-back", rsp_q.pop_front(), (105 * 7) % 256);
    // 4. playback coding, D/A showing the decoder output
    host(CMD_SET_MODE, 0, 32'(DAC_DECODER) << 1);
    host(CMD_PLAY, 0, 1);
    coding_run("playback");
    n_restart++;
    for (int n = 0; n < RUN; n++) check("played sample", r_pix[n], int'(frame[(play_first + n) % FS]));
    host(CMD_PLAY, 0, 0);
    // mechanisms
    $display("codewords %0d restarts %0d reads %0d writes %0d played %0d (frame %0d)",
             n_cw, n_restart, n_rd, n_wr, play_cnt, FS);
    $display("set0 %0d set1 %0d, chips>0 wins %0d, dac %0d/%0d/%0d, sat %0d clamp %0d",
             n_set[0], n_set[1], n_hi_chip, n_dac[0], n_dac[1], n_dac[2], sat_total, clamp_total);
    if (n_cw != 128) begin failures++; $display("FAIL no codebook download"); end
    if (n_restart == 0) begin failures++; $display("FAIL no restart"); end
    if (!cap_done) begin failures++; $display("FAIL no capture"); end
    if (n_rd == 0 || n_wr == 0) begin failures++; $display("FAIL no host access"); end
    if (play_cnt <= FS) begin failures++; $display("FAIL playback never wrapped"); end
    if (n_set[0] == 0 || n_set[1] == 0) begin failures++; $display("FAIL a set unused"); end
    if (n_hi_chip == 0) begin failures++; $display("FAIL only chip 0 won"); end
    if (n_dac[0] == 0 || n_dac[1] == 0 || n_dac[2] == 0) begin failures++; $display("FAIL D/A source unused"); end
    if (sat_total == 0) begin failures++; $display("FAIL no saturation"); end
    if (clamp_total == 0) begin failures++; $display("FAIL no clamping"); end
    if (n_dec_cmp == 0) begin failures++; $display("FAIL decoder never compared"); end
    checks += 11;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // log of every A/D sample, by index
  byte unsigned adc_log [$];
  always @(negedge clk) adc_log.push_back(adc_data);
endmodule
