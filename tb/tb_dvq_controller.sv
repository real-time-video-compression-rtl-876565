// tb_dvq_controller: issues each host command and checks the signals the
// controller drives: codebook writes, D/A source, capture arming and the
// capture-done status, playback on/off, frame-buffer byte access and read
// replies, waiting while the frame buffer is busy, and the restart pulse.
// A directed sequence comes first; then 4000 clocks of random commands and
// random frame-buffer status are checked against a reference model of the
// command rules, kept in this testbench, every clock.
module tb_dvq_controller;
  import dvq_pkg::*;
  logic clk = 0, rst_n = 1;
  logic host_valid = 0, host_ready, rsp_valid, cap_done;
  host_cmd_e host_cmd = CMD_NOP;
  logic [18:0] host_addr = '0, fb_addr;
  logic [31:0] host_data = '0;
  sample_t rsp_data, fb_wdata, fb_rdata = '0;
  logic cw_we, fb_capture_req, fb_capture_done = 0, fb_play_en, fb_we, fb_re;
  logic fb_rvalid = 0, fb_busy = 0, codec_restart;
  logic [6:0] cw_idx;
  tile_t cw_data;
  dac_sel_e dac_sel;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial #2 rst_n = 0;

  dvq_controller dut (.clk(clk), .rst_n(rst_n), .host_valid(host_valid),
    .host_cmd(host_cmd), .host_addr(host_addr), .host_data(host_data),
    .host_ready(host_ready), .rsp_valid(rsp_valid), .rsp_data(rsp_data),
    .cap_done(cap_done), .cw_we(cw_we), .cw_idx(cw_idx), .cw_data(cw_data),
    .fb_capture_req(fb_capture_req), .fb_capture_done(fb_capture_done),
    .fb_play_en(fb_play_en), .fb_we(fb_we), .fb_re(fb_re), .fb_addr(fb_addr),
    .fb_wdata(fb_wdata), .fb_rdata(fb_rdata), .fb_rvalid(fb_rvalid),
    .fb_busy(fb_busy), .dac_sel(dac_sel), .codec_restart(codec_restart));

  task automatic check(string what, int g, int e);
    checks++;
    if (g != e) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", what, g, e);
    end
  endtask


  // Reference model of the command rules: which commands wait for a busy
  // frame buffer, what each accepted command does in its clock and after.
  task automatic random_run();
    logic m_play, m_cap, m_rst, ready, acc, fbc;
    int m_dac;
    host_cmd_e c;
    m_play = fb_play_en; m_cap = cap_done; m_rst = 1'b0; m_dac = int'(dac_sel);
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      check("rnd play", int'(fb_play_en), int'(m_play));
      check("rnd cap_done", int'(cap_done), int'(m_cap));
      check("rnd restart", int'(codec_restart), int'(m_rst));
      check("rnd dac_sel", int'(dac_sel), m_dac);
      c = host_cmd_e'($urandom_range(0, 7));
      host_valid = 1'($urandom_range(0, 3) != 0);
      host_cmd = c;
      host_addr = 19'($urandom);
      host_data = $urandom;
      fb_busy = 1'($urandom_range(0, 2) == 0);
      fb_capture_done = 1'($urandom_range(0, 9) == 0);
      fb_rvalid = 1'($urandom_range(0, 1));
      fb_rdata = 8'($urandom);
      #1;
      fbc = (c == CMD_CAPTURE || c == CMD_FB_WRITE || c == CMD_FB_READ ||
             (c == CMD_PLAY && host_data[0]));
      ready = !(fbc && fb_busy);
      acc = host_valid && ready;
      check("rnd ready", int'(host_ready), int'(ready));
      check("rnd cw_we", int'(cw_we), int'(acc && c == CMD_LOAD_CW));
      if (cw_we) begin
        check("rnd cw_idx", int'(cw_idx), int'(host_addr[6:0]));
        check("rnd cw_data", int'(cw_data), int'(host_data));
      end
      check("rnd capture", int'(fb_capture_req), int'(acc && c == CMD_CAPTURE));
      check("rnd fb_we", int'(fb_we), int'(acc && c == CMD_FB_WRITE));
      check("rnd fb_re", int'(fb_re), int'(acc && c == CMD_FB_READ));
      if (fb_we || fb_re) check("rnd fb_addr", int'(fb_addr), int'(host_addr));
      if (fb_we) check("rnd fb_wdata", int'(fb_wdata), int'(host_data[7:0]));
      check("rnd rsp_valid", int'(rsp_valid), int'(fb_rvalid));
      if (rsp_valid) check("rnd rsp_data", int'(rsp_data), int'(fb_rdata));
      // state after the coming edge
      m_rst = acc && c == CMD_RESTART;
      if (acc && c == CMD_SET_MODE) m_dac = int'(host_data[2:1]);
      if (acc && c == CMD_PLAY) m_play = host_data[0];
      // a newly accepted capture clears the status even if the previous
      // capture ends in the same clock
      if (acc && c == CMD_CAPTURE) m_cap = 1'b0;
      else if (fb_capture_done) m_cap = 1'b1;
    end
    @(negedge clk);
    host_valid = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // LOAD_CW acts in the same clock.
    host_valid = 1; host_cmd = CMD_LOAD_CW; host_addr = 19'd77; host_data = 32'hA1B2C3D4;
    #1;
    check("cw_we", int'(cw_we), 1);
    check("cw_idx", int'(cw_idx), 77);
    check("cw_data c0", int'(cw_data[0]), 'hD4);
    check("cw_data c3", int'(cw_data[3]), 'hA1);
    @(negedge clk);
    host_cmd = CMD_SET_MODE; host_data = 32'h4;
    @(negedge clk);
    check("dac_sel", int'(dac_sel), int'(DAC_DECODER));
    host_cmd = CMD_CAPTURE; #1;
    check("capture_req", int'(fb_capture_req), 1);
    @(negedge clk);
    host_valid = 0; fb_busy = 1; fb_capture_done = 1;
    @(negedge clk);
    fb_capture_done = 0;
    check("cap_done", int'(cap_done), 1);
    // Frame-buffer commands wait while busy; codebook loads do not.
    host_valid = 1; host_cmd = CMD_FB_WRITE; host_addr = 19'd1234; host_data = 32'h5A; #1;
    check("wait busy", int'(host_ready), 0);
    check("no write", int'(fb_we), 0);
    host_cmd = CMD_LOAD_CW; #1;
    check("load while busy", int'(host_ready && cw_we), 1);
    host_cmd = CMD_FB_WRITE;
    @(negedge clk);
    fb_busy = 0; #1;
    check("write", int'(fb_we && fb_addr == 19'd1234 && fb_wdata == 8'h5A), 1);
    @(negedge clk);
    host_cmd = CMD_FB_READ; #1;
    check("read", int'(fb_re), 1);
    @(negedge clk);
    host_valid = 0; fb_rvalid = 1; fb_rdata = 8'h3C; #1;
    check("rsp", int'(rsp_valid && rsp_data == 8'h3C), 1);
    @(negedge clk);
    fb_rvalid = 0;
    host_valid = 1; host_cmd = CMD_PLAY; host_data = 32'h1;
    @(negedge clk);
    check("play on", int'(fb_play_en), 1);
    fb_busy = 1; host_data = 32'h0; #1;
    check("stop while busy", int'(host_ready), 1);
    @(negedge clk);
    check("play off", int'(fb_play_en), 0);
    host_cmd = CMD_RESTART;
    @(negedge clk);
    host_valid = 0;
    check("restart", int'(codec_restart), 1);
    @(negedge clk);
    check("restart pulse", int'(codec_restart), 0);
    random_run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
