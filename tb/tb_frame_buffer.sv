// tb_frame_buffer: 1K-word buffer, 300-sample frames. Captures the frame
// that starts with a frame_start pulse and checks it through host reads,
// checks that host writes are ignored while busy, overwrites part of it from
// the host, then plays it back twice checking every sample and the frame
// marker.
module tb_frame_buffer;
  import dvq_pkg::*;
  localparam int AW = 10, FS = 300;
  logic clk = 0, rst_n = 1;
  sample_t video = '0, play_data, host_wdata = '0, host_rdata;
  logic frame_start = 0, capture_req = 0, capture_done, play_en = 0;
  logic play_valid, play_frame_start, host_we = 0, host_re = 0, host_rvalid, busy;
  logic [AW-1:0] host_addr = '0;
  byte unsigned ref_mem [FS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial #2 rst_n = 0;

  frame_buffer #(.AW(AW), .FRAME_SAMPLES(FS)) dut (.clk(clk), .rst_n(rst_n),
    .video_in(video), .frame_start(frame_start), .capture_req(capture_req),
    .capture_done(capture_done), .play_en(play_en), .play_data(play_data),
    .play_valid(play_valid), .play_frame_start(play_frame_start),
    .host_we(host_we), .host_re(host_re), .host_addr(host_addr),
    .host_wdata(host_wdata), .host_rdata(host_rdata), .host_rvalid(host_rvalid),
    .busy(busy));

  task automatic check(string what, int g, int e);
    checks++;
    if (g != e) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", what, g, e);
    end
  endtask

  task automatic host_read(int a, int e);
    host_addr = AW'(a); host_re = 1;
    @(negedge clk); host_re = 0;
    check("rvalid", int'(host_rvalid), 1);
    check("rdata", int'(host_rdata), e);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int done_seen = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    capture_req = 1; @(negedge clk); capture_req = 0;
    check("busy when armed", int'(busy), 1);
    repeat (37) begin video = sample_t'($urandom); @(negedge clk); end
    for (int n = 0; n < FS + 20; n++) begin
      video = sample_t'($urandom);
      frame_start = (n == 0);
      if (n < FS) ref_mem[n] = video;
      if (n == 5) begin host_we = 1; host_addr = 10'd7; host_wdata = 8'hAA; end
      else host_we = 0;
      @(negedge clk);
      done_seen += int'(capture_done);
      frame_start = 0;
    end
    check("capture_done", done_seen, 1);
    check("idle", int'(busy), 0);
    for (int a = 0; a < FS; a++) host_read(a, int'(ref_mem[a]));
    for (int a = 0; a < 16; a++) begin
      host_addr = AW'(a); host_wdata = sample_t'(a * 9); host_we = 1;
      ref_mem[a] = byte'(a * 9);
      @(negedge clk);
    end
    host_we = 0;
    play_en = 1;
    @(negedge clk);
    for (int n = 0; n < 2 * FS; n++) begin
      check("play_valid", int'(play_valid), 1);
      check("play_data", int'(play_data), int'(ref_mem[n % FS]));
      check("play_frame_start", int'(play_frame_start), int'(n % FS == 0));
      @(negedge clk);
    end
    play_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
