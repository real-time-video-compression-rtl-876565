// tb_sync_detector: synthetic sampled video with short horizontal sync
// dips on every line and, at the start of each field, a vertical interval
// of long broad pulses. Field starts must be flagged exactly on the sample
// that completes the first broad-pulse run of each interval, never on
// horizontal syncs or later broad pulses, and every second field must be a
// frame start. Sizes: 60-sample lines, 12-sample hsync, 24-sample broad
// pulses, run threshold 20.
module tb_sync_detector;
  import dvq_pkg::*;
  localparam int L = 60, FIELD = 60 * 13, RUN = 20;
  logic clk = 0, rst_n = 1;
  sample_t video = 8'd60;
  logic field_start, frame_start;
  int checks = 0, failures = 0, n_field = 0, n_frame = 0;

  always #5 clk = ~clk;
  initial #2 rst_n = 0;

  sync_detector #(.SYNC_TH(16), .VSYNC_RUN(RUN), .HOLDOFF(5 * L)) dut (
    .clk(clk), .rst_n(rst_n), .video(video), .field_start(field_start),
    .frame_start(frame_start));

  // Sample n of the stream: broad pulses twice per line on the first 3 lines
  // of each field, otherwise a 12-sample hsync at the start of each line.
  function automatic sample_t gen(int n);
    int f = n % FIELD, x = n % (L / 2);
    if (f < 3 * L) return (x < 24) ? 8'd4 : 8'd60;
    if (n % L < 12) return 8'd4;
    return sample_t'(70 + (n * 37) % 150);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 8 * FIELD; n++) begin
      bit exp_field;
      video = gen(n);
      #1;
      exp_field = (n % FIELD) == RUN - 1;
      checks += 2;
      if (field_start != exp_field) begin failures++; if (failures < 10) $display("FAIL field n=%0d", n); end
      if (frame_start != (exp_field && (n / FIELD) % 2 == 0)) begin
        failures++; if (failures < 10) $display("FAIL frame n=%0d", n); end
      n_field += int'(field_start);
      n_frame += int'(frame_start);
      @(negedge clk);
    end
    checks++;
    if (n_field != 8 || n_frame != 4) failures++;
    $display("fields %0d frames %0d", n_field, n_frame);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
