// sync_detector: finds the start of each frame in sampled composite video.
//
// The vertical-sync interval contains broad pulses that sit at sync level
// for far longer than a horizontal sync pulse (about 27 us against 4.7 us).
// The detector counts consecutive samples below SYNC_TH; when a run reaches
// VSYNC_RUN samples a field begins, and a hold-off of HOLDOFF samples keeps
// the later broad pulses of the same interval from counting again. Every
// second field begins a frame (two interlaced fields per frame).
// Interface: one sample per clk on video; field_start and frame_start pulse
// combinationally in the clock of the sample that completes the broad-pulse
// run, so that sample is the first one of the field/frame.
// Only the task (marking frame start and stop points for the frame buffer)
// is given for this unit; the run-length method and all thresholds are this
// design's choice.
module sync_detector
  import dvq_pkg::*;
#(
  parameter int unsigned SYNC_TH   = 16,
  parameter int unsigned VSYNC_RUN = 200,
  parameter int unsigned HOLDOFF   = 20 * 910
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t video,
  output logic    field_start,
  output logic    frame_start
);

  localparam int unsigned RW = $clog2(VSYNC_RUN + 1);
  localparam int unsigned HW = $clog2(HOLDOFF + 1);

  logic [RW-1:0] run;
  logic [HW-1:0] hold;
  logic          odd_field;   // next field is the second of its frame
  logic          low;

  assign low         = int'(video) < int'(SYNC_TH);
  assign field_start = low && int'(run) == int'(VSYNC_RUN) - 1 && hold == '0;
  assign frame_start = field_start && !odd_field;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run       <= '0;
      hold      <= '0;
      odd_field <= 1'b0;
    end else begin
      if (!low)                          run <= '0;
      else if (int'(run) < int'(VSYNC_RUN)) run <= run + 1'b1;
      if (field_start) begin
        hold      <= HW'(HOLDOFF);
        odd_field <= ~odd_field;
      end else if (hold != '0) begin
        hold <= hold - 1'b1;
      end
    end
  end

endmodule
