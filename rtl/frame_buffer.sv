// frame_buffer: single-frame video store (512K x 8).
//
// Holds one complete frame of sampled video, sync included (910 x 526
// samples). It can capture the next frame from the A/D converter, exchange
// bytes with the host, and play its frame back over and over onto the video
// bus, from where it reaches the encoder and the D/A converter.
//
// Capture: capture_req arms it; the frame starts with the sample that
// arrives together with frame_start, and FRAME_SAMPLES consecutive samples
// are written at addresses 0 upwards; capture_done then pulses. Playback:
// while play_en is high (and no capture runs) one sample per clk appears on
// play_data with play_valid, from address 0 to FRAME_SAMPLES-1 and round
// again; play_frame_start marks address 0. Host access: host_we writes
// host_wdata at host_addr; host_re reads host_addr and returns it on
// host_rdata with host_rvalid one clk later. The single memory port serves
// one user at a time: host access is ignored while busy (capturing or
// playing). The memory size and the three uses follow the published frame
// buffer; the port arbitration and timing are this design's.
module frame_buffer
  import dvq_pkg::*;
#(
  parameter int unsigned AW            = 19,
  parameter int unsigned FRAME_SAMPLES = 910 * 526
) (
  input  logic          clk,
  input  logic          rst_n,
  input  sample_t       video_in,
  input  logic          frame_start,
  input  logic          capture_req,
  output logic          capture_done,
  input  logic          play_en,
  output sample_t       play_data,
  output logic          play_valid,
  output logic          play_frame_start,
  input  logic          host_we,
  input  logic          host_re,
  input  logic [AW-1:0] host_addr,
  input  sample_t       host_wdata,
  output sample_t       host_rdata,
  output logic          host_rvalid,
  output logic          busy
);

  sample_t       mem [2**AW];
  logic          armed, capturing;
  logic [AW-1:0] ptr;
  logic          start_cap;
  logic          cap_we;
  logic [AW-1:0] cap_addr;

  assign start_cap = armed && frame_start;
  assign cap_we    = start_cap || capturing;
  assign cap_addr  = start_cap ? '0 : ptr;
  assign busy      = armed || capturing || play_en;

  always_ff @(posedge clk) begin
    if (cap_we)
      mem[cap_addr] <= video_in;
    else if (host_we && !busy)
      mem[host_addr] <= host_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed            <= 1'b0;
      capturing        <= 1'b0;
      ptr              <= '0;
      capture_done     <= 1'b0;
      play_data        <= '0;
      play_valid       <= 1'b0;
      play_frame_start <= 1'b0;
      host_rdata       <= '0;
      host_rvalid      <= 1'b0;
    end else begin
      capture_done     <= 1'b0;
      play_valid       <= 1'b0;
      play_frame_start <= 1'b0;
      host_rvalid      <= 1'b0;
      if (capture_req && !capturing) armed <= 1'b1;
      if (start_cap) begin
        armed     <= 1'b0;
        capturing <= 1'b1;
        ptr       <= AW'(1);
      end else if (capturing) begin
        if (int'(ptr) == int'(FRAME_SAMPLES) - 1) begin
          capturing    <= 1'b0;
          capture_done <= 1'b1;
          ptr          <= '0;
        end else begin
          ptr <= ptr + 1'b1;
        end
      end else if (play_en && !armed) begin
        play_data        <= mem[ptr];
        play_valid       <= 1'b1;
        play_frame_start <= (ptr == '0);
        ptr <= (int'(ptr) == int'(FRAME_SAMPLES) - 1) ? '0 : ptr + 1'b1;
      end else begin
        ptr <= '0;
        if (host_re && !busy) begin
          host_rdata  <= mem[host_addr];
          host_rvalid <= 1'b1;
        end
      end
    end
  end

  initial assert (FRAME_SAMPLES <= 2**AW)
    else $error("frame_buffer: frame of %0d samples exceeds memory", FRAME_SAMPLES);

endmodule
