// dvq_system: real-time differential-vector-quantization video codec.
//
// Composite colour video sampled at 14.31818 MHz (one 8-bit sample per clk)
// is predicted from already reconstructed samples of earlier lines, and the
// prediction error of each 4-sample tile is vector-quantized against a
// 128-codeword codebook held in eight associative-memory chips (two
// alternating sets of four). The 7-bit index stream is the compressed video
// (7 bits per 4 samples against 32). A decoder at the far end of the channel
// repeats the encoder's reconstruction loop and rebuilds the samples.
//
// Units: the video bus carries A/D samples, or the frame buffer's frame when
// playback is on; a sync detector marks frame starts for frame capture; the
// encoder codes the video bus; the channel is a plain wire from the encoder
// to the decoder, also brought out on chan_index/chan_valid; the controller
// executes host commands (codebook download, capture, playback, frame-buffer
// access, D/A source select). The D/A output is registered and selects the
// video bus, the encoder's reconstruction or the decoder's output.
// The A/D and D/A converters and the host link are outside: their sample
// buses and the host command port are ports of this module.
// The unit partition follows the published system; ports, command set and
// the D/A register are this design's.
module dvq_system
  import dvq_pkg::*;
#(
  parameter int unsigned LINE_LEN      = 910,
  parameter int unsigned FRAME_LINES   = 526,
  parameter int unsigned CHIPS_PER_SET = 4,
  parameter int unsigned FB_AW         = 19,
  parameter int unsigned VSYNC_RUN     = 200,
  localparam int unsigned IW = $clog2(CW_PER_CHIP * CHIPS_PER_SET)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  sample_t          adc_data,
  output sample_t          dac_data,
  // host command port
  input  logic             host_valid,
  input  host_cmd_e        host_cmd,
  input  logic [FB_AW-1:0] host_addr,
  input  logic [31:0]      host_data,
  output logic             host_ready,
  output logic             rsp_valid,
  output sample_t          rsp_data,
  output logic             cap_done,
  // channel
  output logic [IW-1:0]    chan_index,
  output logic             chan_valid,
  // observation
  output sample_t          enc_recon,
  output sample_t          dec_recon,
  output logic             dec_valid,
  output logic             frame_start
);

  logic          cw_we;
  logic [IW-1:0] cw_idx;
  tile_t         cw_data;
  logic          fb_capture_req, fb_capture_done, fb_play_en;
  logic          fb_we, fb_re, fb_rvalid, fb_busy;
  logic [FB_AW-1:0] fb_addr;
  sample_t       fb_wdata, fb_rdata;
  sample_t       play_data;
  logic          play_valid, play_frame_start;
  dac_sel_e      dac_sel;
  sample_t       video_bus;
  logic          field_start;
  sample_t       enc_pv, dec_pv;
  logic          enc_recon_valid;
  dist_t         min_dist;
  logic          codec_restart;
  logic          codec_rst_n;

  // The coding loops restart on reset or on a host RESTART command; the
  // quantizer's codebook is cleared only by the system reset (VQ_RESET*).
  assign codec_rst_n = rst_n & ~codec_restart;

  assign video_bus = play_valid ? play_data : adc_data;

  sync_detector #(.VSYNC_RUN(VSYNC_RUN), .HOLDOFF(20 * LINE_LEN)) u_sync (
    .clk(clk), .rst_n(rst_n), .video(adc_data),
    .field_start(field_start), .frame_start(frame_start));

  frame_buffer #(.AW(FB_AW), .FRAME_SAMPLES(LINE_LEN * FRAME_LINES)) u_fb (
    .clk(clk), .rst_n(rst_n), .video_in(adc_data), .frame_start(frame_start),
    .capture_req(fb_capture_req), .capture_done(fb_capture_done),
    .play_en(fb_play_en), .play_data(play_data), .play_valid(play_valid),
    .play_frame_start(play_frame_start),
    .host_we(fb_we), .host_re(fb_re), .host_addr(fb_addr), .host_wdata(fb_wdata),
    .host_rdata(fb_rdata), .host_rvalid(fb_rvalid), .busy(fb_busy));

  dvq_controller #(.FB_AW(FB_AW), .IW(IW)) u_ctrl (
    .clk(clk), .rst_n(rst_n),
    .host_valid(host_valid), .host_cmd(host_cmd), .host_addr(host_addr),
    .host_data(host_data), .host_ready(host_ready), .rsp_valid(rsp_valid),
    .rsp_data(rsp_data), .cap_done(cap_done),
    .cw_we(cw_we), .cw_idx(cw_idx), .cw_data(cw_data),
    .fb_capture_req(fb_capture_req), .fb_capture_done(fb_capture_done),
    .fb_play_en(fb_play_en), .fb_we(fb_we), .fb_re(fb_re), .fb_addr(fb_addr),
    .fb_wdata(fb_wdata), .fb_rdata(fb_rdata), .fb_rvalid(fb_rvalid),
    .fb_busy(fb_busy), .dac_sel(dac_sel), .codec_restart(codec_restart));

  dvq_encoder #(.LINE_LEN(LINE_LEN), .CHIPS_PER_SET(CHIPS_PER_SET)) u_enc (
    .clk(clk), .rst_n(codec_rst_n), .vq_reset_n(rst_n), .cw_we(cw_we), .cw_idx(cw_idx), .cw_data(cw_data),
    .pix(video_bus), .index(chan_index), .index_valid(chan_valid), .pv(enc_pv),
    .recon(enc_recon), .recon_valid(enc_recon_valid), .min_dist(min_dist));

  dvq_decoder #(.LINE_LEN(LINE_LEN), .N_CW(CW_PER_CHIP * CHIPS_PER_SET)) u_dec (
    .clk(clk), .rst_n(codec_rst_n), .cw_we(cw_we), .cw_idx(cw_idx), .cw_data(cw_data),
    .index_valid(chan_valid), .index(chan_index), .pv(dec_pv),
    .recon(dec_recon), .recon_valid(dec_valid));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dac_data <= '0;
    else begin
      unique case (dac_sel)
        DAC_ENCODER: dac_data <= enc_recon;
        DAC_DECODER: dac_data <= dec_recon;
        default:     dac_data <= video_bus;
      endcase
    end
  end

endmodule
