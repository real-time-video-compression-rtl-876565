// dvq_controller: system controller, executes host commands.
//
// The controller routes data between the units: it downloads codebooks into
// the vector quantizer and into the inverse quantizers of encoder and
// decoder, starts frame captures, turns frame-buffer playback on and off,
// moves single bytes between host and frame buffer (frame upload and
// download), and chooses what drives the D/A converter. On the host side it
// takes one command per accepted clk (host_valid && host_ready); in the
// built system this port sits behind the link to the host computer.
// Commands (dvq_pkg::host_cmd_e): LOAD_CW writes codeword host_addr with
// host_data = {c3,c2,c1,c0} (offset binary) in the same clk; SET_MODE sets
// dac_sel from host_data[2:1]; CAPTURE arms a frame capture and the status
// bit cap_done is set when it ends; PLAY sets playback from host_data[0];
// FB_WRITE/FB_READ access the frame buffer, the read byte returned on
// rsp_data with rsp_valid; RESTART pulses codec_restart for one clk so that
// encoder and decoder restart their coding loops together (codebooks are
// kept). Frame-buffer commands wait (host_ready low) while
// the frame buffer is busy, except PLAY, which can always stop playback.
// Only the controller's role is given; the command set and its encoding are
// this design's.
module dvq_controller
  import dvq_pkg::*;
#(
  parameter int unsigned FB_AW = 19,
  parameter int unsigned IW    = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  // host side
  input  logic             host_valid,
  input  host_cmd_e        host_cmd,
  input  logic [FB_AW-1:0] host_addr,
  input  logic [31:0]      host_data,
  output logic             host_ready,
  output logic             rsp_valid,
  output sample_t          rsp_data,
  output logic             cap_done,
  // codebook download
  output logic             cw_we,
  output logic [IW-1:0]    cw_idx,
  output tile_t            cw_data,
  // frame buffer
  output logic             fb_capture_req,
  input  logic             fb_capture_done,
  output logic             fb_play_en,
  output logic             fb_we,
  output logic             fb_re,
  output logic [FB_AW-1:0] fb_addr,
  output sample_t          fb_wdata,
  input  sample_t          fb_rdata,
  input  logic             fb_rvalid,
  input  logic             fb_busy,
  // routing
  output dac_sel_e         dac_sel,
  output logic             codec_restart
);

  logic fb_cmd, accept;

  assign fb_cmd     = host_cmd inside {CMD_CAPTURE, CMD_FB_WRITE, CMD_FB_READ}
                      || (host_cmd == CMD_PLAY && host_data[0]);
  assign host_ready = !(fb_cmd && fb_busy);
  assign accept     = host_valid && host_ready;

  // Commands that act in the clk they are accepted.
  assign cw_we          = accept && host_cmd == CMD_LOAD_CW;
  assign cw_idx         = host_addr[IW-1:0];
  assign cw_data        = tile_t'(host_data);
  assign fb_capture_req = accept && host_cmd == CMD_CAPTURE;
  assign fb_we          = accept && host_cmd == CMD_FB_WRITE;
  assign fb_re          = accept && host_cmd == CMD_FB_READ;
  assign fb_addr        = host_addr;
  assign fb_wdata       = host_data[7:0];
  assign rsp_valid      = fb_rvalid;
  assign rsp_data       = fb_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fb_play_en <= 1'b0;
      dac_sel    <= DAC_VIDEO;
      cap_done   <= 1'b0;
      codec_restart <= 1'b0;
    end else begin
      codec_restart <= accept && host_cmd == CMD_RESTART;
      if (fb_capture_done) cap_done <= 1'b1;
      if (accept) begin
        unique case (host_cmd)
          CMD_SET_MODE: dac_sel    <= dac_sel_e'(host_data[2:1]);
          CMD_PLAY:     fb_play_en <= host_data[0];
          CMD_CAPTURE:  cap_done   <= 1'b0;
          default: ;
        endcase
      end
    end
  end

endmodule
