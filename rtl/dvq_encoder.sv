// dvq_encoder: differential vector quantization (DVQ) encoder for sampled
// composite video, one sample per clock at 14.31818 MHz.
//
// Each incoming sample has its prediction subtracted; the 9-bit difference
// is latched and converted to 8 bits (saturated to -128..127, offset binary).
// Three latches and the current difference form the 4-sample difference tile,
// which goes to the flip-flop vector quantizer once every 4 clocks. The
// resulting 7-bit index is the encoder output (to the channel) and also
// drives the encoder's own decoder, whose reconstructed samples feed the
// predictor. Only the index leaves the encoder; 8 bits per sample become 7
// bits per 4 samples.
//
// rst_n restarts the coding loop; vq_reset_n clears the quantizer's
// codebook (the inverse quantizer's RAMs are not cleared).
// Timing: pix enters every clk from the first clock after reset. Tile k
// (samples 4k..4k+3) is complete at clock 4k+4, its index appears with
// index_valid at clock 4k+13, and sample n is reconstructed at clock n+16.
// Prediction of sample n uses reconstructed samples at least 908 samples
// older, so the loop closes in time. Subtractor, converter, tile latches and
// the quantizer/inverse-quantizer loop follow the published encoder; the
// converter's saturation and offset-binary code are this design's choice.
module dvq_encoder
  import dvq_pkg::*;
#(
  parameter int unsigned LINE_LEN      = 910,
  parameter int unsigned CHIPS_PER_SET = 4,
  localparam int unsigned N_CW = CW_PER_CHIP * CHIPS_PER_SET,
  localparam int unsigned IW   = $clog2(N_CW)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          vq_reset_n,
  input  logic          cw_we,
  input  logic [IW-1:0] cw_idx,
  input  tile_t         cw_data,
  input  sample_t       pix,
  output logic [IW-1:0] index,
  output logic          index_valid,
  output sample_t       pv,
  output sample_t       recon,
  output logic          recon_valid,
  output dist_t         min_dist
);

  // Difference latch and 9-bit to 8-bit converter.
  logic signed [8:0] diff_reg;
  logic [1:0]        in_pos, diff_pos;
  logic              diff_vld;
  sample_t           lat [3];
  logic              tile_valid;
  tile_t             tile;
  logic              set_sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      diff_reg <= '0;
      in_pos   <= '0;
      diff_pos <= '0;
      diff_vld <= 1'b0;
      for (int c = 0; c < 3; c++) lat[c] <= '0;
    end else begin
      diff_reg <= signed'({1'b0, pix}) - signed'({1'b0, pv});
      diff_pos <= in_pos;
      in_pos   <= in_pos + 1'b1;
      diff_vld <= 1'b1;
      if (diff_vld && diff_pos != 2'd3) lat[diff_pos] <= diff_to_code(diff_reg);
    end
  end

  assign tile_valid = diff_vld && diff_pos == 2'd3;
  assign tile       = {diff_to_code(diff_reg), lat[2], lat[1], lat[0]};

  vq_flipflop #(.CHIPS_PER_SET(CHIPS_PER_SET)) u_vq (
    .clk(clk), .rst_n(rst_n), .vq_reset_n(vq_reset_n), .cw_we(cw_we),
    .cw_idx(cw_idx), .cw_data(cw_data), .tile_valid(tile_valid), .tile(tile), .index(index), .index_valid(index_valid),
    .min_dist(min_dist), .set_sel(set_sel));

  dvq_decoder #(.LINE_LEN(LINE_LEN), .N_CW(N_CW)) u_loop (
    .clk(clk), .rst_n(rst_n), .cw_we(cw_we), .cw_idx(cw_idx), .cw_data(cw_data),
    .index_valid(index_valid), .index(index), .pv(pv), .recon(recon),
    .recon_valid(recon_valid));

endmodule
