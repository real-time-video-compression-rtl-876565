// dvq_decoder: DVQ decoder, also the reconstruction loop inside the encoder.
//
// Each received index is looked up in the inverse vector quantizer, giving
// four difference components; each is added to the prediction of its sample
// and the sum is clamped to 0..255 (overflow/underflow correction) to give the
// reconstructed sample. Reconstructed samples feed the predictor, which
// predicts the samples of later lines. The encoder holds an identical copy of
// this loop, so with an error-free channel the decoder's output equals the
// encoder's reconstruction sample for sample.
//
// Timing: the decoder keeps the encoder's time base. pv is the prediction for
// the sample entering the encoder in this clock; it is delayed by a FIFO of
// PV_DELAY clocks to meet that sample's decoded difference. With an index
// arriving 13 clocks after the first sample of its tile, sample n is
// reconstructed RECON_LAT = 16 clocks after it entered (about 1.1 us at
// 14.31818 MHz). recon_valid marks clocks that carry a decoded sample.
// The loop structure follows the published encoder/decoder; the latency
// numbers and the clamp-to-range correction are this design's.
module dvq_decoder
  import dvq_pkg::*;
#(
  parameter int unsigned LINE_LEN = 910,
  parameter int unsigned N_CW     = 128,
  localparam int unsigned IW      = $clog2(N_CW)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cw_we,
  input  logic [IW-1:0] cw_idx,
  input  tile_t         cw_data,
  input  logic          index_valid,
  input  logic [IW-1:0] index,
  output sample_t       pv,
  output sample_t       recon,
  output logic          recon_valid
);

  localparam int unsigned RECON_LAT = 16;
  localparam int unsigned PV_DELAY  = RECON_LAT - 1;

  sample_t dhat;
  logic    dhat_valid;
  sample_t pv_d;

  ivq #(.N_CW(N_CW)) u_ivq (
    .clk(clk), .rst_n(rst_n), .cw_we(cw_we), .cw_idx(cw_idx), .cw_data(cw_data),
    .index_valid(index_valid), .index(index), .dhat(dhat), .dhat_valid(dhat_valid));

  dvq_predictor #(.LINE_LEN(LINE_LEN), .RECON_LAT(RECON_LAT)) u_pred (
    .clk(clk), .rst_n(rst_n), .recon(recon), .pv(pv));

  delay_fifo #(.DEPTH(2048), .W(SAMPLE_W), .DELAY(PV_DELAY)) u_pv_fifo (
    .clk(clk), .rst_n(rst_n), .din(pv), .dout(pv_d));

  logic signed [9:0] sum;
  always_comb sum = signed'({2'b00, pv_d}) + 10'(code_to_diff(dhat));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      recon       <= '0;
      recon_valid <= 1'b0;
    end else begin
      recon_valid <= dhat_valid;
      if (dhat_valid)
        recon <= (sum < 0) ? 8'd0 : (sum > 10'sd255) ? 8'd255 : sample_t'(sum);
    end
  end

endmodule
