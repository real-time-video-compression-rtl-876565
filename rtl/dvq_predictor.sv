// dvq_predictor: spatial predictor for sampled NTSC composite video.
//
// Samples are taken at four times the colour-subcarrier frequency, so the
// subcarrier advances 90 degrees per sample and, with 910 samples per line,
// 180 degrees per line of a field. Only samples of the same subcarrier phase
// as the current sample X may be used: A, two lines up at the same position,
// and B and C on the previous line two samples to the left and to the right.
// The prediction is P = ((B + C)/2 + A)/2, each halving done by dropping the
// least-significant bit. In sample time, C = R[n-908], B = R[n-912] and
// A = R[n-1820], where R is the stream of reconstructed samples.
//
// Structure: three cascaded FIFO delay lines on the reconstructed stream,
// tapped after the first (C), second (B) and third (A); one adder for B + C,
// a halving, a second adder for the A term, a halving and an output latch.
// Interface: recon enters every clk and appears here RECON_LAT clocks after
// the clock on which its own prediction was on pv; pv is registered and is
// the prediction for the sample entering the encoder in the same clock. The
// delays of the first FIFO absorb RECON_LAT so that the taps land exactly on
// n-908, n-912 and n-1820. The prediction rule and the FIFO cascade follow
// the published predictor; the latency bookkeeping is this design's.
module dvq_predictor
  import dvq_pkg::*;
#(
  parameter int unsigned LINE_LEN  = 910,
  parameter int unsigned RECON_LAT = 16,
  parameter int unsigned FIFO_DEPTH = 2048
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t recon,
  output sample_t pv
);

  localparam int unsigned D1 = LINE_LEN - 2 - RECON_LAT - 1;  // to C
  localparam int unsigned D2 = 4;                             // C to B
  localparam int unsigned D3 = LINE_LEN - 2;                  // B to A

  sample_t tap_c, tap_b, tap_a;

  delay_fifo #(.DEPTH(FIFO_DEPTH), .W(SAMPLE_W), .DELAY(D1)) u_fifo_c (
    .clk(clk), .rst_n(rst_n), .din(recon), .dout(tap_c));
  delay_fifo #(.DEPTH(FIFO_DEPTH), .W(SAMPLE_W), .DELAY(D2)) u_fifo_b (
    .clk(clk), .rst_n(rst_n), .din(tap_c), .dout(tap_b));
  delay_fifo #(.DEPTH(FIFO_DEPTH), .W(SAMPLE_W), .DELAY(D3)) u_fifo_a (
    .clk(clk), .rst_n(rst_n), .din(tap_b), .dout(tap_a));

  logic [SAMPLE_W:0] sum_bc, sum_a;

  always_comb begin
    sum_bc = {1'b0, tap_b} + {1'b0, tap_c};
    sum_a  = {1'b0, sum_bc[SAMPLE_W:1]} + {1'b0, tap_a};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pv <= '0;
    else        pv <= sum_a[SAMPLE_W:1];
  end

endmodule
