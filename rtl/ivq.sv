// ivq: inverse vector quantizer, a codebook lookup.
//
// Four RAMs, one per vector component, hold the codebook (the same codewords
// as the vector quantizer, offset-binary differences). When an index
// arrives, the RAMs are enabled onto a shared output bus one after the other,
// so the four components of the decoded difference tile come out one per
// sample clock, in tile order, ready to be added to the predictions.
// Interface: cw_we writes cw_data (components 3..0) at cw_idx in all four
// RAMs. index is taken when index_valid is high; dhat/dhat_valid then carry
// component 0 two clocks later and components 1..3 on the following clocks.
// Four RAMs and the shared bus follow the published inverse quantizer; the
// read sequencing is this design's.
module ivq
  import dvq_pkg::*;
#(
  parameter int unsigned N_CW = 128,
  localparam int unsigned IW  = $clog2(N_CW)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cw_we,
  input  logic [IW-1:0] cw_idx,
  input  tile_t         cw_data,
  input  logic          index_valid,
  input  logic [IW-1:0] index,
  output sample_t       dhat,
  output logic          dhat_valid
);

  sample_t ram [VEC_K][N_CW];

  always_ff @(posedge clk) begin
    if (cw_we)
      for (int c = 0; c < VEC_K; c++) ram[c][cw_idx] <= cw_data[c];
  end

  logic [IW-1:0] idx_l;
  logic [1:0]    sel;
  logic          run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_l      <= '0;
      sel        <= '0;
      run        <= 1'b0;
      dhat       <= '0;
      dhat_valid <= 1'b0;
    end else begin
      dhat_valid <= run;
      if (run) dhat <= ram[sel][idx_l];
      if (index_valid) begin
        idx_l <= index;
        sel   <= '0;
        run   <= 1'b1;
      end else if (run) begin
        sel <= sel + 1'b1;
        if (sel == 2'd3) run <= 1'b0;
      end
    end
  end

endmodule
