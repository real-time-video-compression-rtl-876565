// vq_flipflop: full-search vector quantizer of 32*CHIPS_PER_SET codewords
// built from two identical sets of associative-memory chips run in
// alternation ("flip-flop" arrangement).
//
// A single chip needs longer than one tile period to search, so tiles are
// dealt out alternately: tile k is latched into the input latch of set k%2
// and stays there for two tile periods. At the arrival of tile k+2 the
// enabled set's ADDR_OUT is latched as the index of tile k and the set's
// input latch is reloaded. A TILE_CLK flip-flop (set 1 enabled when high,
// set 0 when low) selects which set drives the shared index bus. Inside a
// set, the chips' COMPARE pins form one wired-NOR net per bit; the chip that
// stays valid drives the 5-bit ADDR_OUT bus and its position in the set
// gives the upper index bits (lowest position on a tie).
//
// Codebook download: while cw_we is high the codeword cw_data is put on
// VECTOR_IN of every chip and the STORE* of chip cw_idx[6:5] in both sets is
// pulled low, so both sets hold the same codebook.
//
// vq_reset_n (VQ_RESET*) clears the codewords of all chips; rst_n resets
// only the latches and the alternation.
// Interface: tile_valid pulses for one clk when tile (4 x 8-bit, offset
// binary) is complete. index/index_valid follow two tile_valid pulses later:
// with a tile every 4 clocks the index of a tile is latched 8 clocks after
// the tile, giving each set two tile periods (8 sample clocks) per search.
// The COMPARE net of a set ripples from the MSB down through the chips and
// back (see vampire_chip); it is acyclic bit by bit, so a combinational-loop
// warning on cmp_net stands and is harmless.
// min_dist is the winning l1 distance, set_sel the set that produced index.
// The two sets, the alternation, TILE_CLK-driven enables and shared store
// select follow the published vector quantizer; latching the result at the
// next load of the same set and the chip-number index bits are this design's.
module vq_flipflop
  import dvq_pkg::*;
#(
  parameter int unsigned CHIPS_PER_SET = 4,
  localparam int unsigned CW  = CW_PER_CHIP * CHIPS_PER_SET,
  localparam int unsigned IW  = $clog2(CW)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          vq_reset_n,   // VQ_RESET*: clears the chips' codebooks
  // codebook download
  input  logic          cw_we,
  input  logic [IW-1:0] cw_idx,
  input  tile_t         cw_data,
  // tiles to quantize
  input  logic          tile_valid,
  input  tile_t         tile,
  // result
  output logic [IW-1:0] index,
  output logic          index_valid,
  output dist_t         min_dist,
  output logic          set_sel
);

  logic             tile_clk;          // TILE_CLK: set 1 enabled when high
  logic [1:0]       loaded;            // set has a tile in its latch
  logic [VEC_W-1:0] vin_latch [2];     // per-set input latch
  logic [VEC_W-1:0] vin       [2];     // VECTOR_IN of each set

  // Per-set, per-chip signals.
  logic [CHIPS_PER_SET-1:0][DIST_W-1:0] drive_low [2];
  logic [CHIPS_PER_SET-1:0][DIST_W-1:0] cmp_int   [2];
  logic [CHIPS_PER_SET-1:0][CHIP_AW-1:0] addr_o   [2];
  logic [CHIPS_PER_SET-1:0]             oe        [2];
  logic [CHIPS_PER_SET-1:0]             cvo_n     [2];
  logic [DIST_W-1:0]                    cmp_net   [2];   // board wired-NOR
  logic [IW-1:0]                        set_index [2];
  logic [1:0]                           set_found;

  for (genvar s = 0; s < 2; s++) begin : g_set
    assign vin[s] = cw_we ? tile_to_bus(cw_data) : vin_latch[s];
    for (genvar k = 0; k < CHIPS_PER_SET; k++) begin : g_chip
      logic store_n;
      assign store_n = ~(cw_we && (CHIPS_PER_SET == 1 || int'(cw_idx) / int'(CW_PER_CHIP) == k));
      vampire_chip #(.N_CW(CW_PER_CHIP), .W(SAMPLE_W), .K(VEC_K)) u_chip (
        .clk             (clk),
        .reset_n         (vq_reset_n),
        .store_n         (store_n),
        .match_n         (1'b0),
        .enable          ((s == 1) ? tile_clk : ~tile_clk),
        .addr_in         (cw_idx[CHIP_AW-1:0]),
        .vector_in       (vin[s]),
        .chip_valid_in_n (1'b0),
        .cmp_pin         (cmp_net[s]),
        .cmp_drive_low   (drive_low[s][k]),
        .cmp_int         (cmp_int[s][k]),
        .chip_valid_out_n(cvo_n[s][k]),
        .addr_out        (addr_o[s][k]),
        .addr_oe         (oe[s][k])
      );
    end
    // Wired-NOR COMPARE net with pull-up: low if any chip pulls it low.
    always_comb begin
      cmp_net[s] = '1;
      for (int k = 0; k < CHIPS_PER_SET; k++)
        cmp_net[s] &= ~drive_low[s][k];
    end
    // Shared ADDR_OUT bus of the set: the lowest enabled valid chip drives it.
    always_comb begin
      set_index[s] = '0;
      set_found[s] = 1'b0;
      for (int k = CHIPS_PER_SET-1; k >= 0; k--)
        if (oe[s][k]) begin
          set_index[s] = IW'((k << CHIP_AW) | int'(addr_o[s][k]));
          set_found[s] = 1'b1;
        end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tile_clk     <= 1'b0;
      loaded       <= '0;
      vin_latch[0] <= '0;
      vin_latch[1] <= '0;
      index        <= '0;
      index_valid  <= 1'b0;
      min_dist     <= '0;
      set_sel      <= 1'b0;
    end else begin
      index_valid <= 1'b0;
      if (tile_valid) begin
        // The set about to be reloaded is the enabled one: latch its answer.
        if (loaded[tile_clk]) begin
          index       <= set_index[tile_clk];
          min_dist    <= cmp_net[tile_clk];
          set_sel     <= tile_clk;
          index_valid <= 1'b1;
        end
        vin_latch[tile_clk] <= tile_to_bus(tile);
        loaded[tile_clk]    <= 1'b1;
        tile_clk             <= ~tile_clk;
      end
    end
  end

  // Exactly one set drives the index bus whenever a result is latched.
  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n)
    (tile_valid && loaded[tile_clk]) |-> set_found[tile_clk]);

endmodule
