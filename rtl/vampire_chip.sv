// vampire_chip: digital associative memory for full-search vector
// quantization of 4-dimensional, 8-bit vectors against 32 stored codewords.
//
// How it works. Every codeword j is a row of eight bit-slice computation
// cells; cell b holds bit b of the four components. Per component, a
// greater-than chain and a one's-complement adder give |C - I|
// (vampire_absdiff); two component sums and a final sum give the 10-bit l1
// distance D_j (the two top bits come from the row's overflow cell). The
// winner is then found bit-serially from the MSB down on a wired-NOR COMPARE
// bus: a codeword still in competition pulls COMPARE(b) low when its distance
// bit b is 0, and a codeword whose bit is 1 while COMPARE(b) is low is
// eliminated (its PROPAGATE chain goes low). After bit 0 the COMPARE bus holds
// the minimum distance and the surviving codeword(s) drive the priority
// encoder, which outputs the lowest surviving address on ADDR_OUT.
//
// Several chips form a larger codebook through the external COMPARE pins:
// per bit, from the MSB down, a chip that is still valid drives its pin low
// when its internal COMPARE line is low; a chip whose internal line is high
// while the pin reads low drops out (CHIP-VALID-OUT, active low, goes high).
// cmp_drive_low is the pin's pull-down, cmp_pin the level read back from the
// board-level wired-NOR net. For a single chip tie cmp_pin = ~cmp_drive_low.
// cmp_drive_low[b] depends only on cmp_pin bits above b, so the path through
// the board net is a ripple, not a true combinational loop; lint tools that
// treat the vectors as whole signals may still report a loop there.
//
// Interface and timing. The search is combinational from vector_in to
// cmp_int/cmp_drive_low/addr_out, as in the asynchronous chip; the caller
// holds vector_in steady for the whole search time. Codewords are written on
// the rising clk edge while store_n is low (addr_in selects the row,
// vector_in carries the codeword in bus layout); reset_n low clears all
// codewords to zero. match_n low enables the search; enable gates the
// ADDR_OUT drivers (addr_oe). The l1 metric, the one's-complement method, the
// bit-slice order, the wired-NOR GCC and the interchip rule follow the
// published chip; the clocked store, the reset action, the lowest-address tie
// rule and the enable meaning are this design's choices.
module vampire_chip
#(
  parameter int unsigned N_CW = 32,
  parameter int unsigned W    = 8,
  parameter int unsigned K    = 4,
  localparam int unsigned AW  = $clog2(N_CW),
  localparam int unsigned DW  = W + $clog2(K)
) (
  input  logic           clk,
  input  logic           reset_n,        // RESET*: clear codeword memory
  input  logic           store_n,        // STORE*: write codeword at addr_in
  input  logic           match_n,        // MATCH*: enable the search
  input  logic           enable,         // ENABLE: drive ADDR_OUT
  input  logic [AW-1:0]  addr_in,        // ADDR_IN
  input  logic [W*K-1:0] vector_in,      // VECTOR_IN, bit b of comp c at K*b+c
  input  logic           chip_valid_in_n,// CHIP-VALID-IN* (tie low if alone)
  input  logic [DW-1:0]  cmp_pin,        // external COMPARE pins, level read
  output logic [DW-1:0]  cmp_drive_low,  // external COMPARE pins, pull-down
  output logic [DW-1:0]  cmp_int,        // internal COMPARE bus (chip minimum)
  output logic           chip_valid_out_n,// CHIP-VALID-OUT*: 0 = holds winner
  output logic [AW-1:0]  addr_out,       // ADDR_OUT: winning codeword address
  output logic           addr_oe         // ADDR_OUT drivers enabled
);

  // Codeword memory: row j, bus layout (K bits per bit-slice cell).
  logic [W*K-1:0] mem [N_CW];

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      for (int j = 0; j < N_CW; j++) mem[j] <= '0;
    end else if (!store_n) begin
      mem[addr_in] <= vector_in;
    end
  end

  // l1 distance (METRIC) of every codeword.
  logic [DW-1:0] metric [N_CW];

  for (genvar j = 0; j < N_CW; j++) begin : g_row
    logic [K-1:0][W-1:0] cc, ii, dd;
    logic [K-1:0]        gtc;
    always_comb begin
      for (int b = 0; b < W; b++)
        for (int c = 0; c < K; c++) begin
          cc[c][b] = mem[j][K*b + c];
          ii[c][b] = vector_in[K*b + c];
        end
    end
    for (genvar c = 0; c < K; c++) begin : g_comp
      vampire_absdiff #(.W(W)) u_ad (.c(cc[c]), .i(ii[c]), .gt(gtc[c]), .d(dd[c]));
    end
    // Component sums 0,1 and 2,3, then the final sum.
    always_comb begin
      logic [DW-1:0] s01, s23;
      s01 = DW'(dd[0]) + DW'(dd[1]);
      s23 = DW'(0);
      for (int c = 2; c < K; c++) s23 += DW'(dd[c]);
      metric[j] = s01 + s23;
    end
  end

  // Global compare circuit: MSB-first elimination on the internal bus,
  // followed by the interchip winner selection on the external pins.
  logic [N_CW-1:0] alive;   // PROPAGATE-OUT at bit 0

  always_comb begin
    logic [N_CW-1:0] prop;
    logic            vn;
    prop = {N_CW{~match_n}};
    vn   = chip_valid_in_n | match_n;
    for (int b = DW-1; b >= 0; b--) begin
      logic pull;
      pull = 1'b0;
      for (int j = 0; j < N_CW; j++)
        pull |= prop[j] & ~metric[j][b];
      cmp_int[b] = ~pull;
      for (int j = 0; j < N_CW; j++)
        prop[j] &= ~(metric[j][b] & ~cmp_int[b]);
      // Interchip winner selection for this bit.
      cmp_drive_low[b] = ~vn & ~cmp_int[b];
      vn = vn | (cmp_int[b] & ~cmp_pin[b]);
    end
    alive = prop;
    chip_valid_out_n = vn;
  end

  // Priority encoder: lowest surviving address wins.
  always_comb begin
    addr_out = '0;
    for (int j = N_CW-1; j >= 0; j--)
      if (alive[j]) addr_out = AW'(j);
  end

  assign addr_oe = enable & ~chip_valid_out_n;

endmodule
