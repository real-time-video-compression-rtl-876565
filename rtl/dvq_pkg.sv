// dvq_pkg: types and constants shared by the differential vector quantization
// (DVQ) video encoder/decoder.
//
// The system codes 8-bit samples of composite colour video taken at four
// times the colour-subcarrier frequency. Four consecutive samples form one
// tile (a 4-dimensional vector). Difference tiles are matched against a
// codebook held in associative-memory chips of 32 codewords each; two sets of
// four chips give the 128-codeword codebook and 7-bit indices.
package dvq_pkg;

  localparam int unsigned SAMPLE_W  = 8;   // bits per video sample / component
  localparam int unsigned VEC_K     = 4;   // components per tile (4x1 tile)
  localparam int unsigned CW_PER_CHIP = 32; // codewords per associative-memory chip
  localparam int unsigned CHIP_AW   = 5;   // log2(CW_PER_CHIP)
  localparam int unsigned DIST_W    = 10;  // l1 distance of 4 x 8-bit components
  localparam int unsigned VEC_W     = SAMPLE_W * VEC_K; // 32-bit VECTOR_IN

  typedef logic [SAMPLE_W-1:0] sample_t;
  // One tile, component c = sample c of the tile in time order.
  typedef logic [VEC_K-1:0][SAMPLE_W-1:0] tile_t;
  typedef logic [DIST_W-1:0] dist_t;

  // Chip bus layout: bit b of component c sits on VECTOR_IN[4*b + c], so the
  // nibble VECTOR_IN[4b+3:4b] feeds the computation cells of bit b.
  function automatic logic [VEC_W-1:0] tile_to_bus(tile_t t);
    logic [VEC_W-1:0] v;
    for (int b = 0; b < SAMPLE_W; b++)
      for (int c = 0; c < VEC_K; c++)
        v[VEC_K*b + c] = t[c][b];
    return v;
  endfunction

  function automatic tile_t bus_to_tile(logic [VEC_W-1:0] v);
    tile_t t;
    for (int b = 0; b < SAMPLE_W; b++)
      for (int c = 0; c < VEC_K; c++)
        t[c][b] = v[VEC_K*b + c];
    return t;
  endfunction

  // Host commands accepted by the system controller.
  typedef enum logic [2:0] {
    CMD_NOP      = 3'd0,
    CMD_LOAD_CW  = 3'd1,  // addr = codeword index, data = {c3,c2,c1,c0}
    CMD_SET_MODE = 3'd2,  // data[0] = encoder source, data[2:1] = D/A source
    CMD_CAPTURE  = 3'd3,  // capture the next frame into the frame buffer
    CMD_PLAY     = 3'd4,  // data[0] = 1 start / 0 stop frame-buffer playback
    CMD_FB_WRITE = 3'd5,  // addr = frame-buffer address, data[7:0] = byte
    CMD_FB_READ  = 3'd6,  // addr = frame-buffer address, reply on rsp_*
    CMD_RESTART  = 3'd7   // restart the coding loops of encoder and decoder
  } host_cmd_e;

  // Sources selectable for the D/A converter.
  typedef enum logic [1:0] {
    DAC_VIDEO   = 2'd0,  // video bus: A/D samples or frame-buffer playback
    DAC_ENCODER = 2'd1,  // reconstructed samples inside the encoder
    DAC_DECODER = 2'd2   // decoder output
  } dac_sel_e;

  // 9-bit to 8-bit converter: saturate pixel-minus-prediction to the signed
  // 8-bit range and re-code it as offset binary, so that the unsigned l1
  // distance of the associative memory measures the signed difference.
  function automatic sample_t diff_to_code(logic signed [8:0] d);
    logic signed [8:0] s;
    s = (d > 9'sd127) ? 9'sd127 : (d < -9'sd128) ? -9'sd128 : d;
    return {~s[7], s[6:0]};
  endfunction

  // Codeword component (offset binary) back to a signed difference.
  function automatic logic signed [8:0] code_to_diff(sample_t c);
    return 9'(signed'({~c[7], c[6:0]}));
  endfunction

endpackage
