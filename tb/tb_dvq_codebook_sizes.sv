// tb_dvq_codebook_sizes: runs the encoder with codebooks of 32, 64 and 128
// codewords.
//
// The 128-codeword quantizer (two sets of four chips, the default) carries
// the 32- and 64-word codebooks as follows. The first N entries are loaded
// with the codebook. Every entry j >= N holds a copy of entry j mod N. A copy
// ties with its original, and the lowest index wins a tie, so the index never
// reaches N: only log2(N) of the 7 index bits carry information.
// A 256-word codebook needs CHIPS_PER_SET = 8 (sixteen chips) and is not
// run here.
//
// For each size the testbench:
//   1. loads the codebook through the codeword port;
//   2. restarts the coding loop;
//   3. codes 40 short lines (46 samples, the same two-sample subcarrier shift
//      per line as a 910-sample line);
//   4. compares every index and reconstructed sample, and the clocks they
//      appear on, with the reference model, and checks that every index is
//      below N.
// It prints the mean squared error of the reconstruction for each size.
module tb_dvq_codebook_sizes;
  import dvq_pkg::*;
  import dvq_ref_pkg::*;
  localparam int L = 46, NS = 46 * 40;
  logic clk = 0, rst_n = 1, vq_reset_n = 0, cw_we = 0;
  logic [6:0] cw_idx = '0;
  tile_t cw_data = '0;
  sample_t pix = '0;
  logic [6:0] index4;
  sample_t pv4, recon4;
  logic iv4, rv4;
  dist_t md4;
  int phase = 0, cyc = 0, checks = 0, failures = 0;
  int sizes[3] = '{32, 64, 128};

  always #5 clk = ~clk;
  initial #2 rst_n = 0;

  dvq_encoder #(.LINE_LEN(L)) dut (.clk(clk), .rst_n(rst_n), .vq_reset_n(vq_reset_n),
    .cw_we(cw_we), .cw_idx(cw_idx), .cw_data(cw_data), .pix(pix),
    .index(index4), .index_valid(iv4), .pv(pv4), .recon(recon4), .recon_valid(rv4),
    .min_dist(md4));

  task automatic check(string what, int g, int e);
    checks++;
    if (g != e) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", what, g, e);
    end
  endtask

  function automatic byte unsigned video(int n);
    int v = 100 + 40 * (((n / L) / 8) % 3) + (((n % L) > 30) ? 90 : 0);
    int sc[4] = '{0, 30, 0, -30};
    v += sc[n % 4] * (((n / L) % 2) ? -1 : 1) + $urandom_range(0, 6) - 3;
    if ((n % L) < 3) v = 2;
    return byte'((v < 0) ? 0 : (v > 255) ? 255 : v);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    vq_reset_n = 1;
    for (phase = 0; phase < 3; phase++) begin
      dvq_model m;
      byte unsigned px [$];
      int rc_d [$], rc_c [$], ix_d [$], ix_c [$];
      int n, slots;
      longint unsigned sq;
      n = sizes[phase];
      slots = 128;
      px.delete(); rc_d.delete(); rc_c.delete(); ix_d.delete(); ix_c.delete();
      m = new(L, n);
      for (int j = 0; j < n; j++)
        for (int c = 0; c < 4; c++)
          m.cb[j][c] = (j < n / 2) ? byte'(128 + $urandom_range(0, 40) - 20)
                                   : byte'($urandom_range(0, 255));
      for (int j = 0; j < slots; j++) begin
        for (int c = 0; c < 4; c++) cw_data[c] = m.cb[j % n][c];
        cw_idx = 7'(j); cw_we = 1;
        @(negedge clk);
      end
      cw_we = 0;
      rst_n = 0; #1; rst_n = 1;
      for (cyc = 0; cyc < NS + 40; cyc++) begin
        pix = (cyc < NS) ? video(cyc) : 8'd0;
        px.push_back(pix);
        if (rv4) begin rc_d.push_back(int'(recon4)); rc_c.push_back(cyc); end
        if (iv4) begin ix_d.push_back(int'(index4)); ix_c.push_back(cyc); end
        @(negedge clk);
      end
      for (int k = 0; k < NS / 4; k++) begin
        byte unsigned t[4];
        for (int c = 0; c < 4; c++) t[c] = px[4 * k + c];
        m.code_tile(t);
      end
      for (int k = 0; k < NS / 4; k++) begin
        check("index", ix_d[k], int'(m.idx[k]));
        check("index below codebook size", int'(ix_d[k] < n), 1);
        check("index clock", ix_c[k], 4 * k + 13);
      end
      sq = 0;
      for (int s = 0; s < NS; s++) begin
        check("recon", rc_d[s], int'(m.recon[s]));
        check("recon clock", rc_c[s], s + 16);
        sq += longint'((rc_d[s] - int'(px[s])) * (rc_d[s] - int'(px[s])));
      end
      $display("codebook %0d: %0d tiles, MSE %0d.%02d", n, NS / 4, sq / NS, (sq * 100 / NS) % 100);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
