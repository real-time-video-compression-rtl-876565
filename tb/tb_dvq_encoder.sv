// tb_dvq_encoder: the encoder codes a synthetic composite-video-like signal
// (a 4-sample-period subcarrier on a slowly varying level, with noise and
// hard edges) with a mixed codebook. Every prediction, every index and every
// reconstructed sample is compared with the reference model, including the
// clock on which it appears: index of tile k at clock 4k+13, reconstruction
// of sample n at clock n+16. Lines are shortened to 46 samples (same
// 2-samples-per-line subcarrier shift as 910) to reach many lines quickly.
module tb_dvq_encoder;
  import dvq_pkg::*;
  import dvq_ref_pkg::*;
  localparam int L = 46, NS = 46 * 40;
  logic clk = 0, rst_n = 1, vq_reset_n = 0, cw_we = 0;
  logic [6:0] cw_idx = '0, index;
  tile_t cw_data = '0;
  sample_t pix = '0, pv, recon;
  logic index_valid, recon_valid;
  dist_t min_dist;
  int cyc = 0, checks = 0, failures = 0;
  int pv_d [$], rc_d [$], rc_c [$], ix_d [$], ix_c [$];
  dvq_model m;

  always #5 clk = ~clk;
  initial #2 rst_n = 0;

  dvq_encoder #(.LINE_LEN(L)) dut (.clk(clk), .rst_n(rst_n), .vq_reset_n(vq_reset_n), .cw_we(cw_we),
    .cw_idx(cw_idx), .cw_data(cw_data), .pix(pix), .index(index),
    .index_valid(index_valid), .pv(pv), .recon(recon), .recon_valid(recon_valid),
    .min_dist(min_dist));

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
    if ((n % L) < 3) v = 2;            // sync-like dips
    return byte'((v < 0) ? 0 : (v > 255) ? 255 : v);
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned px [$];
    m = new(L, 128);
    repeat (2) @(negedge clk);
    rst_n = 1;
    vq_reset_n = 1;
    for (int j = 0; j < 128; j++) begin
      for (int c = 0; c < 4; c++) begin
        m.cb[j][c] = (j < 64) ? byte'(128 + $urandom_range(0, 40) - 20) : byte'($urandom_range(0, 255));
        cw_data[c] = m.cb[j][c];
      end
      cw_idx = 7'(j); cw_we = 1;
      @(negedge clk);
    end
    cw_we = 0;
    // Restart the coding loop with the codebook in place (VQ_RESET* stays high).
    rst_n = 0; #1; rst_n = 1;
    for (cyc = 0; cyc < NS + 40; cyc++) begin
      pix = (cyc < NS) ? video(cyc) : 8'd0;
      px.push_back(pix);
      pv_d.push_back(int'(pv));
      if (recon_valid) begin rc_d.push_back(int'(recon)); rc_c.push_back(cyc); end
      if (index_valid) begin ix_d.push_back(int'(index)); ix_c.push_back(cyc); end
      @(negedge clk);
    end
    for (int k = 0; k < NS / 4; k++) begin
      byte unsigned t[4];
      for (int c = 0; c < 4; c++) t[c] = px[4 * k + c];
      m.code_tile(t);
    end
    for (int k = 0; k < NS / 4; k++) begin
      check("index", ix_d[k], int'(m.idx[k]));
      check("index clock", ix_c[k], 4 * k + 13);
    end
    for (int n = 0; n < NS; n++) begin check("pv", pv_d[n], int'(m.pvs[n])); end
    for (int n = 0; n < NS; n++) begin
      check("recon", rc_d[n], int'(m.recon[n]));
      check("recon clock", rc_c[n], n + 16);
    end
    $display("saturated differences %0d, clamped reconstructions %0d", m.n_sat, m.n_clamp);
    checks++;
    if (m.n_sat == 0 || m.n_clamp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
