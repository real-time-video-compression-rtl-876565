// tb_dvq_decoder: a random index stream, one index every 4 clocks starting
// at clock 13, is decoded; predictions and reconstructed samples (clock
// n+16 for sample n) are compared with the reference model. Lines are
// shortened to 46 samples.
module tb_dvq_decoder;
  import dvq_pkg::*;
  import dvq_ref_pkg::*;
  localparam int L = 46, NT = 46 * 30 / 4;
  logic clk = 0, rst_n = 1, cw_we = 0, index_valid = 0, recon_valid;
  logic [6:0] cw_idx = '0, index = '0;
  tile_t cw_data = '0;
  sample_t pv, recon;
  int cyc = 0, checks = 0, failures = 0;
  int pv_d [$], rc_d [$], rc_c [$];
  dvq_model m;

  always #5 clk = ~clk;
  initial #2 rst_n = 0;

  dvq_decoder #(.LINE_LEN(L)) dut (.clk(clk), .rst_n(rst_n), .cw_we(cw_we),
    .cw_idx(cw_idx), .cw_data(cw_data), .index_valid(index_valid), .index(index),
    .pv(pv), .recon(recon), .recon_valid(recon_valid));

  task automatic check(string what, int g, int e);
    checks++;
    if (g != e) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", what, g, e);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent [$];
    m = new(L, 128);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < 128; j++) begin
      for (int c = 0; c < 4; c++) begin
        m.cb[j][c] = byte'(128 + $urandom_range(0, 120) - 60);
        cw_data[c] = m.cb[j][c];
      end
      cw_idx = 7'(j); cw_we = 1;
      @(negedge clk);
    end
    cw_we = 0;
    rst_n = 0; #1; rst_n = 1;
    for (cyc = 0; cyc < 4 * NT + 40; cyc++) begin
      index_valid = (cyc >= 13 && (cyc - 13) % 4 == 0 && (cyc - 13) / 4 < NT);
      if (index_valid) begin index = 7'($urandom_range(0, 127)); sent.push_back(int'(index)); end
      pv_d.push_back(int'(pv));
      if (recon_valid) begin rc_d.push_back(int'(recon)); rc_c.push_back(cyc); end
      @(negedge clk);
    end
    foreach (sent[k]) m.decode_next(sent[k]);
    for (int n = 0; n < 4 * NT; n++) begin
      check("pv", pv_d[n], int'(m.pvs[n]));
      check("recon", rc_d[n], int'(m.recon[n]));
      check("recon clock", rc_c[n], n + 16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
