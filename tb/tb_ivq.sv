// tb_ivq: random 128-word codebook; an index every 4 clocks must produce
// its four components in order, the first two clocks after the index.
module tb_ivq;
  import dvq_pkg::*;
  logic clk = 0, rst_n = 1, cw_we = 0, index_valid = 0, dhat_valid;
  logic [6:0] cw_idx = '0, index = '0;
  tile_t cw_data = '0;
  sample_t dhat;
  byte unsigned cb [128][4];
  int exp_q [$];
  int vcyc [$];
  int cyc = 0, checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial #2 rst_n = 0;
  always @(posedge clk) cyc <= cyc + 1;

  ivq dut (.clk(clk), .rst_n(rst_n), .cw_we(cw_we), .cw_idx(cw_idx),
    .cw_data(cw_data), .index_valid(index_valid), .index(index), .dhat(dhat),
    .dhat_valid(dhat_valid));

  always @(negedge clk) if (rst_n && dhat_valid) begin
    checks += 2;
    if (exp_q.size() == 0 || int'(dhat) != exp_q.pop_front()) begin
      failures++; if (failures < 10) $display("FAIL data cyc %0d", cyc); end
    if (cyc - vcyc.pop_front() != 2) begin
      failures++; if (failures < 10) $display("FAIL timing cyc %0d", cyc); end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < 128; j++) begin
      for (int c = 0; c < 4; c++) begin cb[j][c] = byte'($urandom); cw_data[c] = cb[j][c]; end
      cw_idx = 7'(j); cw_we = 1; @(negedge clk);
    end
    cw_we = 0;
    for (int t = 0; t < 1000; t++) begin
      int j = $urandom_range(0, 127);
      index = 7'(j); index_valid = 1;
      for (int c = 0; c < 4; c++) begin exp_q.push_back(int'(cb[j][c])); vcyc.push_back(cyc + c); end
      @(negedge clk); index_valid = 0;
      repeat (3) @(negedge clk);
    end
    repeat (6) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
