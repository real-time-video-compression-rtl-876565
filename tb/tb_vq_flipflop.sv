// tb_vq_flipflop: 128-codeword flip-flop quantizer. A random codebook is
// downloaded, then a tile is presented every 4 clocks (the tile rate at
// 14.31818 MHz). Each index and minimum distance is compared with a full
// search, its latency must be exactly 8 clocks plus the output latch, and
// results must come alternately from set 0 and set 1.
module tb_vq_flipflop;
  import dvq_pkg::*;
  logic clk = 0, rst_n = 1;
  logic cw_we = 0, tile_valid = 0;
  logic [6:0] cw_idx = '0, index;
  tile_t cw_data = '0, tile = '0;
  logic index_valid, set_sel;
  dist_t min_dist;
  byte unsigned cb [128][4];
  tile_t tiles [$];
  int unsigned tile_cyc [$];
  int cyc = 0, checks = 0, failures = 0, got = 0;
  int n_set[2] = '{0, 0};
  int n_hi_chip = 0;
  logic last_set = 1'b1;

  always #5 clk = ~clk;
  initial #2 rst_n = 0;
  always @(posedge clk) cyc <= cyc + 1;

  vq_flipflop dut (.clk(clk), .rst_n(rst_n), .vq_reset_n(rst_n), .cw_we(cw_we), .cw_idx(cw_idx),
    .cw_data(cw_data), .tile_valid(tile_valid), .tile(tile), .index(index),
    .index_valid(index_valid), .min_dist(min_dist), .set_sel(set_sel));

  task automatic check(string what, int g, int e);
    checks++;
    if (g != e) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d (cyc %0d)", what, g, e, cyc);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Result monitor.
  always @(negedge clk) if (rst_n && index_valid) begin
    byte unsigned v[4];
    int unsigned best, bd, tc;
    tile_t tv;
    best = 0;
    bd = 99999;
    tv = tiles.pop_front();
    for (int c = 0; c < 4; c++) v[c] = tv[c];
    tc = tile_cyc.pop_front();
    for (int j = 0; j < 128; j++)
      if (dvq_ref_pkg::l1(cb[j], v) < bd) begin bd = dvq_ref_pkg::l1(cb[j], v); best = j; end
    check("index", int'(index), int'(best));
    check("dist", int'(min_dist), int'(bd));
    check("latency", cyc - int'(tc), 9);
    check("alternation", int'(set_sel), int'(!last_set));
    last_set = set_sel;
    n_set[set_sel]++;
    if (best >= 32) n_hi_chip++;
    got++;
  end

  initial begin
    byte unsigned v[4];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < 128; j++) begin
      for (int c = 0; c < 4; c++) begin
        cb[j][c] = byte'($urandom_range(0, 255));
        cw_data[c] = cb[j][c];
      end
      cw_idx = 7'(j);
      cw_we = 1;
      @(negedge clk);
    end
    cw_we = 0;
    repeat (3) @(negedge clk);
    for (int t = 0; t < 2000; t++) begin
      for (int c = 0; c < 4; c++) v[c] = byte'($urandom_range(0, 255));
      if (t % 7 == 0) v = cb[$urandom_range(0, 127)];
      for (int c = 0; c < 4; c++) tile[c] = v[c];
      tiles.push_back(tile);
      tile_cyc.push_back(cyc);
      tile_valid = 1;
      @(negedge clk);
      tile_valid = 0;
      repeat (3) @(negedge clk);
    end
    // two more tiles flush the last two results
    repeat (2) begin
      tile_valid = 1; tiles.push_back(tile); tile_cyc.push_back(cyc);
      @(negedge clk); tile_valid = 0; repeat (3) @(negedge clk);
    end
    check("results", got, 2000);
    checks++;
    if (n_set[0] == 0 || n_set[1] == 0 || n_hi_chip == 0) failures++;
    $display("set0 %0d set1 %0d, wins outside chip 0: %0d", n_set[0], n_set[1], n_hi_chip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
