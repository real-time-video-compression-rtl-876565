// tb_vampire_chip: two associative-memory chips share one wired-NOR COMPARE
// net, as when chips are linked for a 64-codeword codebook. Random codebooks
// are stored through STORE*; for random input vectors each chip's internal
// minimum and winning address, the net's global minimum and which chip stays
// valid are compared with a direct full search. Also checks RESET* and
// MATCH*, and the winner's distance bits on the net.
module tb_vampire_chip;
  import dvq_pkg::*;
  logic clk = 0, reset_n = 1, match_n = 0, enable = 1;
  logic [1:0] store_n = 2'b11;
  logic [4:0] addr_in = '0;
  logic [31:0] vin = '0;
  logic [9:0] drv [2], cint [2], net;
  logic [1:0] cvo_n, oe;
  logic [4:0] aout [2];
  byte unsigned cb [2][32][4];
  int checks = 0, failures = 0;
  int n_chip1_wins = 0, n_ties = 0;

  always #5 clk = ~clk;
  initial #2 reset_n = 0;
  assign net = ~(drv[0] | drv[1]);

  for (genvar k = 0; k < 2; k++) begin : g
    vampire_chip dut (.clk(clk), .reset_n(reset_n), .store_n(store_n[k]),
      .match_n(match_n), .enable(enable), .addr_in(addr_in), .vector_in(vin),
      .chip_valid_in_n(1'b0), .cmp_pin(net), .cmp_drive_low(drv[k]),
      .cmp_int(cint[k]), .chip_valid_out_n(cvo_n[k]), .addr_out(aout[k]),
      .addr_oe(oe[k]));
  end

  function automatic logic [31:0] pack(byte unsigned v[4]);
    tile_t t;
    for (int c = 0; c < 4; c++) t[c] = v[c];
    return tile_to_bus(t);
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned v[4];
    repeat (2) @(posedge clk);
    reset_n = 1;
    // After reset every codeword is zero: distance = sum of components.
    v = '{8'd10, 8'd20, 8'd30, 8'd40};
    vin = pack(v);
    #1;
    check("reset min", int'(cint[0]), 100);
    check("reset addr", int'(aout[0]), 0);
    // Store random codebooks.
    for (int k = 0; k < 2; k++)
      for (int j = 0; j < 32; j++) begin
        for (int c = 0; c < 4; c++) cb[k][j][c] = byte'($urandom_range(0, 255));
        @(negedge clk);
        store_n = ~(2'b01 << k);
        addr_in = 5'(j);
        vin = pack(cb[k][j]);
        @(negedge clk);
        store_n = 2'b11;
      end
    for (int t = 0; t < 3000; t++) begin
      int unsigned lmin[2], larg[2], gmin;
      for (int c = 0; c < 4; c++) v[c] = byte'($urandom_range(0, 255));
      // Every 10th vector equals a stored codeword of chip 1, some repeated
      // in chip 0 to force a tie between chips.
      if (t % 10 == 0) v = cb[1][$urandom_range(0, 31)];
      if (t % 50 == 0) begin cb[0][3] = v; @(negedge clk); store_n = 2'b10;
        addr_in = 5'd3; vin = pack(v); @(negedge clk); store_n = 2'b11; end
      vin = pack(v);
      #1;
      for (int k = 0; k < 2; k++) begin
        lmin[k] = 99999; larg[k] = 0;
        for (int j = 0; j < 32; j++)
          if (dvq_ref_pkg::l1(cb[k][j], v) < lmin[k]) begin
            lmin[k] = dvq_ref_pkg::l1(cb[k][j], v); larg[k] = j;
          end
        check("local min", int'(cint[k]), int'(lmin[k]));
        check("local addr", int'(aout[k]), int'(larg[k]));
      end
      gmin = (lmin[0] < lmin[1]) ? lmin[0] : lmin[1];
      check("global min", int'(net), int'(gmin));
      check("chip0 valid", int'(cvo_n[0]), int'(lmin[0] != gmin));
      check("chip1 valid", int'(cvo_n[1]), int'(lmin[1] != gmin));
      check("oe", int'(oe), int'({lmin[1] == gmin, lmin[0] == gmin}));
      if (lmin[1] < lmin[0]) n_chip1_wins++;
      if (lmin[1] == lmin[0]) n_ties++;
      @(negedge clk);
    end
    // MATCH* high: no search, no driving, chip not valid.
    match_n = 1; #1;
    check("match off drive", int'(drv[0] | drv[1]), 0);
    check("match off valid", int'(cvo_n), 3);
    match_n = 0;
    enable = 0; #1;
    check("enable off", int'(oe), 0);
    checks++;
    if (n_chip1_wins == 0 || n_ties == 0) failures++;
    $display("chip1 wins %0d, ties %0d", n_chip1_wins, n_ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
