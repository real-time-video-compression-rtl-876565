// tb_dvq_predictor: random reconstructed samples into the predictor (910
// samples per line, reconstruction latency 16); every prediction must equal
// ((B + C)/2 + A)/2 with C, B, A the samples 908, 912 and 1820 samples
// before the predicted one.
module tb_dvq_predictor;
  import dvq_pkg::*;
  localparam int L = 910, RL = 16;
  logic clk = 0, rst_n = 1;
  sample_t recon = '0, pv;
  int x [$];          // x[t] = input in clock t
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial #2 rst_n = 0;

  dvq_predictor #(.LINE_LEN(L), .RECON_LAT(RL)) dut (.clk(clk), .rst_n(rst_n),
    .recon(recon), .pv(pv));

  // Reconstructed sample m enters at clock m + RL.
  function automatic int r(int m);
    int t = m + RL;
    return (t < 0 || t >= int'(x.size())) ? 0 : x[t];
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      int e;
      // clock n: check prediction of sample n, then drive input of clock n
      e = (((r(n - L - 2) + r(n - L + 2)) >> 1) + r(n - 2 * L)) >> 1;
      checks++;
      if (int'(pv) != e) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d pv=%0d exp=%0d", n, pv, e);
      end
      recon = sample_t'($urandom_range(0, 255));
      x.push_back(int'(recon));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
