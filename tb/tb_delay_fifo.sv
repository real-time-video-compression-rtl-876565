// tb_delay_fifo: random words through delay lines of 5 and 908 words; each
// output must equal the input exactly DELAY clocks earlier, zero before.
module tb_delay_fifo;
  logic clk = 0, rst_n = 1;
  logic [8:0] din = '0, d5, d908;
  logic [8:0] hist [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial #2 rst_n = 0;

  delay_fifo #(.DELAY(5))   u5   (.clk(clk), .rst_n(rst_n), .din(din), .dout(d5));
  delay_fifo #(.DELAY(908)) u908 (.clk(clk), .rst_n(rst_n), .din(din), .dout(d908));

  function automatic int past(int k);
    return (k < int'(hist.size())) ? int'(hist[hist.size() - 1 - k]) : 0;
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
    for (int t = 0; t < 5000; t++) begin
      din = 9'($urandom_range(0, 511));
      #1;
      // hist holds inputs of earlier clocks, newest last
      checks += 2;
      if (int'(d5) != past(4)) begin failures++; if (failures < 10) $display("FAIL d5 t=%0d", t); end
      if (int'(d908) != past(907)) begin failures++; if (failures < 10) $display("FAIL d908 t=%0d", t); end
      @(negedge clk);
      hist.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
