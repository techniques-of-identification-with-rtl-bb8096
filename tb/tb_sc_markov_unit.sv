// tb_sc_markov_unit: estimation from transitions drawn with probabilities 0.1 0.2 0.3 0.4.
// Every clock the four counts must sum to 255 and exactly one output line must be ON.
// After settling, the counts averaged over a window must be within 0.06 of each probability
// times 255. With estimation stopped, each output line must be ON on exactly as many of the
// 255 clocks of a random-number period as its count.
module tb_sc_markov_unit;
  logic clk = 0, rst_n = 0, est = 0;
  logic [3:0] tin = 4'b0001, tout;
  logic [7:0] count [4];
  int checks = 0, failures = 0;
  real p [4] = '{0.1, 0.2, 0.3, 0.4};

  sc_markov_unit #(.NS(4), .W(8)) dut (.clk, .rst_n, .est, .tin, .tout, .count);
  always #5 clk = ~clk;

  initial begin
    #50000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [3:0] draw();
    real u = real'($urandom_range(99999)) / 100000.0, c = 0;
    for (int j = 0; j < 4; j++) begin c += p[j]; if (u < c) return 4'(1 << j); end
    return 4'b1000;
  endfunction

  initial begin
    real avg [4] = '{0, 0, 0, 0};
    int ons [4] = '{0, 0, 0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    est = 1;
    for (int t = 0; t < 30000; t++) begin
      tin = draw();
      @(negedge clk);
      checks++;
      if (int'(count[0]) + int'(count[1]) + int'(count[2]) + int'(count[3]) != 255 || !$onehot(tout)) begin
        failures++; if (failures < 5) $display("sum or one-hot broken at %0d", t);
      end
      if (t >= 10000) for (int j = 0; j < 4; j++) avg[j] += real'(count[j]);
    end
    for (int j = 0; j < 4; j++) begin
      avg[j] = avg[j] / 20000.0 / 255.0;
      $display("p%0d estimate %f (true %f)", j, avg[j], p[j]);
      checks++; if (avg[j] < p[j] - 0.06 || avg[j] > p[j] + 0.06) failures++;
    end
    est = 0;
    @(negedge clk);
    for (int t = 0; t < 255; t++) begin
      for (int j = 0; j < 4; j++) ons[j] += int'(tout[j]);
      @(negedge clk);
    end
    for (int j = 0; j < 4; j++) begin
      checks++; if (ons[j] != int'(count[j])) begin failures++; $display("line %0d ON %0d, count %0d", j, ons[j], count[j]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
