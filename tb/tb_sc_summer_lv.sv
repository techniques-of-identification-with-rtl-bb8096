// tb_sc_summer_lv: random lines with p = 0.7 and p = 0.2; the number of ON output clocks
// must equal half the total number of ON input clocks within one, and the output must copy
// the inputs whenever they agree.
module tb_sc_summer_lv;
  logic clk = 0, rst_n = 0, a = 0, b = 0, y;
  int checks = 0, failures = 0;
  sc_summer_lv dut (.clk, .rst_n, .a, .b, .y);
  always #5 clk = ~clk;
  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int na = 0, nb = 0, ny = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 10000; i++) begin
      @(negedge clk);
      a = ($urandom_range(999) < 700); b = ($urandom_range(999) < 200);
      #1;
      na += int'(a); nb += int'(b); ny += int'(y);
      if (a == b) begin checks++; if (y != a) failures++; end
    end
    checks++;
    if (2 * ny < na + nb - 2 || 2 * ny > na + nb + 2) begin
      failures++; $display("sum %0d vs (%0d+%0d)/2", ny, na, nb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
