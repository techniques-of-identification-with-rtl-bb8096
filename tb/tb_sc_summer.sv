// tb_sc_summer: checks the two-clock selection latency (lambda 0 -> full scale takes effect
// at the second clock), lambda = 0 and full scale select b and a only, and with a = 1, b = 0
// and lambda = 128 the output is ON for close to 128/255 of the clocks.
module tb_sc_summer;
  logic clk = 0, rst_n = 0, a, b, y;
  logic [7:0] lambda;
  int checks = 0, failures = 0;

  sc_summer #(.W(8)) dut (.clk, .rst_n, .lambda, .a, .b, .y);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int ons;
    a = 1; b = 0; lambda = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    checks++; if (y != 0) begin failures++; $display("lambda 0 did not select b"); end
    lambda = 8'hFF;
    @(negedge clk);
    checks++; if (y != 0) begin failures++; $display("selection changed after one clock"); end
    @(negedge clk);
    checks++; if (y != 1) begin failures++; $display("selection not changed after two clocks"); end
    ons = 0;
    for (int i = 0; i < 500; i++) begin a = i[0]; b = ~i[0]; @(negedge clk); #1; checks++; if (y != a) failures++; end
    a = 1; b = 0; lambda = 8'd128;
    repeat (2) @(negedge clk);
    ons = 0;
    for (int i = 0; i < 2550; i++) begin @(negedge clk); ons += int'(y); end
    checks++;
    if (ons < 1230 || ons > 1330) begin failures++; $display("lambda 128: %0d of 2550", ons); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
