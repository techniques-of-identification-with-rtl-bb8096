// tb_sc_integrator: drives random inputs, masks and hold into a three-input integrator and
// compares its count every clock with a reference model of the counting rule (up when all
// enabled inputs are ON, down when all are OFF, saturating at 0 and 255). With the count held
// still, the output must be ON on exactly k of the 255 clocks of a random-number period.
// A switching-function instance must output ON exactly when its count is 128 or more.
module tb_sc_integrator;
  logic clk = 0, rst_n = 0, hold = 0;
  logic [2:0] in, mask;
  logic out, out_sw;
  logic [7:0] count, count_sw;
  int checks = 0, failures = 0;
  int model;

  sc_integrator #(.W(8), .NIN(3)) dut (.clk, .rst_n, .hold, .in, .mask, .out, .count);
  sc_integrator #(.W(8), .NIN(3), .SWITCH(1'b1), .SEED(8'h77)) dut_sw (
    .clk, .rst_n, .hold, .in, .mask, .out(out_sw), .count(count_sw));

  always #5 clk = ~clk;

  initial begin
    #50000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic ons_over_period(output int n);
    n = 0;
    for (int i = 0; i < 255; i++) begin @(negedge clk); n += int'(out); end
  endtask

  initial begin
    int n;
    in = 0; mask = 3'b111;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    model = 128;
    checks++; if (count != 8'(model)) begin failures++; $display("reset count %0d", count); end
    ons_over_period(n);
    checks++; if (n != 128) begin failures++; $display("count 128: %0d ON of 255", n); end
    for (int i = 0; i < 20000; i++) begin
      logic [2:0] m;
      hold = ($urandom_range(9) != 0);
      // bias the inputs so that long runs up and down happen and both limits are reached
      in   = (i % 4000 < 2000) ? (($urandom_range(9) < 8) ? 3'b111 : 3'($urandom))
                               : (($urandom_range(9) < 8) ? 3'b000 : 3'($urandom));
      mask = ($urandom_range(4) == 0) ? 3'($urandom) : 3'b111;
      m = mask;
      @(posedge clk);
      if (hold && m != 0) begin
        if ((in & m) == m && model < 255) model++;
        else if ((in & m) == 0 && model > 0) model--;
      end
      @(negedge clk);
      checks++;
      if (count != 8'(model)) begin failures++; if (failures < 10) $display("step %0d: count %0d model %0d", i, count, model); end
      checks++;
      if (out_sw != (count_sw >= 8'd128)) failures++;
      if (count_sw != count) begin checks++; failures++; end
    end
    hold = 0;
    @(negedge clk);
    ons_over_period(n);
    checks++; if (n != int'(count)) begin failures++; $display("count %0d: %0d ON of 255", count, n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
