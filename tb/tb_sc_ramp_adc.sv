// tb_sc_ramp_adc: a behavioural comparator (ON when the ramp count has reached the analog
// level) closes the loop. For every level 0..255 the converted value must equal the level
// and done must come exactly level+1 clocks after the start is taken.
module tb_sc_ramp_adc;
  logic clk = 0, rst_n = 0, start = 0, cmp, busy, done;
  logic [7:0] ramp, value;
  int level;
  int checks = 0, failures = 0;

  sc_ramp_adc #(.W(8)) dut (.clk, .rst_n, .start, .cmp, .ramp, .busy, .done, .value);
  always #5 clk = ~clk;
  assign cmp = (int'(ramp) >= level);

  initial begin
    #20000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (level = 0; level < 256; level++) begin
      automatic int cycles = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (!done) begin @(negedge clk); cycles++; if (cycles > 1000) break; end
      checks++;
      if (value != 8'(level)) begin failures++; $display("level %0d converted to %0d", level, value); end
      checks++;
      if (cycles != level + 1) begin failures++; $display("level %0d took %0d clocks", level, cycles); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
