// tb_sc_integrator_ternary: random ternary inputs on both ports and a random hold line;
// the count is compared every clock with a reference model (step -2..+2, saturation at
// -128 and +127). At the largest positive count UP is ON at every clock and DOWN never;
// at count -128 DOWN is ON at every clock.
module tb_sc_integrator_ternary;
  import sc_pkg::*;
  logic clk = 0, rst_n = 0, hold = 0;
  tern_t a, b, out;
  logic signed [7:0] count;
  int checks = 0, failures = 0, model = 0;

  sc_integrator_ternary #(.W(8)) dut (.clk, .rst_n, .hold, .a, .b, .out, .count);
  always #5 clk = ~clk;

  function automatic tern_t mk(int v);
    mk.up = (v > 0); mk.dn = (v < 0);
  endfunction

  initial begin
    #50000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check_extreme(input int sgn);
    for (int i = 0; i < 127; i++) begin
      @(negedge clk);
      checks++;
      if ((sgn > 0 && !(out.up && !out.dn)) || (sgn < 0 && !(out.dn && !out.up))) failures++;
    end
  endtask

  initial begin
    a = mk(0); b = mk(0);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      automatic int bias = (i % 2000 < 1000) ? 1 : -1;
      automatic int va = ($urandom_range(3) == 0) ? $urandom_range(2) - 1 : bias;
      automatic int vb = ($urandom_range(2) == 0) ? $urandom_range(2) - 1 : bias;
      @(negedge clk);
      a = mk(va); b = mk(vb); hold = ($urandom_range(7) != 0);
      @(posedge clk);
      if (hold) begin
        model += va + vb;
        if (model > 127) model = 127;
        if (model < -128) model = -128;
      end
      #1;
      checks++;
      if (count != 8'(model)) begin failures++; if (failures < 10) $display("count %0d model %0d", count, model); end
    end
    @(negedge clk); a = mk(1); b = mk(1); hold = 1;
    repeat (200) @(negedge clk);
    a = mk(0); b = mk(0);
    checks++; if (count != 127) begin failures++; $display("no positive saturation"); end
    check_extreme(1);
    a = mk(-1); b = mk(-1);
    repeat (200) @(negedge clk);
    a = mk(0); b = mk(0);
    checks++; if (count != -128) begin failures++; $display("no negative saturation"); end
    check_extreme(-1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
