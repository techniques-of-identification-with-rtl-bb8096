// tb_sc_mult_and: truth table, and a statistical check that independent random lines with
// p = 0.6 and p = 0.5 give a product line with p close to 0.3.
module tb_sc_mult_and;
  logic a, b, y;
  int checks = 0, failures = 0, ons = 0;
  sc_mult_and dut (.a, .b, .y);
  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v); #1;
      checks++; if (y != (v == 3)) failures++;
    end
    for (int i = 0; i < 20000; i++) begin
      a = ($urandom_range(999) < 600); b = ($urandom_range(999) < 500); #1;
      ons += int'(y);
    end
    checks++;
    if (ons < 5600 || ons > 6400) begin failures++; $display("product fraction %0d/20000", ons); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
