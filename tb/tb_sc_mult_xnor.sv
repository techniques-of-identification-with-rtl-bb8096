// tb_sc_mult_xnor: truth table, and a statistical check in the bipolar code: inputs
// representing +0.6 and -0.5 must give a line representing about -0.3 (p(ON) = 0.35).
module tb_sc_mult_xnor;
  logic a, b, y;
  int checks = 0, failures = 0, ons = 0;
  sc_mult_xnor dut (.a, .b, .y);
  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v); #1;
      checks++; if (y != (a == b)) failures++;
    end
    for (int i = 0; i < 20000; i++) begin
      a = ($urandom_range(999) < 800); b = ($urandom_range(999) < 250); #1;
      ons += int'(y);
    end
    checks++;
    if (ons < 6600 || ons > 7400) begin failures++; $display("product fraction %0d/20000", ons); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
