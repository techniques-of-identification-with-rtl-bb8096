// tb_sc_inverter: exhaustive check of bipolar NOT inversion and ternary UP/DOWN exchange,
// checked as values: the ternary value is negated and the bipolar level complemented.
module tb_sc_inverter;
  import sc_pkg::*;
  logic b_in, b_out;
  tern_t t_in, t_out;
  int checks = 0, failures = 0;

  sc_inverter dut (.b_in, .b_out, .t_in, .t_out);

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++) begin
      b_in = v[0]; #1;
      checks++; if (b_out != (v == 0)) failures++;
    end
    for (int v = -1; v <= 1; v++) begin
      t_in.up = (v == 1); t_in.dn = (v == -1); #1;
      checks++; if (tern_val(t_out) != -v) begin failures++; $display("ternary %0d -> %0d", v, tern_val(t_out)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
