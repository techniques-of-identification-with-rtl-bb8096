// tb_sc_mult_ternary: all nine ternary input pairs give the product of their values, and
// random ternary lines representing +0.5 and -0.4 give a product near -0.2.
module tb_sc_mult_ternary;
  import sc_pkg::*;
  tern_t a, b, y;
  int checks = 0, failures = 0, acc = 0;
  sc_mult_ternary dut (.a, .b, .y);
  function automatic tern_t mk(int v);
    mk.up = (v > 0); mk.dn = (v < 0);
  endfunction
  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = -1; i <= 1; i++)
      for (int j = -1; j <= 1; j++) begin
        a = mk(i); b = mk(j); #1;
        checks++;
        if (tern_val(y) != i * j || (y.up && y.dn)) begin failures++; $display("%0d*%0d -> %0d", i, j, tern_val(y)); end
      end
    for (int n = 0; n < 20000; n++) begin
      a = mk(($urandom_range(999) < 500) ? 1 : 0);
      b = mk(($urandom_range(999) < 400) ? -1 : 0);
      #1; acc += tern_val(y);
    end
    checks++;
    if (acc > -3600 || acc < -4400) begin failures++; $display("ternary product sum %0d/20000", acc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
