// tb_sc_d2s: for every input value, sweeps the random number over its whole range and checks
// the number of ON outputs: value k must give k ON clocks out of 255 (p = k/N), and a signed
// count must give exactly its ones'-complement magnitude of UP (positive) or DOWN (negative)
// clocks out of 127, never both lines at once.
module tb_sc_d2s;
  import sc_pkg::*;
  logic [7:0] value, rnd;
  logic signed [7:0] svalue;
  logic [6:0] rnd_t;
  logic bin_out;
  tern_t tern_out;
  int checks = 0, failures = 0;

  sc_d2s #(.W(8)) dut (.value, .rnd, .bin_out, .svalue, .rnd_t, .tern_out);

  initial begin
    #10000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    svalue = 0; rnd_t = 1;
    for (int k = 0; k < 256; k++) begin
      automatic int ons = 0;
      value = 8'(k);
      for (int r = 1; r < 256; r++) begin rnd = 8'(r); #1; ons += int'(bin_out); end
      checks++; if (ons != k) begin failures++; $display("value %0d: %0d ON of 255", k, ons); end
    end
    for (int s = -128; s < 128; s++) begin
      automatic int ups = 0, dns = 0, both = 0, expect_up, expect_dn;
      svalue = 8'(s);
      for (int r = 1; r < 128; r++) begin
        rnd_t = 7'(r); #1;
        ups += int'(tern_out.up); dns += int'(tern_out.dn); both += int'(tern_out.up & tern_out.dn);
      end
      expect_up = (s >= 0) ? s : 0;
      expect_dn = (s < 0) ? (-s - 1) : 0;
      checks++;
      if (ups != expect_up || dns != expect_dn || both != 0) begin
        failures++; $display("svalue %0d: up %0d dn %0d", s, ups, dns);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
