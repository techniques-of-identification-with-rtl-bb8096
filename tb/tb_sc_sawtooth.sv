// tb_sc_sawtooth: compares gamma and delta every clock with an independent model of the
// scaled sawtooth and of the scaled shift-register dither, for full, half and zero
// amplitude, and checks the range of the sawtooth over one period (symmetric, -127..127 at
// full amplitude) and that zero amplitude gives no dither. The shift-register model is a
// separate implementation of the same polynomial, x^16 + x^15 + x^13 + x^4 + 1, advanced 16 shifts per clock, whose top 8 bits give delta.
module tb_sc_sawtooth;
  logic clk = 0, rst_n = 0;
  logic [4:0] amp;
  logic signed [7:0] gamma, delta;
  int checks = 0, failures = 0;

  sc_sawtooth #(.W(8), .AW(4)) dut (.clk, .rst_n, .amp, .gamma, .delta);
  always #5 clk = ~clk;

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int n_m = 0, r_m = 16'hA7E5;
  always @(posedge clk) begin
    if (!rst_n) begin n_m <= 0; r_m <= 16'hA7E5; end
    else begin
      n_m <= (n_m + 1) % 256;
      begin
        automatic int v = r_m;
        // 16 shifts per clock
        for (int k = 0; k < 16; k++) v = (v & 1) ? ((v >> 1) ^ 16'hD008) : (v >> 1);
        r_m <= v;
      end
    end
  end

  function automatic int lim(int v);
    return (v < -127) ? -127 : v;
  endfunction

  function automatic int scale(int s, int a);
    // floor of s*a/16
    int p = s * a;
    return (p >= 0) ? p / 16 : -((-p + 15) / 16);
  endfunction

  initial begin
    int amps [3] = '{16, 8, 0};
    amp = 16;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (amps[k]) begin
      automatic int n0, sg = 0, sd = 0, gmin = 1000, gmax = -1000;
      amp = 5'(amps[k]);
      @(negedge clk);
      n0 = 0;
      // find the counter phase from the output at full amplitude is not possible in general,
      // so the model runs its own counter, aligned by reset
      for (int i = 0; i < 256; i++) begin
        automatic int n = n_m;
        automatic int eg = lim(scale(n - 128, amps[k]));
        automatic int ed = lim(scale((r_m >> 8) - 128, amps[k]));
        checks++;
        if (int'(gamma) != eg || int'(delta) != ed) begin
          failures++; if (failures < 10) $display("n %0d amp %0d: %0d %0d vs %0d %0d", n, amps[k], gamma, delta, eg, ed);
        end
        sg += int'(gamma); sd += int'(delta);
        if (int'(gamma) < gmin) gmin = int'(gamma);
        if (int'(gamma) > gmax) gmax = int'(gamma);
        @(negedge clk);
      end
      checks++;
      if (amps[k] == 16 && (gmin != -127 || gmax != 127)) begin failures++; $display("range %0d..%0d", gmin, gmax); end
      if (amps[k] == 0 && (gmin != 0 || gmax != 0)) begin failures++; $display("zero amplitude not zero"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
