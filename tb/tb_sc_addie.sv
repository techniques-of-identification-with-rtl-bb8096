// tb_sc_addie: feeds random lines of known probability (0.3, then 0.8) into the ADDIE and
// checks that the average of its count over a window after settling is within 0.04 of the
// probability times 255, and that the output line's ON fraction matches it as well.
// It also checks the smoothing behaviour: the variance of count/255 at p = 0.8, over
// 200000 clocks, must lie between 0.35 and 0.75 of p(1-p)/N with N = 255. That value holds
// for independent random readout levels; here the 8-bit noise source has period N and
// produces every level once per period, so the readout adds almost no noise of its own
// and only the input's share, about half, remains. And after a step of the input
// from 0.3 to 0.8, the count averaged over 40 steps must cover 63% of the step in N clocks
// within 20%, a first-order lag of time constant N.
module tb_sc_addie;
  logic clk = 0, rst_n = 0, hold = 0, x = 0, out;
  logic [7:0] count;
  int checks = 0, failures = 0;

  sc_addie #(.W(8)) dut (.clk, .rst_n, .hold, .x, .out, .count);
  always #5 clk = ~clk;

  initial begin
    #50000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input int p_milli, input int settle, input int win, output real avg, output real frac);
    longint sum = 0; int ons = 0;
    for (int i = 0; i < settle + win; i++) begin
      @(negedge clk);
      x = ($urandom_range(999) < p_milli);
      if (i >= settle) begin sum += count; ons += int'(out); end
    end
    avg = real'(sum) / win / 255.0;
    frac = real'(ons) / win;
  endtask

  initial begin
    real avg, frac;
    repeat (2) @(posedge clk);
    rst_n = 1; hold = 1;
    run(300, 3000, 20000, avg, frac);
    checks++; if (avg < 0.26 || avg > 0.34) begin failures++; $display("p=0.3 estimate %f", avg); end
    checks++; if (frac < 0.26 || frac > 0.34) begin failures++; $display("p=0.3 output %f", frac); end
    run(800, 3000, 20000, avg, frac);
    checks++; if (avg < 0.76 || avg > 0.84) begin failures++; $display("p=0.8 estimate %f", avg); end
    checks++; if (frac < 0.76 || frac > 0.84) begin failures++; $display("p=0.8 output %f", frac); end
    $display("ADDIE estimates: %f %f", avg, frac);
    begin
      real m = 0, q = 0, v;
      for (int i = 0; i < 200000; i++) begin
        @(negedge clk);
        x = ($urandom_range(999) < 800);
        m += real'(count) / 255.0; q += (real'(count) / 255.0) ** 2;
      end
      m /= 200000.0; v = q / 200000.0 - m * m;
      $display("variance of the estimate %e, expected %e", v, 0.8 * 0.2 / 255.0);
      checks++; if (v < 0.35 * 0.8 * 0.2 / 255.0 || v > 0.75 * 0.8 * 0.2 / 255.0) begin
        failures++; $display("variance off");
      end
    end
    begin
      real traj [1000];
      int t63 = -1;
      for (int i = 0; i < 1000; i++) traj[i] = 0;
      for (int r = 0; r < 40; r++) begin
        run(300, 2000, 1, avg, frac);
        for (int i = 0; i < 1000; i++) begin
          @(negedge clk);
          x = ($urandom_range(999) < 800);
          traj[i] += real'(count) / 255.0 / 40.0;
        end
      end
      for (int i = 0; i < 1000; i++) if (t63 < 0 && traj[i] >= 0.3 + 0.632 * 0.5) t63 = i + 1;
      $display("step response: 63%% of the step after %0d clocks, final %f", t63, traj[999]);
      checks++; if (t63 < 204 || t63 > 306) begin failures++; $display("time constant off"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
