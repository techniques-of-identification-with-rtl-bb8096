// tb_sc_descent_channel: open-loop checks of the weight update with constant samples.
// Zero dither (polarity coincidence): E > 0 with X > 0 must step the weight down by exactly
// one per clock, E > 0 with X < 0 up by one, and adapt OFF must hold it. Full dither: with
// E = 64, X = 32 the expected drift per clock is -(2*0.75-1)*(2*0.625-1) = -0.125 in binary
// mode and -P(|g|<64)*P(|d|<32) = -0.125 in ternary mode; both are checked over 5120 clocks.
module tb_sc_descent_channel;
  logic clk = 0, rst_n = 0, adapt = 0, mode = 0;
  logic [4:0] amp;
  logic signed [7:0] e, x, gamma, delta;
  logic signed [15:0] weight;
  int checks = 0, failures = 0;

  sc_sawtooth #(.W(8), .AW(4)) u_saw (.clk, .rst_n, .amp, .gamma, .delta);
  sc_descent_channel #(.WW(16), .EW(8)) dut (.clk, .rst_n, .adapt, .mode, .e, .x, .gamma, .delta, .weight);
  always #5 clk = ~clk;

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic drift(input int n, output int d);
    int w0 = int'(weight);
    repeat (n) @(negedge clk);
    d = int'(weight) - w0;
  endtask

  initial begin
    int d;
    amp = 0; e = 20; x = 5;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (weight != 0) begin failures++; $display("weight not reset"); end
    adapt = 1;
    for (int m = 0; m < 2; m++) begin
      mode = m[0];
      e = 20; x = 5;  drift(100, d);
      checks++; if (d != -100) begin failures++; $display("mode %0d PC same sign drift %0d", m, d); end
      e = 20; x = -5; drift(100, d);
      checks++; if (d != 100) begin failures++; $display("mode %0d PC opposite sign drift %0d", m, d); end
    end
    adapt = 0; drift(50, d);
    checks++; if (d != 0) begin failures++; $display("weight moved with adapt OFF"); end
    adapt = 1; amp = 16; e = 64; x = 32;
    mode = 0; drift(5120, d);
    checks++; if (d > -490 || d < -790) begin failures++; $display("binary dithered drift %0d, expected about -640", d); end
    mode = 1; drift(5120, d);
    checks++; if (d > -490 || d < -790) begin failures++; $display("ternary dithered drift %0d, expected about -640", d); end
    e = -64; mode = 0; drift(5120, d);
    checks++; if (d < 490 || d > 790) begin failures++; $display("binary dithered drift %0d, expected about +640", d); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
