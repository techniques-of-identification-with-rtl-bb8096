// tb_sc_descent_identifier: closed-loop identification of Z = 1.5*X0 - 0.75*X1 from random
// inputs uniform over -40..40. Starting from zero weights, each method (stochastic binary with
// full dither, stochastic ternary with full dither, polarity coincidence with no dither) must
// bring both weights, averaged over the last 150000 of 400000 clocks, within 0.08 of the true
// values (weight scale 2**10 per unit; 0.16 for stochastic binary, whose converged weights
// wander most), and the mean square error over the last 5000 clocks
// must be small (below 4 LSB^2, or 60 for the noisier stochastic binary method).
module tb_sc_descent_identifier;
  localparam int WF = 10;
  logic clk = 0, rst_n = 0, adapt = 0, mode = 0;
  logic [4:0] amp;
  logic signed [7:0] x [2];
  logic signed [7:0] z, err;
  logic signed [15:0] weight [2];
  int checks = 0, failures = 0;

  sc_descent_identifier #(.NCH(2), .EW(8), .WW(16), .WF(WF), .AW(4)) dut (
    .clk, .rst_n, .adapt, .mode, .amp, .x, .z, .err, .weight);
  always #5 clk = ~clk;

  initial begin
    #20000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) begin
    int x0, x1;
    x0 = $urandom_range(80) - 40;
    x1 = $urandom_range(80) - 40;
    x[0] <= 8'(x0);
    x[1] <= 8'(x1);
    z    <= 8'((3 * x0 - (3 * x1) / 2) / 2);
  end

  task automatic trial(input logic m, input int a, input real mse_max, input real tol, input string name);
    real w0, w1; longint se = 0;
    rst_n = 0; mode = m; amp = 5'(a); adapt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; adapt = 1;
    repeat (250000) @(negedge clk);
    // average the weights over the last 150000 clocks: the converged weights carry the
    // stochastic variance of each method
    w0 = 0; w1 = 0;
    for (int i = 0; i < 150000; i++) begin
      @(negedge clk);
      w0 += real'(weight[0]); w1 += real'(weight[1]);
      if (i >= 145000) se += int'(err) * int'(err);
    end
    w0 = w0 / 150000.0 / (2.0 ** WF);
    w1 = w1 / 150000.0 / (2.0 ** WF);
    $display("%s: w0 %f w1 %f mse %f", name, w0, w1, real'(se) / 5000.0);
    checks++; if (w0 < 1.5 - tol || w0 > 1.5 + tol) begin failures++; $display("%s: w0 off", name); end
    checks++; if (w1 < -0.75 - tol || w1 > -0.75 + tol) begin failures++; $display("%s: w1 off", name); end
    checks++; if (real'(se) / 5000.0 > mse_max) begin failures++; $display("%s: error not small", name); end
  endtask

  initial begin
    x[0] = 0; x[1] = 0; z = 0; amp = 16;
    trial(1'b0, 16, 60.0, 0.16, "stochastic binary");
    trial(1'b1, 16, 4.0, 0.08, "stochastic ternary");
    trial(1'b0, 0, 4.0, 0.08, "polarity coincidence");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
