// tb_workload_first_order: identification of the first-order process 1/(a0 + a1 s) by the
// stochastic descent identifier, with each of its three correlation methods.
//
// The process is simulated here in real arithmetic and excited by noise: its input u is
// white noise passed through a first-order low-pass filter of 1000 clocks, roughly Gaussian
// with an rms of about 25; its output obeys a1*dy/dt + a0*y = u with one time unit equal to
// 1000 clocks, so with a0 = a1 = 1 the process time constant is 1000 clocks. The identifier
// sees X0 = y, X1 = dy/dt and Z = u, rounded to integers, so the weights must settle at
// w0 = a0 and w1 = a1. The gains of the methods are matched roughly, as the comparison
// requires: the stochastic methods by their dither amplitude, polarity coincidence (whose
// relay has no amplitude to set) by enabling adaption on a random 5% of clocks.
// For each method the run has three phases:
//  1. noise-free convergence from zero weights (300000 clocks): both weights, averaged over
//     the last 100000 clocks, within 0.1 of (1, 1);
//  2. a step of a0 from 1 to 1.5 (300000 clocks), with the weights filtered over 4096 clocks:
//     the time for w0 to cover 0.9 of the step must be below 250000 clocks; w1 must stay
//     within 0.35 of 1 throughout (interaction between the weights) and end within 0.2;
//     w0 must end within 0.15 of 1.5;
//  3. a0 back to 1, with independent noise added to Z and to both X's, each uniform over
//     0.2 of its own signal's peak (taken as 3 rms) (600000 clocks, the last 300000
//     averaged): both weights must be underestimated, below the true values yet above 0.6
//     of them, and for the two stochastic methods within 0.15 of the least-squares fit of
//     the same noisy samples.
// Across the methods the test also checks that the noise bias agrees within 0.15, and that
// the stochastic ternary method's final variance is below the stochastic binary one's,
// and prints the measured speeds, biases and variances for comparison.
module tb_workload_first_order;
  localparam int  WF = 10;
  localparam real S  = 1000.0;   // clocks per process time unit
  localparam real TU = 1000.0;   // clocks in the time constant of the input filter
  logic clk = 0, rst_n = 0, adapt = 0, mode = 0;
  int   duty = 100;                 // percentage of clocks on which adaption is enabled
  bit   run = 0;
  logic [4:0] amp;
  logic signed [7:0] x [2];
  logic signed [7:0] z, err;
  logic signed [15:0] weight [2];
  int checks = 0, failures = 0;

  // process state
  real a0 = 1.0, a1 = 1.0, y = 0.0, u = 0.0;
  real nse [3] = '{0.0, 0.0, 0.0};            // noise amplitudes on X0, X1, Z
  real sq [3] = '{0.0, 0.0, 0.0}, nsq = 0.0;  // mean squares of the noise-free signals
  // least-squares accumulators over the noisy samples presented
  real sxx00, sxx01, sxx11, sxz0, sxz1;
  bit  acc_ls = 0;

  sc_descent_identifier #(.NCH(2), .EW(8), .WW(16), .WF(WF), .AW(4)) dut (
    .clk, .rst_n, .adapt, .mode, .amp, .x, .z, .err, .weight);
  always #5 clk = ~clk;

  initial begin
    #100000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real uni(real a);   // uniform over -a..a
    return (real'($urandom_range(20000)) / 10000.0 - 1.0) * a;
  endfunction

  function automatic int sat(real v);
    int i;
    i = $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5);
    return i > 127 ? 127 : (i < -127 ? -127 : i);
  endfunction

  always @(negedge clk) begin
    real yd, v0, v1, vz;
    u = u + (uni(1500.0) - u) / TU;
    yd = (u - a0 * y) / a1;
    sq[0] += y * y; sq[1] += yd * yd; sq[2] += u * u; nsq += 1.0;
    v0 = y + uni(nse[0]); v1 = yd + uni(nse[1]); vz = u + uni(nse[2]);
    x[0] <= 8'(sat(v0));
    x[1] <= 8'(sat(v1));
    z    <= 8'(sat(vz));
    if (acc_ls) begin
      sxx00 += real'(sat(v0)) * real'(sat(v0)); sxx01 += real'(sat(v0)) * real'(sat(v1));
      sxx11 += real'(sat(v1)) * real'(sat(v1));
      sxz0 += real'(sat(v0)) * real'(sat(vz)); sxz1 += real'(sat(v1)) * real'(sat(vz));
    end
    y = y + yd / S;
    adapt <= run && ($urandom_range(99) < duty);
  end

  function automatic real wr(int i);
    return real'(weight[i]) / (2.0 ** WF);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // averages both weights over n clocks, returning their means and variances
  task automatic average(int n, output real m0, output real m1, output real v0, output real v1);
    real s0 = 0, s1 = 0, q0 = 0, q1 = 0;
    for (int i = 0; i < n; i++) begin
      @(posedge clk);
      s0 += wr(0); s1 += wr(1); q0 += wr(0) * wr(0); q1 += wr(1) * wr(1);
    end
    m0 = s0 / n; m1 = s1 / n;
    v0 = q0 / n - m0 * m0; v1 = q1 / n - m1 * m1;
  endtask

  real bias0 [3], bias1 [3], var0 [3], var1 [3];
  int  speed [3];

  task automatic method(int k, logic m, int a, int d, string name);
    real m0, m1, v0, v1, f0, f1, w1dev, ls0, ls1, det;
    int t90;
    // phase 1: noise-free convergence from zero weights
    a0 = 1.0; nse = '{0.0, 0.0, 0.0};
    rst_n = 0; mode = m; amp = 5'(a); duty = d; run = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; run = 1;
    repeat (200000) @(posedge clk);
    average(100000, m0, m1, v0, v1);
    $display("%s: noise-free w0 %f w1 %f", name, m0, m1);
    check(m0 > 0.9 && m0 < 1.1, {name, ": noise-free w0"});
    check(m1 > 0.9 && m1 < 1.1, {name, ": noise-free w1"});
    // phase 2: step of a0, filtered weights followed clock by clock
    a0 = 1.5;
    f0 = m0; f1 = m1; w1dev = 0.0; t90 = -1;
    for (int i = 0; i < 300000; i++) begin
      @(posedge clk);
      f0 += (wr(0) - f0) / 4096.0;
      f1 += (wr(1) - f1) / 4096.0;
      if (t90 < 0 && f0 >= m0 + 0.9 * (1.5 - m0)) t90 = i;
      if (f1 - 1.0 > w1dev) w1dev = f1 - 1.0;
      if (1.0 - f1 > w1dev) w1dev = 1.0 - f1;
    end
    speed[k] = t90;
    $display("%s: step of a0 to 1.5 covered 0.9 in %0d clocks, w1 moved at most %f, end w0 %f w1 %f",
             name, t90, w1dev, f0, f1);
    check(t90 >= 0 && t90 < 250000, {name, ": speed of response"});
    check(w1dev < 0.35, {name, ": interaction"});
    check(f0 > 1.35 && f0 < 1.65, {name, ": w0 after the step"});
    check(f1 > 0.8 && f1 < 1.2, {name, ": w1 after the step"});
    // phase 3: noisy data
    a0 = 1.0;
    for (int i = 0; i < 3; i++) nse[i] = 0.2 * 3.0 * $sqrt(sq[i] / nsq);
    repeat (300000) @(posedge clk);
    sxx00 = 0; sxx01 = 0; sxx11 = 0; sxz0 = 0; sxz1 = 0; acc_ls = 1;
    average(300000, m0, m1, v0, v1);
    acc_ls = 0;
    det = sxx00 * sxx11 - sxx01 * sxx01;
    ls0 = (sxx11 * sxz0 - sxx01 * sxz1) / det;
    ls1 = (sxx00 * sxz1 - sxx01 * sxz0) / det;
    bias0[k] = m0; bias1[k] = m1; var0[k] = v0; var1[k] = v1;
    $display("%s: noise amplitudes %f %f %f", name, nse[0], nse[1], nse[2]);
    $display("%s: noisy w0 %f (%f of true, least squares %f) w1 %f (%f of true, least squares %f), variances %e %e",
             name, m0, bias0[k], ls0, m1, bias1[k], ls1, v0, v1);
    check(bias0[k] > 0.6 && bias0[k] < 1.0, {name, ": w0 noise bias"});
    check(bias1[k] > 0.6 && bias1[k] < 1.0, {name, ": w1 noise bias"});
    if (a != 0) begin
      check(m0 > ls0 - 0.15 && m0 < ls0 + 0.15, {name, ": w0 against least squares"});
      check(m1 > ls1 - 0.15 && m1 < ls1 + 0.15, {name, ": w1 against least squares"});
    end
  endtask

  initial begin
    x[0] = 0; x[1] = 0; z = 0; amp = 16;
    // let the process settle before any identification
    repeat (20000) @(posedge clk);
    method(0, 1'b1, 4, 100, "stochastic ternary");
    method(1, 1'b0, 4, 100, "stochastic binary");
    method(2, 1'b0, 0, 4, "polarity coincidence");
    for (int k = 1; k < 3; k++) begin
      check(bias0[k] > bias0[0] - 0.15 && bias0[k] < bias0[0] + 0.15, "w0 noise bias differs between methods");
      check(bias1[k] > bias1[0] - 0.15 && bias1[k] < bias1[0] + 0.15, "w1 noise bias differs between methods");
    end
    check(var0[0] < var0[1], "ternary w0 variance not below binary");
    $display("variance of w0 relative to stochastic ternary: binary %f, polarity coincidence %f",
             var0[1] / var0[0], var0[2] / var0[0]);
    $display("variance of w1 relative to stochastic ternary: binary %f, polarity coincidence %f",
             var1[1] / var1[0], var1[2] / var1[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
