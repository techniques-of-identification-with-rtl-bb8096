// tb_workload_atl_limit_cycle: the limit-cycle example of bounded-weight threshold logic,
// run on the stochastic adaptive threshold logic element.
//
// Four training vectors, all of the positive class,
//   A = ( 1, 1, 1,-1)  B = ( 1,-1,-1, 1)  C = (-1, 1,-1, 1)  D = (-1,-1, 1, 1),
// are separated by the weight vector (1, 1, 1, 2), which lies inside the weight range
// -2..+2. A deterministic element that adds the whole misclassified vector to its weights
// (saturating at +-2) and is shown A B C D A B C D ... from zero weights passes through
//   (1,1,1,-1) (2,0,0,0) (1,1,-1,1) (0,0,0,2) (1,1,1,1) (2,0,0,2) (1,1,-1,2) (0,0,0,2)
// and then repeats its last four states for ever without finding a solution.
// The test first runs that deterministic rule as a reference model, checks this
// trajectory and that the cycle never ends. It then trains the stochastic element (which
// moves each weight only when its own random bit is 1) on the same cyclic sequence, one
// vector per clock, in 40 trials. Each trial starts from zero weights after a random number
// of idle clocks, so each trial sees a different random sequence. Every trial must reach
// weights that put all four vectors above the threshold within 500 passes of the cycle.
// The final weights are checked against the vectors independently of the element's output.
module tb_workload_atl_limit_cycle;
  import sc_pkg::*;
  localparam int NIN = 4;
  localparam int TRIALS = 40;
  localparam int MAXPASS = 500;
  logic clk = 0, rst_n = 0, train = 0, target = 1;
  tern_t x [NIN];
  tern_t y;
  logic signed [7:0] w [NIN];
  logic updated;
  int checks = 0, failures = 0;

  typedef int vec_t [NIN];
  localparam vec_t VA = '{1, 1, 1, -1};
  localparam vec_t VB = '{1, -1, -1, 1};
  localparam vec_t VC = '{-1, 1, -1, 1};
  localparam vec_t VD = '{-1, -1, 1, 1};
  vec_t vecs [4];
  vec_t traj [8];

  sc_atl #(.NIN(NIN), .WMAX(2), .THETA(1), .MARGIN(0)) dut (
    .clk, .rst_n, .train, .target, .x, .y, .w, .updated);
  always #5 clk = ~clk;

  initial begin
    #50000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int dot(vec_t a, vec_t b);
    int s = 0;
    for (int i = 0; i < NIN; i++) s += a[i] * b[i];
    return s;
  endfunction

  task automatic present(vec_t v);
    for (int i = 0; i < NIN; i++) begin
      x[i].up = (v[i] > 0);
      x[i].dn = (v[i] < 0);
    end
  endtask

  // deterministic bounded-weight rule: returns the number of updates seen in 100 passes and
  // whether any pass made no update (a solution)
  task automatic reference_model();
    vec_t wr = '{0, 0, 0, 0};
    int n = 0;
    bit solved = 0;
    for (int p = 0; p < 100; p++) begin
      bit any = 0;
      for (int k = 0; k < 4; k++) begin
        if (dot(wr, vecs[k]) <= 0) begin
          any = 1;
          for (int i = 0; i < NIN; i++) begin
            wr[i] += vecs[k][i];
            if (wr[i] > 2) wr[i] = 2;
            if (wr[i] < -2) wr[i] = -2;
          end
          if (n < 8) check(wr == traj[n], $sformatf("reference trajectory step %0d", n + 1));
          n++;
        end
      end
      if (!any) solved = 1;
    end
    $display("deterministic rule: %0d updates in 100 passes, solved %0d", n, solved);
    check(!solved && n == 400, "deterministic rule should cycle without a solution");
  endtask

  initial begin
    automatic int passes, total = 0, worst = 0;
    vecs[0] = VA; vecs[1] = VB; vecs[2] = VC; vecs[3] = VD;
    traj[0] = '{1, 1, 1, -1}; traj[1] = '{2, 0, 0, 0}; traj[2] = '{1, 1, -1, 1};
    traj[3] = '{0, 0, 0, 2};  traj[4] = '{1, 1, 1, 1};  traj[5] = '{2, 0, 0, 2};
    traj[6] = '{1, 1, -1, 2}; traj[7] = '{0, 0, 0, 2};
    check(dot('{1, 1, 1, 2}, VA) > 0 && dot('{1, 1, 1, 2}, VB) > 0 &&
          dot('{1, 1, 1, 2}, VC) > 0 && dot('{1, 1, 1, 2}, VD) > 0, "solution vector");
    reference_model();
    present(VA);
    for (int t = 0; t < TRIALS; t++) begin
      automatic bit done = 0;
      @(negedge clk);
      rst_n = 0; train = 0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      repeat ($urandom_range(1000)) @(negedge clk);
      passes = 0;
      while (!done && passes < MAXPASS) begin
        automatic int upd = 0;
        // inputs change on the falling edge, away from the edge that updates the weights
        for (int k = 0; k < 4; k++) begin
          @(negedge clk);
          train = 1;
          present(vecs[k]);
          #1;
          if (updated) upd++;
        end
        @(negedge clk);
        train = 0;
        passes++;
        if (upd == 0) done = 1;
      end
      check(done, $sformatf("trial %0d did not converge", t));
      if (done) begin
        automatic vec_t wv;
        for (int i = 0; i < NIN; i++) wv[i] = int'(w[i]);
        for (int k = 0; k < 4; k++) begin
          check(dot(wv, vecs[k]) >= 1, $sformatf("trial %0d final weights on vector %0d", t, k));
          present(vecs[k]);
          #1;
          check(y.up && !y.dn, $sformatf("trial %0d output on vector %0d", t, k));
        end
        if (t < 5) $display("trial %0d: converged in %0d passes, w = %0d %0d %0d %0d",
                            t, passes, wv[0], wv[1], wv[2], wv[3]);
      end
      total += passes;
      if (passes > worst) worst = passes;
    end
    $display("stochastic element: %0d trials, mean %f passes to a solution, worst %0d",
             TRIALS, real'(total) / TRIALS, worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
