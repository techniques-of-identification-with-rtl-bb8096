// tb_sc_markov_model: a four-state process with a known transition matrix P is run and each
// observed transition is presented for estimation. The learned counts must match P*255
// within 0.07. Then the model is used for prediction: 3000 runs of 3 steps from S_1, counting
// the runs whose reached flag for S_3 is set, must give the first-passage probability
// computed here from the learned counts within 0.04; the visit counters must add up to the
// number of run clocks and the state register must stay one-hot. Finally the average path
// length from S_1 to S_3 is measured by 1000 runs that each last until the reached flag for
// S_3 is set; it must be within 10% of the mean first-passage time computed from the learned
// counts.
module tb_sc_markov_model;
  logic clk = 0, rst_n = 0, est_valid = 0, load = 0, run = 0, clr_visits = 0;
  logic [1:0] est_from = 0, est_to = 0, load_state = 0;
  logic [3:0] state, reached;
  logic [15:0] visits [4];
  logic [7:0] count [4][4];
  int checks = 0, failures = 0;
  real P [4][4] = '{'{0.5, 0.5, 0.0, 0.0},
                    '{0.1, 0.3, 0.6, 0.0},
                    '{0.0, 0.2, 0.3, 0.5},
                    '{0.4, 0.0, 0.0, 0.6}};

  sc_markov_model #(.NS(4), .W(8), .CW(16)) dut (.clk, .rst_n, .est_valid, .est_from, .est_to,
    .load, .load_state, .run, .clr_visits, .state, .reached, .visits, .count);
  always #5 clk = ~clk;

  initial begin
    #100000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int step_from(int s);
    real u = real'($urandom_range(99999)) / 100000.0, c = 0;
    for (int j = 0; j < 4; j++) begin c += P[s][j]; if (u < c) return j; end
    return 3;
  endfunction

  initial begin
    int s = 0, hits = 0, total_visits;
    real Q [4][4], q [4], qn [4], hit_p, h [4], hn [4];
    int steps, path_sum = 0, path_max = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 80000; t++) begin
      automatic int n = step_from(s);
      est_valid = 1; est_from = 2'(s); est_to = 2'(n);
      @(negedge clk);
      s = n;
    end
    est_valid = 0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        Q[i][j] = real'(count[i][j]) / 255.0;
        checks++;
        if (Q[i][j] < P[i][j] - 0.07 || Q[i][j] > P[i][j] + 0.07) begin
          failures++; $display("p%0d%0d learned %f true %f", i, j, Q[i][j], P[i][j]);
        end
      end
    // probability of reaching S_3 from S_1 within 3 steps, from the learned matrix
    q = '{0, 1, 0, 0}; hit_p = 0;
    for (int k = 0; k < 3; k++) begin
      qn = '{0, 0, 0, 0};
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) qn[j] += q[i] * Q[i][j];
      hit_p += qn[3]; qn[3] = 0; q = qn;
    end
    clr_visits = 1; @(negedge clk); clr_visits = 0;
    for (int r = 0; r < 3000; r++) begin
      load = 1; load_state = 2'd1; @(negedge clk); load = 0;
      run = 1;
      repeat (3) begin
        @(negedge clk);
        checks++; if (!$onehot(state)) failures++;
      end
      run = 0;
      hits += int'(reached[3]);
    end
    $display("reach S3 from S1 within 3 steps: %f of runs, expected %f", real'(hits) / 3000.0, hit_p);
    checks++; if (real'(hits) / 3000.0 < hit_p - 0.04 || real'(hits) / 3000.0 > hit_p + 0.04) failures++;
    total_visits = int'(visits[0]) + int'(visits[1]) + int'(visits[2]) + int'(visits[3]);
    checks++; if (total_visits != 9000) begin failures++; $display("visits add to %0d", total_visits); end
    checks++; if (visits[1] < 3000) begin failures++; $display("start state visits %0d", visits[1]); end
    // average path length from S_1 to S_3: the learned mean first-passage times h solve
    // h_i = 1 + sum over j != 3 of Q_ij h_j, found here by iteration
    h = '{0, 0, 0, 0};
    for (int it = 0; it < 5000; it++) begin
      for (int i = 0; i < 4; i++) begin
        hn[i] = 1.0;
        for (int j = 0; j < 3; j++) hn[i] += Q[i][j] * h[j];
      end
      h = hn;
    end
    for (int r = 0; r < 1000; r++) begin
      load = 1; load_state = 2'd1; @(negedge clk); load = 0;
      run = 1; steps = 0;
      while (!reached[3] && steps < 1000) begin
        @(negedge clk);
        steps++;
      end
      run = 0;
      checks++; if (!reached[3]) begin failures++; $display("S3 never reached"); end
      path_sum += steps;
      if (steps > path_max) path_max = steps;
    end
    $display("average path S1 to S3: %f steps (longest %0d), expected %f",
             real'(path_sum) / 1000.0, path_max, h[1]);
    checks++;
    if (real'(path_sum) / 1000.0 < 0.9 * h[1] || real'(path_sum) / 1000.0 > 1.1 * h[1]) begin
      failures++; $display("average path length off");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
