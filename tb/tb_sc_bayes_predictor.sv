// tb_sc_bayes_predictor: a random event source with p(E) = 0.3 and four conditionally
// independent events E_i with p(E_i|E) = 0.8 0.6 0.3 0.5 and p(E_i|not E) = 0.2 0.4 0.3 0.1.
// After estimation the L0 integrator must read p(E) and each E_i integrator
// p_i = a_i/(a_i+b_i) (so p_i/(1-p_i) is the normalised likelihood ratio), within 0.08.
// In prediction, for the observed pattern E0, E1 the predictor must settle at
// r = L/(1+L), L = L0*L_0*L_1 computed here from the source probabilities, within 0.08;
// a second, switching-function instance must output ON for that pattern (L > 1) and OFF for
// the pattern E2 alone (L < 1).
module tb_sc_bayes_predictor;
  logic clk = 0, rst_n = 0, est = 0, e = 0, predict = 0;
  logic [3:0] ei = 0;
  logic pred, pred_ml;
  logic [7:0] pred_count, p0_count, pred_count_ml, p0_ml;
  logic [7:0] pi_count [4];
  logic [7:0] pi_ml [4];
  int checks = 0, failures = 0;
  real a [4] = '{0.8, 0.6, 0.3, 0.5};
  real b [4] = '{0.2, 0.4, 0.3, 0.1};
  real pe = 0.3;

  sc_bayes_predictor #(.NEV(4), .W(8)) dut (.clk, .rst_n, .est, .e, .ei, .predict,
    .pred, .pred_count, .p0_count, .pi_count);
  sc_bayes_predictor #(.NEV(4), .W(8), .ML_SWITCH(1'b1)) dut_ml (.clk, .rst_n, .est, .e, .ei,
    .predict, .pred(pred_ml), .pred_count(pred_count_ml), .p0_count(p0_ml), .pi_count(pi_ml));
  always #5 clk = ~clk;

  initial begin
    #100000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic bit draw(real p);
    return real'($urandom_range(99999)) < p * 100000.0;
  endfunction

  task automatic predict_run(input logic [3:0] pat, output real r, output int ml_on);
    longint sum = 0;
    ei = pat; est = 0; predict = 1; ml_on = 0;
    repeat (20000) @(negedge clk);
    for (int i = 0; i < 60000; i++) begin
      @(negedge clk); sum += pred_count; ml_on += int'(pred_ml);
    end
    predict = 0;
    r = real'(sum) / 60000.0 / 255.0;
  endtask

  initial begin
    real s0 = 0, si [4] = '{0, 0, 0, 0}, r, L, expect_r;
    int win = 40000, ml_on;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    est = 1;
    for (int t = 0; t < 60000 + win; t++) begin
      e = draw(pe);
      for (int i = 0; i < 4; i++) ei[i] = draw(e ? a[i] : b[i]);
      @(negedge clk);
      if (t >= 60000) begin
        s0 += real'(p0_count);
        for (int i = 0; i < 4; i++) si[i] += real'(pi_count[i]);
      end
    end
    est = 0;
    s0 = s0 / win / 255.0;
    $display("p0 estimate %f (true %f)", s0, pe);
    checks++; if (s0 < pe - 0.08 || s0 > pe + 0.08) failures++;
    for (int i = 0; i < 4; i++) begin
      automatic real pt = a[i] / (a[i] + b[i]);
      si[i] = si[i] / win / 255.0;
      $display("p%0d estimate %f (expected %f)", i, si[i], pt);
      checks++; if (si[i] < pt - 0.08 || si[i] > pt + 0.08) failures++;
    end
    L = (pe / (1.0 - pe)) * (a[0] / b[0]) * (a[1] / b[1]);
    expect_r = L / (1.0 + L);
    predict_run(4'b0011, r, ml_on);
    $display("prediction for E0,E1: %f (expected %f), ML output ON %0d of 60000", r, expect_r, ml_on);
    checks++; if (r < expect_r - 0.08 || r > expect_r + 0.08) failures++;
    checks++; if (ml_on < 57000) begin failures++; $display("ML prediction not ON"); end
    predict_run(4'b0100, r, ml_on);
    L = (pe / (1.0 - pe)) * (a[2] / b[2]);
    expect_r = L / (1.0 + L);
    $display("prediction for E2: %f (expected %f), ML output ON %0d of 60000", r, expect_r, ml_on);
    checks++; if (r < expect_r - 0.08 || r > expect_r + 0.08) failures++;
    checks++; if (ml_on > 3000) begin failures++; $display("ML prediction not OFF"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
