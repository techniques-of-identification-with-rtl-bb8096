// tb_sc_identification_top: end-to-end run of the whole identification computer at its
// default sizes. Each section is taken through a complete operation in turn:
//   conversion: three ramp conversions of analog levels (behavioural comparator), each
//     re-coded as a random line whose ADDIE reading must match the level, and the same line
//     passed through the AND multiplier, the random-switch summer and the low-variance summer
//     (ADDIE readings checked against the expected products and sums);
//   descent identifier: Z = 1.5*X0 - 0.75*X1 identified by the stochastic ternary, stochastic
//     binary and polarity-coincidence methods (mode and dither switches);
//   threshold logic: training to sign(2*x0 + x1 + x2 - x3) until a clean cycle;
//   Bayes predictor: estimation from a random source, then prediction for one pattern;
//   Markov model: estimation from a random four-state process, then 500 prediction runs.
// Every mechanism named above is counted, and one that never happened is a failure.
module tb_sc_identification_top;
  import sc_pkg::*;
  logic clk = 0, rst_n = 0;
  // section 1
  logic adc_start = 0, adc_cmp, adc_busy, adc_done;
  logic [7:0] adc_ramp, adc_value, lambda = 8'd128, addie_count;
  logic line_b = 0, line_c = 0, addie_hold = 0;
  logic [1:0] sel = 0;
  logic s_in, s_prod, s_sum, s_sum_lv, addie_out;
  // section 2
  logic id_adapt = 0, id_mode = 0;
  logic [4:0] id_amp = 16;
  logic signed [7:0] id_x [2];
  logic signed [7:0] id_z, id_err;
  logic signed [15:0] id_weight [2];
  // section 3
  logic atl_train = 0, atl_target = 0, atl_updated;
  tern_t atl_x [4];
  tern_t atl_y;
  logic signed [7:0] atl_w [4];
  // section 4
  logic by_est = 0, by_e = 0, by_predict = 0, by_pred;
  logic [3:0] by_ei = 0;
  logic [7:0] by_pred_count, by_p0_count;
  logic [7:0] by_pi_count [4];
  // section 5
  logic mk_est_valid = 0, mk_load = 0, mk_run = 0, mk_clr_visits = 0;
  logic [1:0] mk_est_from = 0, mk_est_to = 0, mk_load_state = 0;
  logic [3:0] mk_state, mk_reached;
  logic [15:0] mk_visits [4];
  logic [7:0] mk_count [4][4];

  int checks = 0, failures = 0;
  int level = 0;
  int n_conv = 0, n_addie = 0, n_and = 0, n_sum = 0, n_sum_lv = 0, n_id_mode [3] = '{0, 0, 0};
  int n_atl_upd = 0, n_by_est = 0, n_by_pred = 0, n_mk_est = 0, n_mk_run = 0, n_mk_hit = 0;

  sc_identification_top dut (.*);

  always #5 clk = ~clk;
  assign adc_cmp = (int'(adc_ramp) >= level);

  initial begin
    #200000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) begin
    int x0, x1;
    x0 = $urandom_range(80) - 40;
    x1 = $urandom_range(80) - 40;
    id_x[0] <= 8'(x0);
    id_x[1] <= 8'(x1);
    id_z    <= 8'((3 * x0 - (3 * x1) / 2) / 2);
    if (atl_updated) n_atl_upd++;
  end

  function automatic tern_t mk(int v);
    mk.up = (v > 0); mk.dn = (v < 0);
  endfunction

  function automatic bit draw(real p);
    return real'($urandom_range(99999)) < p * 100000.0;
  endfunction

  // ADDIE reading of the selected line, averaged after settling, as a fraction of full scale
  task automatic addie_read(input logic [1:0] s, input real pb, input real pc, output real avg);
    longint sum = 0;
    sel = s; addie_hold = 1;
    for (int i = 0; i < 24000; i++) begin
      line_b = draw(pb); line_c = draw(pc);
      @(negedge clk);
      if (i >= 4000) sum += addie_count;
    end
    avg = real'(sum) / 20000.0 / 255.0;
    n_addie++;
  endtask

  task automatic section_conversion();
    int levels [3] = '{40, 128, 220};
    foreach (levels[k]) begin
      real v, r;
      level = levels[k];
      @(negedge clk); adc_start = 1; @(negedge clk); adc_start = 0;
      while (!adc_done) @(negedge clk);
      n_conv++;
      checks++; if (adc_value != 8'(level)) begin failures++; $display("conversion of %0d gave %0d", level, adc_value); end
      v = real'(level) / 255.0;
      addie_read(2'd0, 0.5, 0.5, r);
      checks++; if (r < v - 0.05 || r > v + 0.05) begin failures++; $display("inward line %f vs %f", r, v); end
      addie_read(2'd1, 0.5, 0.5, r); n_and++;
      checks++; if (r < v * 0.5 - 0.05 || r > v * 0.5 + 0.05) begin failures++; $display("product %f vs %f", r, v * 0.5); end
      addie_read(2'd2, 0.5, 0.9, r); n_sum++;
      checks++; if (r < (v * 0.5 + 0.9) / 2 - 0.05 || r > (v * 0.5 + 0.9) / 2 + 0.05) begin failures++; $display("sum %f", r); end
      addie_read(2'd3, 0.5, 0.1, r); n_sum_lv++;
      checks++; if (r < (v + 0.1) / 2 - 0.05 || r > (v + 0.1) / 2 + 0.05) begin failures++; $display("low-variance sum %f", r); end
    end
    addie_hold = 0;
  endtask

  task automatic section_identifier();
    logic modes [3] = '{1'b1, 1'b0, 1'b0};
    int amps [3] = '{16, 16, 0};
    real tols [3] = '{0.08, 0.16, 0.08};
    foreach (modes[k]) begin
      real w0 = 0, w1 = 0;
      // a fresh start for each method: weights cleared by a reset pulse of the whole design
      id_mode = modes[k]; id_amp = 5'(amps[k]); id_adapt = 0;
      rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
      id_adapt = 1;
      repeat (250000) @(negedge clk);
      for (int i = 0; i < 150000; i++) begin
        @(negedge clk); w0 += real'(id_weight[0]); w1 += real'(id_weight[1]);
      end
      w0 = w0 / 150000.0 / 1024.0; w1 = w1 / 150000.0 / 1024.0;
      n_id_mode[k]++;
      $display("identifier method %0d: w0 %f w1 %f", k, w0, w1);
      checks++; if (w0 < 1.5 - tols[k] || w0 > 1.5 + tols[k]) failures++;
      checks++; if (w1 < -0.75 - tols[k] || w1 > -0.75 + tols[k]) failures++;
    end
    id_adapt = 0;
  endtask

  task automatic section_atl();
    bit clean = 0; int cyc = 0;
    atl_train = 1;
    while (!clean && cyc < 2000) begin
      clean = 1;
      for (int p = 0; p < 16; p++) begin
        int xv [4];
        for (int i = 0; i < 4; i++) begin xv[i] = p[i] ? 1 : -1; atl_x[i] = mk(xv[i]); end
        atl_target = (2 * xv[0] + xv[1] + xv[2] - xv[3]) > 0;
        #1; if (atl_updated) clean = 0;
        @(negedge clk);
      end
      cyc++;
    end
    atl_train = 0;
    checks++; if (!clean) begin failures++; $display("threshold logic did not converge"); end
    for (int p = 0; p < 16; p++) begin
      int xv [4]; int d;
      for (int i = 0; i < 4; i++) begin xv[i] = p[i] ? 1 : -1; atl_x[i] = mk(xv[i]); end
      d = ((2 * xv[0] + xv[1] + xv[2] - xv[3]) > 0) ? 1 : -1;
      #1; checks++; if (tern_val(atl_y) != d) failures++;
    end
  endtask

  task automatic section_bayes();
    real a [4] = '{0.8, 0.6, 0.3, 0.5};
    real b [4] = '{0.2, 0.4, 0.3, 0.1};
    real L, er; longint sum = 0;
    by_est = 1;
    for (int t = 0; t < 80000; t++) begin
      by_e = draw(0.3);
      for (int i = 0; i < 4; i++) by_ei[i] = draw(by_e ? a[i] : b[i]);
      @(negedge clk);
      n_by_est++;
    end
    by_est = 0;
    by_ei = 4'b0011; by_predict = 1;
    repeat (20000) @(negedge clk);
    for (int i = 0; i < 60000; i++) begin @(negedge clk); sum += by_pred_count; end
    by_predict = 0; n_by_pred++;
    L = (0.3 / 0.7) * 4.0 * 1.5; er = L / (1.0 + L);
    $display("Bayes prediction %f expected %f", real'(sum) / 60000.0 / 255.0, er);
    checks++; if (real'(sum) / 60000.0 / 255.0 < er - 0.08 || real'(sum) / 60000.0 / 255.0 > er + 0.08) failures++;
  endtask

  task automatic section_markov();
    real P [4][4] = '{'{0.5, 0.5, 0.0, 0.0}, '{0.1, 0.3, 0.6, 0.0},
                      '{0.0, 0.2, 0.3, 0.5}, '{0.4, 0.0, 0.0, 0.6}};
    int s = 0;
    for (int t = 0; t < 60000; t++) begin
      real u = real'($urandom_range(99999)) / 100000.0, c = 0; int n = 3;
      for (int j = 0; j < 4; j++) begin c += P[s][j]; if (u < c) begin n = j; break; end end
      mk_est_valid = 1; mk_est_from = 2'(s); mk_est_to = 2'(n);
      @(negedge clk);
      s = n; n_mk_est++;
    end
    mk_est_valid = 0;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      checks++;
      if (real'(mk_count[i][j]) / 255.0 < P[i][j] - 0.08 || real'(mk_count[i][j]) / 255.0 > P[i][j] + 0.08) failures++;
    end
    mk_clr_visits = 1; @(negedge clk); mk_clr_visits = 0;
    for (int r = 0; r < 500; r++) begin
      mk_load = 1; mk_load_state = 2'd0; @(negedge clk); mk_load = 0;
      mk_run = 1; repeat (4) @(negedge clk); mk_run = 0;
      n_mk_run++; n_mk_hit += int'(mk_reached[2]);
    end
    checks++;
    if (int'(mk_visits[0]) + int'(mk_visits[1]) + int'(mk_visits[2]) + int'(mk_visits[3]) != 2000) failures++;
  endtask

  initial begin
    for (int i = 0; i < 4; i++) atl_x[i] = mk(0);
    id_x[0] = 0; id_x[1] = 0; id_z = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    section_conversion();
    section_atl();
    section_bayes();
    section_markov();
    section_identifier();
    $display("mechanisms: conversions %0d, ADDIE readings %0d, AND %0d, summer %0d, low-variance summer %0d",
             n_conv, n_addie, n_and, n_sum, n_sum_lv);
    $display("  identifier ternary/binary/polarity %0d/%0d/%0d, ATL updates %0d, Bayes est %0d pred %0d, Markov est %0d runs %0d reached S2 %0d",
             n_id_mode[0], n_id_mode[1], n_id_mode[2], n_atl_upd, n_by_est, n_by_pred, n_mk_est, n_mk_run, n_mk_hit);
    foreach (n_id_mode[k]) begin checks++; if (n_id_mode[k] == 0) failures++; end
    checks++; if (n_conv == 0)    failures++;
    checks++; if (n_addie == 0)   failures++;
    checks++; if (n_and == 0)     failures++;
    checks++; if (n_sum == 0)     failures++;
    checks++; if (n_sum_lv == 0)  failures++;
    checks++; if (n_atl_upd == 0) failures++;
    checks++; if (n_by_est == 0)  failures++;
    checks++; if (n_by_pred == 0) failures++;
    checks++; if (n_mk_est == 0)  failures++;
    checks++; if (n_mk_run == 0)  failures++;
    checks++; if (n_mk_hit == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
