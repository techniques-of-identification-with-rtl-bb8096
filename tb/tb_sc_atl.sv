// tb_sc_atl: trains the element on the 16 patterns of four +-1 inputs to compute
// sign(2*x0 + x1 + x2 - x3), which no weight vector limited to +-1 realises (the weight of x0
// has to reach the bound 2), cycling through the patterns until a
// whole cycle passes without a weight change. Every clock it checks the rule: no change when
// the example is classified (target * S > 0), and otherwise each weight either stays or moves
// by target * x_i, within +-2. After convergence every pattern must be output correctly
// (y = target, threshold 1), and convergence must take less than 2000 training cycles.
module tb_sc_atl;
  import sc_pkg::*;
  logic clk = 0, rst_n = 0, train = 0, target = 0, updated;
  tern_t x [4];
  tern_t y;
  logic signed [7:0] w [4];
  int checks = 0, failures = 0;

  sc_atl #(.NIN(4)) dut (.clk, .rst_n, .train, .target, .x, .y, .w, .updated);
  always #5 clk = ~clk;

  function automatic tern_t mk(int v);
    mk.up = (v > 0); mk.dn = (v < 0);
  endfunction

  initial begin
    #10000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic apply(input int p, output bit changed);
    int xv [4]; int s = 0, d; int w_old [4];
    for (int i = 0; i < 4; i++) xv[i] = p[i] ? 1 : -1;
    d = ((2 * xv[0] + xv[1] + xv[2] - xv[3]) > 0) ? 1 : -1;
    for (int i = 0; i < 4; i++) x[i] = mk(xv[i]);
    target = (d > 0);
    for (int i = 0; i < 4; i++) begin w_old[i] = int'(w[i]); s += w_old[i] * xv[i]; end
    @(posedge clk); #1;
    changed = 0;
    for (int i = 0; i < 4; i++) begin
      int dw = int'(w[i]) - w_old[i];
      if (dw != 0) changed = 1;
      checks++;
      if (d * s > 0) begin
        if (dw != 0) begin failures++; $display("weight %0d moved on a classified example", i); end
      end else begin
        int moved = w_old[i] + d * xv[i];
        if (moved > 2) moved = 2;
        if (moved < -2) moved = -2;
        if (dw != 0 && int'(w[i]) != moved) begin failures++; $display("weight %0d bad step %0d -> %0d", i, w_old[i], w[i]); end
      end
      if (w[i] > 2 || w[i] < -2) begin checks++; failures++; end
    end
  endtask

  initial begin
    int cyc = 0, nupd = 0;
    bit clean = 0, ch;
    for (int i = 0; i < 4; i++) x[i] = mk(0);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    train = 1;
    while (!clean && cyc < 2000) begin
      clean = 1;
      for (int p = 0; p < 16; p++) begin apply(p, ch); if (ch) begin clean = 0; nupd++; end end
      cyc++;
    end
    train = 0;
    $display("converged after %0d cycles, %0d weight changes; w = %0d %0d %0d %0d", cyc, nupd, w[0], w[1], w[2], w[3]);
    checks++; if (!clean) begin failures++; $display("no convergence"); end
    checks++; if (nupd == 0) begin failures++; $display("no update ever happened"); end
    for (int p = 0; p < 16; p++) begin
      automatic int xv [4]; automatic int d;
      for (int i = 0; i < 4; i++) xv[i] = p[i] ? 1 : -1;
      d = ((2 * xv[0] + xv[1] + xv[2] - xv[3]) > 0) ? 1 : -1;
      for (int i = 0; i < 4; i++) x[i] = mk(xv[i]);
      #1;
      checks++; if (tern_val(y) != d) begin failures++; $display("pattern %0d output %0d", p, tern_val(y)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
