// sc_descent_identifier: linear process identifier by stochastic steepest descent.
//
// Finds weights w_i such that sum(w_i X_i) approximates the process output Z, by adjusting
// each weight against the correlation of the error E = sum(w_i X_i) - Z with its input X_i.
// There is one sc_descent_channel per weight and one sc_sawtooth shared by all channels.
// The error summer is the parallel outward use of the weight counters: each weight count,
// read as a fixed-point number with WF fraction bits (w = weight / 2**WF), scales its input,
// and the products are summed with Z subtracted; E is saturated to EW bits and fed back to
// every channel in the same clock, so each weight step correlates E with the sample X_i it
// was computed from (E is combinational from the weight registers and the inputs). For the first-order process
// 1/(a0 + a1 s) the inputs are the process output and its derivative and Z is the process
// input, so the weights converge to a0 and a1.
// Interface: x[i], z are signed EW-bit samples, one per clock; mode, amp select the
// correlation method (mode 0 with amp 0 is polarity coincidence); adapt enables learning.
// The source performs the summation in analog hardware with digitally controlled gains; the
// digital summer, the fixed-point scale and the combinational error path are this design's choices.
module sc_descent_identifier #(
  parameter int unsigned NCH = 2,
  parameter int unsigned EW  = 8,
  parameter int unsigned WW  = 16,
  parameter int unsigned WF  = 10,
  parameter int unsigned AW  = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 adapt,
  input  logic                 mode,
  input  logic [AW:0]          amp,
  input  logic signed [EW-1:0] x [NCH],
  input  logic signed [EW-1:0] z,
  output logic signed [EW-1:0] err,
  output logic signed [WW-1:0] weight [NCH]
);
  localparam int unsigned PW = WW + EW + $clog2(NCH + 1) + 1;
  localparam logic signed [PW-1:0] EMAX = PW'((2 ** (EW - 1)) - 1);
  localparam logic signed [PW-1:0] EMIN = -PW'(2 ** (EW - 1));

  logic signed [EW-1:0] gamma, delta;
  logic signed [PW-1:0] acc, e_full;

  sc_sawtooth #(.W(EW), .AW(AW)) u_saw (.clk, .rst_n, .amp, .gamma, .delta);

  for (genvar i = 0; i < NCH; i++) begin : g_ch
    sc_descent_channel #(.WW(WW), .EW(EW), .SEED((WW-1)'(32'h1A3C + 977 * i))) u_ch (
      .clk, .rst_n, .adapt, .mode,
      .e(err), .x(x[i]), .gamma, .delta, .weight(weight[i])
    );
  end

  always_comb begin
    acc = '0;
    for (int i = 0; i < NCH; i++) acc += PW'(weight[i]) * PW'(x[i]);
    e_full = (acc >>> WF) - PW'(z);
  end

  always_comb begin
    if (e_full > EMAX)       err = EMAX[EW-1:0];
    else if (e_full < EMIN)  err = EMIN[EW-1:0];
    else                     err = e_full[EW-1:0];
  end
endmodule
