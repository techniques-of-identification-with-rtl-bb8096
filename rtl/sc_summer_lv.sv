// sc_summer_lv: low-variance two-input summer for the bipolar code (lambda = 1/2).
//
// When the two inputs agree the output copies them, as the random-switch summer would.
// When they disagree the random choice is replaced by a toggle flip-flop: the output takes
// the toggle's state and the toggle flips. Over any run the disagreeing clocks are then shared
// exactly equally between a and b, so the output represents (Ea+Eb)/2 with less variance than
// a random switch. The source design states that extra gating reduces the variance; this
// particular gating is this design's choice.
// Timing: y is combinational from a, b and the toggle register.
module sc_summer_lv (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic y
);
  logic tog;

  always_ff @(posedge clk) begin
    if (!rst_n)      tog <= 1'b0;
    else if (a ^ b)  tog <= ~tog;
  end

  assign y = (a ^ b) ? tog : a;
endmodule
