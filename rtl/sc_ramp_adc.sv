// sc_ramp_adc: ramp-and-comparator converter for the inward interface (digital part).
//
// Converts an analog level to a W-bit number deterministically. On start the ramp count is
// cleared and then rises by one per clock; it drives an external DAC whose output, the ramp,
// an external comparator holds against the analog input. The first clock at which the
// comparator reports ramp >= input (cmp ON) ends the conversion: the count is captured in
// value and done pulses for one clock. If the ramp reaches full scale first, full scale is
// captured. A conversion therefore takes value+1 clocks after start.
// The ramp plus comparator converter follows the source design; the handshake (start,
// busy, done) and the capture rule are this design's choices. The DAC and comparator are
// analog parts outside this module.
module sc_ramp_adc #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         cmp,
  output logic [W-1:0] ramp,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] value
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ramp  <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      value <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          ramp <= '0;
          busy <= 1'b1;
        end
      end else if (cmp || ramp == '1) begin
        value <= ramp;
        busy  <= 1'b0;
        done  <= 1'b1;
      end else begin
        ramp <= ramp + 1'b1;
      end
    end
  end
endmodule
