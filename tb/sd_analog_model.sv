// sd_analog_model: behavioural model of the analog half of the sigma-delta
// ADC (not synthesizable). An RC low-pass filters the feedback bit (0 or VREF
// volts); a comparator outputs '1' while the input voltage vin is above the
// filtered voltage. The filter state is advanced once per clock with forward
// Euler: v += (fb*VREF - v) * TCLK / RC.
module sd_analog_model #(
  parameter real VREF = 5.0,
  parameter real RC   = 2.0e-6,
  parameter real TCLK = 10.0e-9
) (
  input  logic clk,
  input  real  vin,
  input  logic fb,
  output logic comp
);
  real v = 0.0;

  always @(posedge clk) begin
    v = v + ((fb ? VREF : 0.0) - v) * TCLK / RC;
  end

  assign comp = (vin > v);

endmodule
