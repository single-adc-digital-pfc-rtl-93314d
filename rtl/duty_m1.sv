// duty_m1: duty composition of the single-parameter method.
//
// The whole duty cycle is stored as its complement 1-d and scaled by the
// average-voltage regulator output k:  d* = 1 - k*(1-d). Scaling the
// complement keeps d* = 1 at the zero crossings, where scaling d itself would
// distort the waveform. The result is clamped to 0 .. 1 - 1 LSB; the product
// is truncated (floor). The data flow is the reference design's first method.
//
// Timing: one register stage; d_out is valid one clock after the inputs.
module duty_m1
  import pfc_pkg::*;
#(
  parameter int unsigned CLK_PER_SW = 1000
) (
  input  logic  clk,
  input  logic  rst_n,
  input  duty_t om_d,    // 1 - d
  input  gain_t k,
  output duty_t d_out
);
  localparam int ONE  = int'(CLK_PER_SW) << DUTY_FRAC;
  localparam int DMAX = ONE - 1;

  logic signed [31:0] d_s;

  always_comb d_s = ONE - mul_gain(32'(om_d), k);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          d_out <= '0;
    else if (d_s < 0)    d_out <= '0;
    else if (d_s > DMAX) d_out <= duty_t'(DMAX);
    else                 d_out <= duty_t'(d_s);
  end

endmodule
