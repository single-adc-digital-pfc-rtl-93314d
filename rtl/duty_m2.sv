// duty_m2: duty composition of the two-component method (d = d1 + d2).
//
// Stored per switching cycle: 1-d1 (voltage-ratio part, as complement) and
// d2 (inductor-current part, stored directly). With k and kinv ~ 1/k from the
// average-voltage regulator and r from the ripple regulator:
//   d1*  = 1 - k*(1-d1)
//   d2*  = kinv*d2
//   d*   = d1* + r*d2*
// The result is clamped to 0 .. 1 - 1 LSB; products are truncated (floor).
// The data flow is the reference design's two-parameter regulator.
//
// Timing: one register stage; d_out is valid one clock after the inputs.
module duty_m2
  import pfc_pkg::*;
#(
  parameter int unsigned CLK_PER_SW = 1000
) (
  input  logic  clk,
  input  logic  rst_n,
  input  duty_t om_d1,   // 1 - d1
  input  duty_t d2,
  input  gain_t k,
  input  gain_t kinv,
  input  gain_t r,
  output duty_t d_out
);
  localparam int ONE  = int'(CLK_PER_SW) << DUTY_FRAC;
  localparam int DMAX = ONE - 1;

  logic signed [31:0] d1_s, d2_s, d2r_s, d_s;

  always_comb begin
    d1_s  = ONE - mul_gain(32'(om_d1), k);
    d2_s  = mul_gain(32'(d2), kinv);
    d2r_s = mul_gain(d2_s, r);
    d_s   = d1_s + d2r_s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          d_out <= '0;
    else if (d_s < 0)    d_out <= '0;
    else if (d_s > DMAX) d_out <= duty_t'(DMAX);
    else                 d_out <= duty_t'(d_s);
  end

endmodule
