// duty_m3: duty composition of the three-component method (d = da + db + dc).
//
// Stored per switching cycle: 1-da (the load-independent part set by the
// input/output voltage ratio), 1-d1 (the part that also contains the output
// ripple) and dc (= d2, the inductor-current term). With k and 1/k ~ kinv from
// the average-voltage regulator and r from the ripple regulator:
//   da* = 1 - k*(1-da)
//   d1* = 1 - k*(1-d1)
//   db* = d1* - da*                 (load-dependent part of d1)
//   dc* = kinv*dc
//   d*  = da* + r*(db* + dc*)
// Storing the complements 1-da and 1-d1 keeps the regulated duty at 1 at the
// zero crossings. The result is clamped to 0 .. 1 - 1 LSB.
//
// The data flow is the one of the reference design's three-parameter
// regulator. Products are truncated (floor) to the 5-bit fraction of duty_t.
//
// Timing: one register stage; d_out is valid one clock after the inputs.
module duty_m3
  import pfc_pkg::*;
#(
  parameter int unsigned CLK_PER_SW = 1000
) (
  input  logic  clk,
  input  logic  rst_n,
  input  duty_t om_da,   // 1 - da
  input  duty_t om_d1,   // 1 - d1
  input  duty_t dc,
  input  gain_t k,
  input  gain_t kinv,
  input  gain_t r,
  output duty_t d_out
);
  localparam int ONE  = int'(CLK_PER_SW) << DUTY_FRAC;
  localparam int DMAX = ONE - 1;

  logic signed [31:0] da_s, d1_s, db_s, dc_s, dbc_s, d_s;

  always_comb begin
    da_s  = ONE - mul_gain(32'(om_da), k);
    d1_s  = ONE - mul_gain(32'(om_d1), k);
    db_s  = d1_s - da_s;
    dc_s  = mul_gain(32'(dc), kinv);
    dbc_s = mul_gain(db_s + dc_s, r);
    d_s   = da_s + dbc_s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          d_out <= '0;
    else if (d_s < 0)    d_out <= '0;
    else if (d_s > DMAX) d_out <= duty_t'(DMAX);
    else                 d_out <= duty_t'(d_s);
  end

endmodule
