// pid_reg: fixed-point PID regulator giving k = 1 + delta and 1/k ~ 1 - delta.
//
// Once per err_valid (once per half-period in this design) the regulator
// updates
//   I     <- sat(I + KI*e)
//   delta <- sat(I + KP*e + KD*(e - e_prev))
// with every gain an integer in units of 2^-14 per error LSB, so delta has 14
// fractional bits. The outputs are k = 1 + delta and kinv = 1 - delta, the
// adder-only approximation of 1/k used to scale the components stored without
// complement (valid because delta stays near 0). Both the integrator and delta
// are clamped to +-DELTA_LIM (anti-windup); sat pulses when either was clamped.
//
// The structure (PID, 1 + delta, 1 - delta), the 14 fractional bits and the
// integral gain 2^-11 (KI = 8) follow the reference design. KP, KD, the clamp
// and the per-LSB scaling of the gains are this design's choices.
//
// Timing: k, kinv, delta and upd (one-clock pulse) change one clock after
// err_valid.
module pid_reg
  import pfc_pkg::*;
#(
  parameter int KP        = 32,     // 2^-9 per LSB
  parameter int KI        = 8,      // 2^-11 per LSB
  parameter int KD        = 16,     // 2^-10 per LSB
  parameter int DELTA_LIM = 16383   // just below 1.0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  err_t  err,
  input  logic  err_valid,
  output gain_t k,
  output gain_t kinv,
  output gain_t delta,
  output logic  sat,
  output logic  upd
);
  logic signed [31:0] integ, integ_n, e_prev, delta_n, raw;

  function automatic logic signed [31:0] clamp(input logic signed [31:0] v);
    if (v > DELTA_LIM)       return DELTA_LIM;
    else if (v < -DELTA_LIM) return -DELTA_LIM;
    else                     return v;
  endfunction

  always_comb begin
    integ_n = clamp(integ + KI * 32'(err));
    raw     = integ_n + KP * 32'(err) + KD * (32'(err) - e_prev);
    delta_n = clamp(raw);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ  <= '0;
      e_prev <= '0;
      delta  <= '0;
      k      <= GAIN_ONE;
      kinv   <= GAIN_ONE;
      sat    <= 1'b0;
      upd    <= 1'b0;
    end else begin
      upd <= err_valid;
      sat <= 1'b0;
      if (err_valid) begin
        integ  <= integ_n;
        e_prev <= 32'(err);
        delta  <= gain_t'(delta_n);
        k      <= GAIN_ONE + gain_t'(delta_n);
        kinv   <= GAIN_ONE - gain_t'(delta_n);
        sat    <= (raw != delta_n) || (integ_n != integ + KI * 32'(err));
      end
    end
  end

endmodule
