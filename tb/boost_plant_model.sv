// boost_plant_model: behavioural model of the boost PFC power stage (not
// synthesizable). Rectified mains vg = Vpk*|sin(th) + h3*sin(3th) + h5*sin(5th)|,
// inductor L, ideal switch driven by gate, ideal diode (inductor current cannot
// go negative), output capacitor C and resistive load R. Advanced once per
// clock with forward Euler. It also gives the zero-crossing comparator output
// ('1' while vg < 10 V), the divided output voltage for the ADC (x 5/500) and
// running sums for the power factor of each rectified half-period, which are
// latched into pf_last when the next half-period starts. init restarts it.
module boost_plant_model #(
  parameter real TCLK = 10.0e-9
) (
  input  logic clk,
  input  logic run,
  input  logic init,     // restart: th just before a zero crossing, vout = v0, il = 0
  input  real  v0,
  input  logic gate,
  input  real  vg_rms,
  input  real  fline,
  input  real  h35,      // relative 3rd and 5th harmonic of the mains
  input  real  lind,
  input  real  cap,
  input  real  rload,
  output real  vout,
  output real  il,
  output real  vadc,
  output logic zc,
  output real  pf_last,
  output int   nhalf
);
  localparam real PI = 3.14159265358979;
  real th = PI - 0.06;
  real vg = 0.0, sp = 0.0, sv = 0.0, si = 0.0;
  bit  in_win = 1'b0;

  initial begin vout = 0.0; il = 0.0; pf_last = 0.0; nhalf = 0; end

  always @(posedge clk) if (init) begin
    th = PI - 0.06; vout = v0; il = 0.0; sp = 0.0; sv = 0.0; si = 0.0;
    in_win = 1'b0; nhalf = 0; pf_last = 0.0;
  end else if (run) begin
    real s;
    th = th + 2.0 * PI * fline * TCLK;
    if (th > 2.0 * PI) th = th - 2.0 * PI;
    s  = $sin(th) + h35 * $sin(3.0 * th) + h35 * $sin(5.0 * th);
    vg = vg_rms * $sqrt(2.0) * ((s < 0.0) ? -s : s);
    if (gate) il = il + vg / lind * TCLK;
    else      il = il + (vg - vout) / lind * TCLK;
    if (il < 0.0) il = 0.0;
    vout = vout + ((gate ? 0.0 : il) - vout / rload) / cap * TCLK;
    vadc = vout * 5.0 / 500.0;
    zc   = (vg < 10.0);
    sp += vg * il; sv += vg * vg; si += il * il;
    if (zc && !in_win) begin
      if (sv > 0.0 && si > 0.0) pf_last = sp / $sqrt(sv * si);
      sp = 0.0; sv = 0.0; si = 0.0;
      nhalf++;
    end
    in_win = zc;
  end

endmodule
