// dpwm: digital PWM with dither for the boost switch.
//
// A counter runs from 0 to CLK_PER_SW-1 (1000 clocks of 100 MHz = 100 kHz
// switching). The gate pwm is high while the counter is below the compare
// value. The compare value is taken at each period start from the integer part
// of duty (11 bits, clamped to 0..CLK_PER_SW-1) plus a dither carry: the
// 5-bit fraction is added every period to a 5-bit accumulator and its carry
// adds one count, so over 32 periods the mean duty has 15-bit resolution.
// A tick is given LOOKAHEAD clocks before each period start so that the
// sequencer, memories and duty composition can prepare the next value.
//
// Duty range 0..999 counts, 100 kHz from 100 MHz and 5 dither bits follow
// the reference design; the first-order dither pattern and the look-ahead
// tick are this design's choices.
//
// Timing: duty is sampled on the clock edge that starts a period
// (counter 999 -> 0); the new pulse starts on that edge.
module dpwm
  import pfc_pkg::*;
#(
  parameter int unsigned CLK_PER_SW = 1000,
  parameter int unsigned LOOKAHEAD  = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  duty_t duty,
  output logic  pwm,
  output logic  tick,          // LOOKAHEAD clocks before a period start
  output logic  period_start,  // first clock of a period
  output logic  dith_evt       // pulse: dither added one count this period
);
  localparam int unsigned CW = $clog2(CLK_PER_SW);

  logic [CW-1:0]          cnt;
  logic [CW:0]            cmp;
  logic [DUTY_FRAC-1:0]   facc;
  logic [DUTY_FRAC:0]     fsum;
  logic signed [DUTY_W-DUTY_FRAC-1:0] dint;
  logic signed [31:0]     want;

  always_comb begin
    dint = duty[DUTY_W-1:DUTY_FRAC];
    fsum = {1'b0, facc} + {1'b0, duty[DUTY_FRAC-1:0]};
    want = 32'(dint) + 32'(fsum[DUTY_FRAC]);
    if (want < 0) want = 0;
    if (want > CLK_PER_SW - 1) want = CLK_PER_SW - 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt          <= '0;
      cmp          <= '0;
      facc         <= '0;
      tick         <= 1'b0;
      period_start <= 1'b0;
      dith_evt     <= 1'b0;
    end else begin
      tick         <= (cnt == CW'(CLK_PER_SW - LOOKAHEAD - 1));
      period_start <= 1'b0;
      dith_evt     <= 1'b0;
      if (cnt == CW'(CLK_PER_SW - 1)) begin
        cnt          <= '0;
        period_start <= 1'b1;
        cmp          <= (CW+1)'(want);
        facc         <= fsum[DUTY_FRAC-1:0];
        dith_evt     <= fsum[DUTY_FRAC];
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  always_comb pwm = ({1'b0, cnt} < cmp);

endmodule
