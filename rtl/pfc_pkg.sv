// pfc_pkg: constants and fixed-point types shared by the PFC controller.
//
// Number formats used across the design:
//   duty_t  signed 16 bit, 11 integer + 5 fractional bits, in units of
//           clock periods of the DPWM (1.0 duty = CLK_PER_SW counts). The
//           16-bit / 5-fraction split follows the memory format of the
//           reference implementation; the 5 fraction bits feed the dither.
//   gain_t  signed 18 bit with 14 fractional bits, used for the regulator
//           outputs k, 1/k (approximated as 1 - delta) and the ripple gain r.
//           14 fractional bits is the resolution quoted for the regulator;
//           the 18-bit width (range -8..+8) is this design's choice.
//   adc_t   10-bit unsigned ADC sample.
package pfc_pkg;

  localparam int unsigned DUTY_W    = 16;
  localparam int unsigned DUTY_FRAC = 5;
  localparam int unsigned GAIN_W    = 18;
  localparam int unsigned GAIN_FRAC = 14;
  localparam int unsigned ADC_W     = 10;
  localparam int unsigned ERR_W     = ADC_W + 1;

  typedef logic signed [DUTY_W-1:0] duty_t;
  typedef logic signed [GAIN_W-1:0] gain_t;
  typedef logic        [ADC_W-1:0]  adc_t;
  typedef logic signed [ERR_W-1:0]  err_t;

  localparam gain_t GAIN_ONE = gain_t'(1 << GAIN_FRAC);

  // Control method selected in the top: 1 = d only, 2 = d1/d2, 3 = da/db/dc.
  typedef enum logic [1:0] {
    METHOD_D     = 2'd1,
    METHOD_D1D2  = 2'd2,
    METHOD_DADBC = 2'd3
  } method_e;

  // Multiply a duty value by a gain and return it in duty units (floor).
  function automatic logic signed [31:0] mul_gain(input logic signed [31:0] d,
                                                  input gain_t g);
    logic signed [49:0] p;
    p = 50'(d) * 50'(g);
    return 32'(p >>> GAIN_FRAC);
  endfunction

endpackage
