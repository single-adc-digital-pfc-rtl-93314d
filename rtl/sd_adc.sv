// sd_adc: digital half of a first-order sigma-delta ADC.
//
// The analog half is one voltage comparator and an RC filter. The comparator
// compares the divided output voltage with the RC-filtered feedback bit; this
// block samples the comparator every clock into the feedback flip-flop, whose
// output drives the RC filter (fb_out). The loop keeps the density of ones in
// fb_out equal to vin / VREF. Counting the ones over WINDOW clocks gives the
// sample: with the default WINDOW = 1000 at 100 MHz the converter delivers one
// 10-bit sample every 10 us (100 kS/s), full scale = WINDOW counts.
//
// The reference implementation names this structure (comparator + RC, logic in
// the FPGA, 10 bits, 100 kHz); the counting decimator is the simplest one that
// gives that resolution and rate, and is this design's choice.
//
// Timing: sample and sample_valid update on the clock after the window's last
// bit; sample_valid is a one-clock pulse every WINDOW clocks.
module sd_adc
  import pfc_pkg::*;
#(
  parameter int unsigned WINDOW = 1000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic comp_in,       // comparator: 1 when vin > filtered feedback
  output logic fb_out,        // feedback bit to the RC filter
  output adc_t sample,
  output logic sample_valid
);
  localparam int unsigned WW = $clog2(WINDOW + 1);
  localparam int unsigned MAXV = (1 << ADC_W) - 1;

  logic [WW-1:0] wcnt;
  logic [WW-1:0] ones;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fb_out       <= 1'b0;
      wcnt         <= '0;
      ones         <= '0;
      sample       <= '0;
      sample_valid <= 1'b0;
    end else begin
      fb_out       <= comp_in;
      sample_valid <= 1'b0;
      if (wcnt == WW'(WINDOW - 1)) begin
        wcnt         <= '0;
        ones         <= '0;
        sample_valid <= 1'b1;
        if (32'(ones) + 32'(fb_out) > MAXV) sample <= adc_t'(MAXV);
        else                                sample <= adc_t'(ones + WW'(fb_out));
      end else begin
        wcnt <= wcnt + 1'b1;
        ones <= ones + WW'(fb_out);
      end
    end
  end

endmodule
