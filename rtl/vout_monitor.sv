// vout_monitor: mean and ripple of the output voltage over a half-period.
//
// Every ADC sample of the output voltage is added to a running sum and
// compared with the running maximum and minimum. At each sync pulse (start of
// a rectified half-period) the sum, sample count, maximum and minimum of the
// half-period just ended are frozen and accumulation restarts. The ripple is
// max - min; the mean is sum / count, computed by a sequential divider. When
// the divider finishes, avg, ripple and a one-clock meas_valid are given.
// The first sync after reset only starts accumulation (the interval before it
// is not a whole half-period) and gives no result.
//
// Mean from all samples and ripple from maximum and minimum follow the
// reference design; the divider and the handling of the first half-period
// are this design's choices.
//
// Timing: meas_valid comes SUM_W + 2 clocks after sync (24 clocks by default).
module vout_monitor
  import pfc_pkg::*;
#(
  parameter int unsigned CNT_W = 12   // up to 4095 samples per half-period
) (
  input  logic clk,
  input  logic rst_n,
  input  adc_t sample,
  input  logic sample_valid,
  input  logic sync,
  output adc_t avg,
  output adc_t ripple,
  output logic meas_valid
);
  localparam int unsigned SUM_W = ADC_W + CNT_W;

  logic [SUM_W-1:0] sum;
  logic [CNT_W-1:0] cnt;
  adc_t             vmax, vmin;
  logic             primed;
  adc_t             rip_hold;

  logic             div_start, div_busy, div_done;
  logic [SUM_W-1:0] div_num, div_quo;
  logic [CNT_W-1:0] div_den;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum       <= '0;
      cnt       <= '0;
      vmax      <= '0;
      vmin      <= '1;
      primed    <= 1'b0;
      rip_hold  <= '0;
      div_start <= 1'b0;
      div_num   <= '0;
      div_den   <= '0;
    end else begin
      div_start <= 1'b0;
      if (sync) begin
        // close the half-period; a sample arriving now opens the next one
        if (primed && cnt != '0) begin
          div_start <= 1'b1;
          div_num   <= sum;
          div_den   <= cnt;
          rip_hold  <= vmax - vmin;
        end
        primed <= 1'b1;
        if (sample_valid) begin
          sum  <= SUM_W'(sample);
          cnt  <= CNT_W'(1);
          vmax <= sample;
          vmin <= sample;
        end else begin
          sum  <= '0;
          cnt  <= '0;
          vmax <= '0;
          vmin <= '1;
        end
      end else if (sample_valid) begin
        sum <= sum + SUM_W'(sample);
        if (cnt != '1) cnt <= cnt + 1'b1;
        if (sample > vmax) vmax <= sample;
        if (sample < vmin) vmin <= sample;
      end
    end
  end

  seq_divider #(.NUM_W(SUM_W), .DEN_W(CNT_W)) u_div (
    .clk  (clk),
    .rst_n(rst_n),
    .start(div_start),
    .num  (div_num),
    .den  (div_den),
    .busy (div_busy),
    .done (div_done),
    .quo  (div_quo)
  );

  // half-periods are far longer than a division, so a start never meets a
  // busy divider
  a_div_free: assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !div_busy);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      avg        <= '0;
      ripple     <= '0;
      meas_valid <= 1'b0;
    end else begin
      meas_valid <= div_done;
      if (div_done) begin
        avg    <= (div_quo > SUM_W'((1 << ADC_W) - 1)) ? '1 : adc_t'(div_quo);
        ripple <= rip_hold;
      end
    end
  end

endmodule
