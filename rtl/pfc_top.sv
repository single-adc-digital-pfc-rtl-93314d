// pfc_top: single-ADC digital PFC controller for a boost converter.
//
// The switch duty cycle of every switching cycle of a rectified half-period
// is calculated off line for the nominal operating point and stored in
// memories (duty_table). A zero-crossing comparator, debounced in zc_debounce,
// restarts the playback each half-period (duty_sequencer). The only measured
// quantity is the output voltage, through a sigma-delta ADC (sd_adc); per
// half-period vout_monitor gives its mean and its ripple (max - min).
//   - the mean feeds the average-voltage regulator (pid_reg, error = mean -
//     reference), whose k = 1 + delta and kinv = 1 - delta scale the stored
//     components to follow input-voltage changes;
//   - the ripple, proportional to the load power, feeds the ripple regulator
//     (pid_reg, error = reference - ripple, negative gains), whose r = 1 + delta
//     scales the load-dependent components.
// The composition of the components depends on METHOD:
//   1: d* = 1 - k(1-d)                         (1 table,  duty_m1)
//   2: d* = 1 - k(1-d1) + r*kinv*d2             (2 tables, duty_m2)
//   3: d* = da* + r(db* + dc*)                  (3 tables, duty_m3, default)
// The result drives a 100 kHz DPWM with 5-bit dither (dpwm). The gate is held
// off after reset until the sequencer has started the tables at a zero
// crossing (the first detector window after reset is only measured).
//
// Tables are loaded through tbl_* after reset: tbl_sel 0/1/2 selects
//   method 1: 1-d;  method 2: 1-d1, d2;  method 3: 1-da, 1-d1, dc.
// References vavg_ref and vrip_ref are in ADC counts (full scale = ADC_WINDOW).
//
// Timing: clk is the 100 MHz controller clock. Regulator outputs change about
// 25 clocks after each sync; they are used from the next switching cycle on.
// The duty value for a switching cycle is fetched during the last LOOKAHEAD
// clocks of the previous one.
module pfc_top
  import pfc_pkg::*;
#(
  parameter method_e     METHOD     = METHOD_DADBC,
  parameter int unsigned CLK_PER_SW = 1000,   // 100 MHz / 100 kHz
  parameter int unsigned DEPTH      = 1000,   // switching cycles per half-period
  parameter int unsigned ADC_WINDOW = 1000,   // clocks per ADC sample
  parameter int unsigned DEBOUNCE   = 500,
  parameter int          KP_A = 0,   parameter int KI_A = 8,   parameter int KD_A = 0,
  parameter int          KP_R = -60, parameter int KI_R = 0,   parameter int KD_R = 0,
  parameter int          DELTA_LIM  = 16383,
  localparam int unsigned AW  = $clog2(DEPTH),
  localparam int unsigned N_W = $clog2(2 * DEPTH + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // analog front end
  input  logic           zc_comp_in,   // '1' while |vg| is below the threshold
  input  logic           adc_comp_in,  // sigma-delta comparator output
  output logic           adc_fb_out,   // sigma-delta feedback to the RC filter
  output logic           pwm_out,      // boost switch gate
  // table loading
  input  logic           tbl_we,
  input  logic [1:0]     tbl_sel,
  input  logic [AW-1:0]  tbl_addr,
  input  duty_t          tbl_wdata,
  // references
  input  adc_t           vavg_ref,
  input  adc_t           vrip_ref,
  // status
  output logic           sync_out,
  output adc_t           vavg_out,
  output adc_t           vrip_out,
  output logic           meas_valid,
  output gain_t          k_out,
  output gain_t          kinv_out,
  output gain_t          r_out,
  output duty_t          duty_out,
  output logic [AW-1:0]  addr_out,
  output logic [N_W-1:0] n_half,
  output logic           restart_evt,
  output logic           rep_evt,
  output logic           skip_evt,
  output logic           dith_evt,
  output logic           avg_sat,
  output logic           rip_sat
);
  localparam int unsigned NTAB = (METHOD == METHOD_D) ? 1 : (METHOD == METHOD_D1D2) ? 2 : 3;

  logic  sync;
  logic  pwm_raw, started;
  adc_t  sample;
  logic  sample_valid;
  err_t  err_avg, err_rip;
  logic  tick;
  duty_t tdata [3];

  zc_debounce #(.DEBOUNCE_CYCLES(DEBOUNCE)) u_zc (
    .clk(clk), .rst_n(rst_n), .comp_in(zc_comp_in),
    .zc_level(), .sync_pulse(sync)
  );

  sd_adc #(.WINDOW(ADC_WINDOW)) u_adc (
    .clk(clk), .rst_n(rst_n), .comp_in(adc_comp_in), .fb_out(adc_fb_out),
    .sample(sample), .sample_valid(sample_valid)
  );

  vout_monitor u_mon (
    .clk(clk), .rst_n(rst_n), .sample(sample), .sample_valid(sample_valid),
    .sync(sync), .avg(vavg_out), .ripple(vrip_out), .meas_valid(meas_valid)
  );

  always_comb begin
    err_avg = err_t'({1'b0, vavg_out}) - err_t'({1'b0, vavg_ref});
    err_rip = err_t'({1'b0, vrip_ref}) - err_t'({1'b0, vrip_out});
  end

  pid_reg #(.KP(KP_A), .KI(KI_A), .KD(KD_A), .DELTA_LIM(DELTA_LIM)) u_reg_avg (
    .clk(clk), .rst_n(rst_n), .err(err_avg), .err_valid(meas_valid),
    .k(k_out), .kinv(kinv_out), .delta(), .sat(avg_sat), .upd()
  );

  pid_reg #(.KP(KP_R), .KI(KI_R), .KD(KD_R), .DELTA_LIM(DELTA_LIM)) u_reg_rip (
    .clk(clk), .rst_n(rst_n), .err(err_rip), .err_valid(meas_valid),
    .k(r_out), .kinv(), .delta(), .sat(rip_sat), .upd()
  );

  dpwm #(.CLK_PER_SW(CLK_PER_SW)) u_pwm (
    .clk(clk), .rst_n(rst_n), .duty(duty_out), .pwm(pwm_raw),
    .tick(tick), .period_start(), .dith_evt(dith_evt)
  );

  duty_sequencer #(.DEPTH(DEPTH)) u_seq (
    .clk(clk), .rst_n(rst_n), .sync(sync), .tick(tick), .addr(addr_out),
    .restart(restart_evt), .n_half(n_half), .rep_evt(rep_evt), .skip_evt(skip_evt)
  );

  for (genvar i = 0; i < 3; i++) begin : g_tab
    if (i < NTAB) begin : g_mem
      duty_table #(.DEPTH(DEPTH)) u_tab (
        .clk(clk), .we(tbl_we && tbl_sel == 2'(i)), .waddr(tbl_addr),
        .wdata(tbl_wdata), .raddr(addr_out), .rdata(tdata[i])
      );
    end else begin : g_none
      assign tdata[i] = '0;
    end
  end

  if (METHOD == METHOD_D) begin : g_m1
    duty_m1 #(.CLK_PER_SW(CLK_PER_SW)) u_duty (
      .clk(clk), .rst_n(rst_n), .om_d(tdata[0]), .k(k_out), .d_out(duty_out)
    );
  end else if (METHOD == METHOD_D1D2) begin : g_m2
    duty_m2 #(.CLK_PER_SW(CLK_PER_SW)) u_duty (
      .clk(clk), .rst_n(rst_n), .om_d1(tdata[0]), .d2(tdata[1]),
      .k(k_out), .kinv(kinv_out), .r(r_out), .d_out(duty_out)
    );
  end else begin : g_m3
    duty_m3 #(.CLK_PER_SW(CLK_PER_SW)) u_duty (
      .clk(clk), .rst_n(rst_n), .om_da(tdata[0]), .om_d1(tdata[1]), .dc(tdata[2]),
      .k(k_out), .kinv(kinv_out), .r(r_out), .d_out(duty_out)
    );
  end

  // gate held off until the tables have been started at a zero crossing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           started <= 1'b0;
    else if (restart_evt) started <= 1'b1;
  end

  always_comb begin
    sync_out = sync;
    pwm_out  = pwm_raw & started;
  end

endmodule
