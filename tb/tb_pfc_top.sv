// tb_pfc_top: end-to-end test of the controller with all parameters at their
// defaults (100 MHz clock, 1000 clocks per switching period, 1000 switching
// cycles per nominal half-period, method 3).
//
// The testbench
//  - computes the three tables (1-da, 1-d1, dc) for the nominal converter
//    (Vg = 230 V rms, Vout = 400 V, P = 300 W, L = 5 mH, C = 68 uF,
//    Tsw = 10 us, 50 Hz) from the boost CCM equations and loads them;
//  - generates the rectified mains voltage and a zero-crossing comparator
//    ('1' while |vg| < 10 V) with glitches after every window;
//  - generates an output voltage mean - A*sin(2*wt) whose mean, ripple
//    amplitude and line frequency change from one half-period to the next,
//    and converts it through a divider (5/500) and the behavioural sigma-delta
//    front end;
//  - checks the measured mean and ripple, the two regulators against a PID
//    model, every composed duty value against the method-3 expression in real
//    arithmetic, every PWM period against the duty value it latched, and the
//    address restart and repeat/skip spreading of the sequencer.
// Every mechanism (sync, glitch rejection, measurement, both regulators,
// clamp of the average regulator, repeats, skips, dither) is counted and must
// occur at least once.
module tb_pfc_top;
  import pfc_pkg::*;

  localparam real PI    = 3.14159265358979;
  localparam real VG    = 230.0, VOUT = 400.0, POUT = 300.0;
  localparam real LIND  = 5.0e-3, CAP = 68.0e-6, TSW = 10.0e-6, FLINE = 50.0;
  localparam real TCLK  = 10.0e-9;
  localparam real HV    = 5.0 / 500.0;            // output-voltage divider
  localparam real CNT_PER_V = HV / 5.0 * 1000.0;  // ADC counts per volt of vout
  localparam int  DEPTH = 1000;
  // default regulator gains of pfc_top, in units of 2^-14 per error LSB
  localparam real KPA = 0.0,   KIA = 8.0, KDA = 0.0;
  localparam real KPR = -60.0, KIR = 0.0, KDR = 0.0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic zc_comp = 1'b0, adc_comp, adc_fb, pwm;
  logic tbl_we = 1'b0;
  logic [1:0] tbl_sel = '0;
  logic [9:0] tbl_addr = '0;
  duty_t tbl_wdata = '0;
  adc_t vavg_ref, vrip_ref;
  logic sync, meas_valid, restart, rep, skip, dith, asat, rsat;
  adc_t vavg, vrip;
  gain_t k, kinv, r;
  duty_t duty;
  logic [9:0] addr;
  logic [11:0] n_half;

  pfc_top dut (
    .clk(clk), .rst_n(rst_n), .zc_comp_in(zc_comp), .adc_comp_in(adc_comp),
    .adc_fb_out(adc_fb), .pwm_out(pwm), .tbl_we(tbl_we), .tbl_sel(tbl_sel),
    .tbl_addr(tbl_addr), .tbl_wdata(tbl_wdata), .vavg_ref(vavg_ref), .vrip_ref(vrip_ref),
    .sync_out(sync), .vavg_out(vavg), .vrip_out(vrip), .meas_valid(meas_valid),
    .k_out(k), .kinv_out(kinv), .r_out(r), .duty_out(duty), .addr_out(addr),
    .n_half(n_half), .restart_evt(restart), .rep_evt(rep), .skip_evt(skip),
    .dith_evt(dith), .avg_sat(asat), .rip_sat(rsat));

  real vin_adc = 0.0;
  sd_analog_model u_ana (.clk(clk), .vin(vin_adc), .fb(adc_fb), .comp(adc_comp));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL: %s", msg); end
  endtask

  // ---------------------------------------------------------------- tables
  duty_t t_omda [DEPTH], t_omd1 [DEPTH], t_dc [DEPTH];

  function automatic int q5(real v);   // duty in [0,1] -> duty_t counts
    real c = v * 1000.0 * 32.0;
    return (c >= 0.0) ? int'($floor(c + 0.5)) : -int'($floor(-c + 0.5));
  endfunction

  task automatic make_tables();
    real wr = 2.0 * PI * FLINE;
    real ripa = POUT / (CAP * 2.0 * wr * VOUT);
    for (int i = 0; i < DEPTH; i++) begin
      real t = i * TSW;
      real vg = VG * $sqrt(2.0) * $sin(wr * t);
      real vo = VOUT - ripa * $sin(2.0 * wr * t);
      real il0 = POUT / VG * $sqrt(2.0) * $sin(wr * t);
      real il1 = POUT / VG * $sqrt(2.0) * $sin(wr * (t + TSW));
      real d1 = (vo - vg) / vo;
      real da = (VOUT - vg) / VOUT;
      real dc = LIND / TSW * (il1 - il0) / vo;
      t_omda[i] = duty_t'(q5(1.0 - da));
      t_omd1[i] = duty_t'(q5(1.0 - d1));
      t_dc[i]   = duty_t'(q5(dc));
    end
  endtask

  // ----------------------------------------------------- half-period plan
  typedef struct { real f; real mean; real amp; } half_t;
  localparam int NH = 10;
  half_t plan [NH];
  int    h = -1;              // index of the running half-period
  real   theta = 0.05, vg_now = 0.0;
  bit    in_win = 0, pos = 1;
  longint nclk = 0, zc_clk = 0;
  always @(posedge clk) nclk++;
  int    glitch_left = 0, glitch_t = 0, nglitch = 0, nwin = 0;

  initial begin
    real a0 = POUT / (CAP * 2.0 * 2.0 * PI * FLINE * VOUT);   // nominal ripple amplitude
    plan[0] = '{50.0, 400.0, a0};
    plan[1] = '{50.0, 390.0, a0};      // low output: k must fall below 1
    plan[2] = '{50.0, 400.0, 30.0};    // heavy load: r must rise above 1
    plan[3] = '{45.0, 400.0, a0};      // long half-period -> repeats next
    plan[4] = '{55.0, 400.0, a0};      // short half-period -> skips next
    plan[5] = '{50.0, 50.0, a0};       // large error for three half-periods:
    plan[6] = '{50.0, 50.0, a0};       // the integrator reaches its clamp
    plan[7] = '{50.0, 50.0, a0};
    plan[8] = '{50.0, 400.0, a0};
    plan[9] = '{50.0, 400.0, a0};
  end

  // analog world, advanced once per clock
  always @(posedge clk) begin
    real f, mean, amp, vo;
    bit w;
    f    = (h < 0) ? FLINE : plan[h].f;
    mean = (h < 0) ? VOUT : plan[h].mean;
    amp  = (h < 0) ? plan[0].amp : plan[h].amp;
    theta  = theta + 2.0 * PI * f * TCLK;
    vg_now = VG * $sqrt(2.0) * $sin(theta);
    w = (vg_now < 10.0 && vg_now > -10.0);
    if ((vg_now >= 0.0) != pos) begin
      // a new half-period starts at the zero crossing
      pos = (vg_now >= 0.0);
      if (h < NH - 1) h = h + 1;
      zc_clk = nclk;
    end
    if (vg_now < 0.0) vg_now = -vg_now;
    if (w && !in_win) nwin++;
    if (!w && in_win) begin glitch_left = 3; glitch_t = 0; end
    in_win = w;
    vo = mean - amp * $sin(2.0 * theta);
    vin_adc = vo * HV;
    // comparator with three 40-clock glitches after the window
    if (w) zc_comp <= 1'b1;
    else if (glitch_left > 0) begin
      glitch_t++;
      zc_comp <= (glitch_t % 1000) < 40;
      if (glitch_t % 1000 == 999) begin glitch_left--; nglitch++; end
    end else zc_comp <= 1'b0;
  end

  // ------------------------------------------------------------- monitors
  int nsync = 0, nmeas = 0, nrep = 0, nskip = 0, ndith = 0, nasat = 0, nrsat = 0;
  int nrestart = 0, nduty = 0, npwm = 0;
  real integ_a = 0.0, eprev_a = 0.0, integ_r = 0.0, eprev_r = 0.0;
  int  meas_h [$];            // half-period index measured at each sync
  bit  loaded = 0;            // tables loaded and one period flushed

  function automatic real lim(real v);
    real l = 16383.0 / 16384.0;
    return (v > l) ? l : (v < -l) ? -l : v;
  endfunction

  always @(posedge clk) if (rst_n) begin
    // the sync comes near the zero crossing that ends half h: just before it,
    // or just after it (then h has already moved on) when the line frequency
    // has changed since the last window
    if (sync) begin
      nsync++;
      meas_h.push_back((nclk - zc_clk < 30000) ? h - 1 : h);
    end
    if (rep) nrep++;
    if (skip) nskip++;
    if (dith) ndith++;
    if (asat) nasat++;
    if (rsat) nrsat++;
  end

  // measurement and regulators
  always @(posedge clk) if (rst_n && meas_valid) begin
    int hm;
    real em, ea, er, da_m, dr_m, ra, rr, tol;
    nmeas++;
    // the first sync only primes the monitor, so result n is half-period n-1+1
    hm = (meas_h.size() >= 2) ? meas_h[meas_h.size() - 1] : 0;
    em = plan[hm].mean * CNT_PER_V;
    // tolerance 3 counts, 6 after a large step of the mean (the first ADC
    // sample of the half-period still holds part of the previous level)
    tol = (hm > 0 && (plan[hm].mean - plan[hm-1].mean > plan[hm].amp ||
                      plan[hm-1].mean - plan[hm].mean > plan[hm].amp)) ? 6.0 : 3.0;
    check(real'(vavg) > em - tol && real'(vavg) < em + tol,
          $sformatf("half %0d: mean %0d expected %f", hm, vavg, em));
    er = 2.0 * plan[hm].amp * CNT_PER_V;
    // a step of the mean larger than the ripple, made by this testbench at the
    // half-period boundary, leaks into the first ADC sample: skip those
    if (hm == 0 || (plan[hm].mean - plan[hm-1].mean < plan[hm].amp &&
                    plan[hm-1].mean - plan[hm].mean < plan[hm].amp))
      check(real'(vrip) > er - 4.0 && real'(vrip) < er + 4.0,
            $sformatf("half %0d: ripple %0d expected %f", hm, vrip, er));
    // PID models: average loop error = mean - ref; ripple loop error = ref - ripple
    ea = real'(int'(vavg) - int'(vavg_ref));
    integ_a = lim(integ_a + KIA / 16384.0 * ea);
    ra = integ_a + KPA / 16384.0 * ea + KDA / 16384.0 * (ea - eprev_a);
    da_m = lim(ra);
    eprev_a = ea;
    er = real'(int'(vrip_ref) - int'(vrip));
    integ_r = lim(integ_r + KIR / 16384.0 * er);
    rr = integ_r + KPR / 16384.0 * er + KDR / 16384.0 * (er - eprev_r);
    dr_m = lim(rr);
    eprev_r = er;
    @(negedge clk);
    check(k == gain_t'($rtoi((1.0 + da_m) * 16384.0 + 0.5)) && kinv == gain_t'(32768 - int'(k)),
          $sformatf("half %0d: k %0d expected %f", hm, k, (1.0 + da_m) * 16384.0));
    check(r == gain_t'($rtoi((1.0 + dr_m) * 16384.0 + 0.5)),
          $sformatf("half %0d: r %0d expected %f", hm, r, (1.0 + dr_m) * 16384.0));
    if (plan[hm].mean < VOUT) check(k < GAIN_ONE, $sformatf("half %0d: low mean but k >= 1", hm));
    if (hm == 2) check(r > GAIN_ONE, "heavy load but r <= 1");
  end

  // duty composition: 6 clocks after every address change, with stable gains
  logic [9:0] addr_q [7];
  gain_t k_q [7], r_q [7];
  always @(posedge clk) if (rst_n) begin
    for (int i = 6; i > 0; i--) begin addr_q[i] = addr_q[i-1]; k_q[i] = k_q[i-1]; r_q[i] = r_q[i-1]; end
    addr_q[0] = addr; k_q[0] = k; r_q[0] = r;
    if (loaded && addr_q[5] != addr_q[6] && addr_q[0] == addr_q[5] && k_q[0] == k_q[6] && r_q[0] == r_q[6]) begin
      real kk, ki, rr2, das, d1s, e, got;
      kk = real'(k) / 16384.0; ki = real'(kinv) / 16384.0; rr2 = real'(r) / 16384.0;
      das = 1000.0 - kk * real'(t_omda[addr]) / 32.0;
      d1s = 1000.0 - kk * real'(t_omd1[addr]) / 32.0;
      e = das + rr2 * ((d1s - das) + ki * real'(t_dc[addr]) / 32.0);
      if (e < 0.0) e = 0.0;
      if (e > 999.0 + 31.0 / 32.0) e = 999.0 + 31.0 / 32.0;
      got = real'(duty) / 32.0;
      nduty++;
      check(got > e - 0.25 && got < e + 0.25,
            $sformatf("addr %0d: duty %f expected %f", addr, got, e));
    end
    if (restart) begin
      nrestart++;
    end
  end

  // PWM: each period's high time is the latched duty's integer part, or one
  // more when the dither carries. Sampled values belong to the clock just
  // ended; the period ends with the clock in which the counter is 999, and
  // duty_out at that edge is the value latched for the next period.
  int hi = 0, lo_exp = 0;
  bit pwm_started = 0, gate_on = 0;
  always @(posedge clk) if (rst_n) begin
    hi += int'(pwm);
    if (dut.u_pwm.cnt == 10'(999)) begin
      if (pwm_started && loaded && gate_on) begin
        npwm++;
        check(hi == lo_exp || (hi == lo_exp + 1 && lo_exp < 999),
              $sformatf("pwm period: high %0d expected %0d or +1", hi, lo_exp));
      end
      pwm_started = 1;
      gate_on = (nrestart > 0);   // the gate is held off until the first restart
      lo_exp = int'(duty) >>> 5;
      if (lo_exp < 0) lo_exp = 0;
      if (lo_exp > 999) lo_exp = 999;
      hi = 0;
    end
  end

  // --------------------------------------------------------------- watchdog
  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ main
  initial begin
    vavg_ref = adc_t'($rtoi(VOUT * CNT_PER_V + 0.5));
    vrip_ref = adc_t'($rtoi(2.0 * plan[0].amp * CNT_PER_V));
    make_tables();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 3; s++)
      for (int i = 0; i < DEPTH; i++) begin
        @(negedge clk);
        tbl_we = 1'b1; tbl_sel = 2'(s); tbl_addr = 10'(i);
        tbl_wdata = (s == 0) ? t_omda[i] : (s == 1) ? t_omd1[i] : t_dc[i];
      end
    @(negedge clk) tbl_we = 1'b0;
    repeat (2000) @(posedge clk);
    loaded = 1;
    // run until the measurement of the last planned half-period is in
    wait (nmeas == NH - 1);
    repeat (20000) @(posedge clk);
    // the first window after reset is only measured
    check(nsync == nwin - 1, $sformatf("%0d syncs for %0d zero-crossing windows", nsync, nwin));
    check(nglitch > 0, "no comparator glitch was injected");
    check(nrestart >= NH - 1, $sformatf("only %0d address restarts", nrestart));
    check(nrep > 0, "no duty value was repeated after a long half-period");
    check(nskip > 0, "no duty value was skipped after a short half-period");
    check(ndith > 0, "dither never added a count");
    check(nasat > 0, "the average regulator never clamped");
    check(nduty > 1000, $sformatf("only %0d duty values checked", nduty));
    check(npwm > 1000, $sformatf("only %0d PWM periods checked", npwm));
    $display("events: sync=%0d glitches=%0d meas=%0d restarts=%0d repeats=%0d skips=%0d dither=%0d avg_clamp=%0d rip_clamp=%0d duty_checks=%0d pwm_checks=%0d",
             nsync, nglitch, nmeas, nrestart, nrep, nskip, ndith, nasat, nrsat, nduty, npwm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
