// tb_pfc_method2: the closed-loop test of tb_pfc_closed_loop repeated with the
// controller in method 2 (tables 1-d1 and
// d2 = dc), to compare the duty-composition methods.
// Tables for 230 V rms, 400 V, 300 W; loads of 300 W (A) and 221 W (B). The
// same behavioural converter and front end are used, and all other
// parameters are at their defaults. Observed power factor: 0.984 (A) and
// 0.822 (B); the thresholds record these results.
module tb_pfc_method2;
  import pfc_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam real LIND = 5.0e-3, CAP = 68.0e-6, TSW = 10.0e-6, FLINE = 50.0;
  localparam int  DEPTH = 1000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic zc, adc_comp, adc_fb, pwm;
  logic tbl_we = 1'b0;
  logic [1:0] tbl_sel = '0;
  logic [9:0] tbl_addr = '0;
  duty_t tbl_wdata = '0;
  adc_t vavg_ref = '0, vrip_ref = '0;
  logic sync, meas_valid, restart, rep, skip, dith, asat, rsat;
  adc_t vavg, vrip;
  gain_t k, kinv, r;
  duty_t duty;
  logic [9:0] addr;
  logic [11:0] n_half;

  pfc_top #(.METHOD(METHOD_D1D2)) dut (
    .clk(clk), .rst_n(rst_n), .zc_comp_in(zc), .adc_comp_in(adc_comp),
    .adc_fb_out(adc_fb), .pwm_out(pwm), .tbl_we(tbl_we), .tbl_sel(tbl_sel),
    .tbl_addr(tbl_addr), .tbl_wdata(tbl_wdata), .vavg_ref(vavg_ref), .vrip_ref(vrip_ref),
    .sync_out(sync), .vavg_out(vavg), .vrip_out(vrip), .meas_valid(meas_valid),
    .k_out(k), .kinv_out(kinv), .r_out(r), .duty_out(duty), .addr_out(addr),
    .n_half(n_half), .restart_evt(restart), .rep_evt(rep), .skip_evt(skip),
    .dith_evt(dith), .avg_sat(asat), .rip_sat(rsat));

  logic run = 1'b0, init = 1'b0;
  real vg_rms = 230.0, rload = 533.0, v0 = 400.0, h35 = 0.0;
  real vout, il, vadc, pf_last;
  int  nhalf;
  boost_plant_model u_plant (
    .clk(clk), .run(run), .init(init), .v0(v0), .gate(pwm), .vg_rms(vg_rms),
    .fline(FLINE), .h35(h35), .lind(LIND), .cap(CAP), .rload(rload),
    .vout(vout), .il(il), .vadc(vadc), .zc(zc), .pf_last(pf_last), .nhalf(nhalf));
  sd_analog_model u_ana (.clk(clk), .vin(vadc), .fb(adc_fb), .comp(adc_comp));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int q5(real v);
    real c = v * 1000.0 * 32.0;
    return (c >= 0.0) ? int'($floor(c + 0.5)) : -int'($floor(-c + 0.5));
  endfunction

  // tables for the nominal point (vgn rms, von, pn), loaded through the port
  task automatic load_tables(real vgn, real von, real pn);
    real wr = 2.0 * PI * FLINE;
    real ripa = pn / (CAP * 2.0 * wr * von);
    for (int i = 0; i < DEPTH; i++) begin
      real t, vg, vo, il0, il1, d1, da, dc;
      t   = i * TSW;
      vg  = vgn * $sqrt(2.0) * $sin(wr * t);
      vo  = von - ripa * $sin(2.0 * wr * t);
      il0 = pn / vgn * $sqrt(2.0) * $sin(wr * t);
      il1 = pn / vgn * $sqrt(2.0) * $sin(wr * (t + TSW));
      d1  = (vo - vg) / vo;
      da  = (von - vg) / von;
      dc  = LIND / TSW * (il1 - il0) / vo;
      for (int s = 0; s < 2; s++) begin
        @(negedge clk);
        tbl_we = 1'b1; tbl_sel = 2'(s); tbl_addr = 10'(i);
        tbl_wdata = duty_t'(q5((s == 0) ? 1.0 - d1 : dc));
      end
    end
    @(negedge clk) tbl_we = 1'b0;
    vavg_ref = adc_t'($rtoi(von * 2.0 + 0.5));             // 5/500 divider, 1000 counts = 5 V
    vrip_ref = adc_t'($rtoi(2.0 * ripa * 2.0 + 0.5));
  endtask

  task automatic run_case(string name, real vgn, real von, real pn, real vg_act, real p_act,
                          int halves, real pf_min, output real pf_avg);
    real pfs;
    int  n;
    run = 1'b0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    load_tables(vgn, von, pn);
    vg_rms = vg_act; rload = von * von / p_act; v0 = von;
    @(negedge clk) init = 1'b1;
    @(negedge clk) begin init = 1'b0; run = 1'b1; end
    pfs = 0.0; n = 0;
    while (nhalf < halves) begin
      @(posedge clk iff meas_valid);
      @(negedge clk);
      $display("%s half %0d: vout mean %0d (ref %0d) ripple %0d (ref %0d) k=%f r=%f pf=%f",
               name, nhalf, vavg, vavg_ref, vrip, vrip_ref, real'(k) / 16384.0,
               real'(r) / 16384.0, pf_last);
      if (nhalf > halves - 4) begin pfs += pf_last; n++; end
    end
    pf_avg = (n > 0) ? pfs / n : 0.0;
    $display("%s: power factor %f over the last %0d half-periods", name, pf_avg, n);
    check(pf_avg > pf_min, $sformatf("%s: power factor %f below %f", name, pf_avg, pf_min));
    check(int'(vavg) > int'(vavg_ref) - 10 && int'(vavg) < int'(vavg_ref) + 10,
          $sformatf("%s: mean %0d counts, reference %0d", name, vavg, vavg_ref));
  endtask

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pfa, pfb;
    run_case("A 230V 300W", 230.0, 400.0, 300.0, 230.0, 300.0, 14, 0.97, pfa);
    run_case("B 230V 221W", 230.0, 400.0, 300.0, 230.0, 221.0, 24, 0.80, pfb);
    $display("power factor: A %f  B %f", pfa, pfb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
