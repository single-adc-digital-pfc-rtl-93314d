// tb_vout_monitor: feeds known sample sequences between sync pulses and
// checks mean (floor of sum/count), ripple (max - min), that the first
// half-period after reset gives no result, and the 24-clock latency from sync
// to meas_valid.
module tb_vout_monitor;
  import pfc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  adc_t sample = '0;
  logic valid = 1'b0, sync = 1'b0;
  adc_t avg, ripple;
  logic mv;
  int checks = 0, failures = 0, nmv = 0;
  longint cyc = 0, t_sync = 0, t_mv = 0;

  vout_monitor dut (.clk(clk), .rst_n(rst_n), .sample(sample), .sample_valid(valid),
                    .sync(sync), .avg(avg), .ripple(ripple), .meas_valid(mv));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (mv && rst_n) begin nmv <= nmv + 1; t_mv <= cyc; end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse_sync();
    @(negedge clk) sync = 1'b1;
    t_sync = cyc;
    @(negedge clk) sync = 1'b0;
  endtask

  initial begin
    longint sum; int n, mx, mn, v;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // partial interval before the first sync
    repeat (5) begin @(negedge clk) begin valid = 1'b1; sample = adc_t'($urandom_range(0, 1023)); end
                     @(negedge clk) valid = 1'b0; end
    pulse_sync();
    repeat (40) @(posedge clk);
    check(nmv == 0, $sformatf("first sync after reset gave %0d results", nmv));
    for (int h = 0; h < 8; h++) begin
      int base, amp;
      sum = 0; n = 0; mx = -1; mn = 1 << 20;
      base = $urandom_range(300, 800);
      amp  = $urandom_range(0, 150);
      n = 50 + $urandom_range(0, 1500);
      for (int i = 0; i < n; i++) begin
        v = base + $urandom_range(0, amp);
        @(negedge clk) begin valid = 1'b1; sample = adc_t'(v); end
        @(negedge clk) valid = 1'b0;
        repeat ($urandom_range(0, 3)) @(negedge clk);
        sum += v;
        if (v > mx) mx = v;
        if (v < mn) mn = v;
      end
      pulse_sync();
      repeat (40) @(posedge clk);
      check(nmv == h + 1, $sformatf("half %0d: %0d results", h, nmv));
      check(int'(avg) == int'(sum / n), $sformatf("half %0d avg %0d expected %0d", h, avg, sum / n));
      check(int'(ripple) == mx - mn, $sformatf("half %0d ripple %0d expected %0d", h, ripple, mx - mn));
      check(t_mv - t_sync == 25, $sformatf("latency %0d", t_mv - t_sync));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
