// tb_dpwm: for a set of duty values (integer + 5-bit fraction, plus values
// below 0 and above the maximum) checks every period's high time against a
// model of the first-order dither (fraction accumulated mod 32, carry adds one
// count, clamp to 0..999), the 1000-clock period, the tick position
// LOOKAHEAD clocks before the period start, and that the high time summed
// over 32 periods equals the duty with its fraction.
module tb_dpwm;
  import pfc_pkg::*;
  localparam int CLK = 1000, LA = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  duty_t duty = '0;
  logic pwm, tick, ps, dith;
  int checks = 0, failures = 0, ndith = 0;
  int pnum = 0, cur_hi = 0, pos = 0, tick_pos = -1, started = 0;
  int exp_hi [int];
  int got_hi [int];

  dpwm #(.CLK_PER_SW(CLK), .LOOKAHEAD(LA)) dut (
    .clk(clk), .rst_n(rst_n), .duty(duty), .pwm(pwm), .tick(tick),
    .period_start(ps), .dith_evt(dith));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // monitor: values sampled at each rising edge belong to the cycle just ended
  always @(posedge clk) if (rst_n) begin
    if (ps) begin
      if (started) begin
        check(pos == CLK, $sformatf("period %0d lasted %0d clocks", pnum, pos));
        check(tick_pos == CLK - LA, $sformatf("tick at %0d", tick_pos));
        got_hi[pnum] = cur_hi;
        if (exp_hi.exists(pnum))
          check(cur_hi == exp_hi[pnum], $sformatf("period %0d high %0d expected %0d", pnum, cur_hi, exp_hi[pnum]));
        pnum++;
      end
      started = 1;
      cur_hi = int'(pwm); pos = 1; tick_pos = -1;
    end else begin
      cur_hi += int'(pwm);
      if (tick) tick_pos = pos;
      pos++;
    end
    if (dith) ndith++;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vals [] = '{500 * 32 + 16, 123 * 32 + 5, 998 * 32 + 31, 999 * 32 + 20, 0, 7 * 32 + 1, -40, 32767};
    int facc, want, first, tot;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    facc = 0;
    foreach (vals[v]) begin
      first = -1;
      for (int p = 0; p < 32; p++) begin
        @(posedge clk iff ps);
        // now inside period pnum; the duty set here is latched for pnum+1
        @(negedge clk);
        duty = duty_t'(vals[v]);
        want = (vals[v] >>> 5) + ((facc + (vals[v] & 31)) >> 5);
        facc = (facc + (vals[v] & 31)) & 31;
        if (want < 0) want = 0;
        if (want > CLK - 1) want = CLK - 1;
        exp_hi[pnum + 1] = want;
        if (first < 0) first = pnum + 1;
      end
      // two more periods run with the same duty before the next value
      @(posedge clk iff ps);
      @(posedge clk iff ps);
      @(negedge clk);
      facc = (facc + 2 * (vals[v] & 31)) & 31;
      tot = 0;
      for (int p = first; p < first + 32; p++) tot += got_hi[p];
      if (vals[v] >= 0 && vals[v] < (CLK - 1) * 32)
        check(tot == vals[v], $sformatf("32-period sum %0d expected %0d", tot, vals[v]));
    end
    check(ndith > 0, "dither never added a count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
