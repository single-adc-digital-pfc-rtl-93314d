// tb_pid_reg: applies a sequence of errors and compares delta, k = 1 + delta
// and kinv = 1 - delta (14 fractional bits) with a model of the PID update
// written in real arithmetic, including the +-DELTA_LIM clamp of the
// integrator and of delta, the sat flag and the one-clock update latency.
module tb_pid_reg;
  import pfc_pkg::*;
  localparam int KP = 32, KI = 8, KD = 16, LIM = 16383;
  logic clk = 1'b0, rst_n = 1'b0;
  err_t err = '0;
  logic ev = 1'b0;
  gain_t k, kinv, delta;
  logic sat, upd;
  int checks = 0, failures = 0, nsat = 0;

  pid_reg #(.KP(KP), .KI(KI), .KD(KD), .DELTA_LIM(LIM)) dut (
    .clk(clk), .rst_n(rst_n), .err(err), .err_valid(ev),
    .k(k), .kinv(kinv), .delta(delta), .sat(sat), .upd(upd));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real lim(real v);
    real l = real'(LIM) / 16384.0;
    return (v > l) ? l : (v < -l) ? -l : v;
  endfunction

  initial begin
    real integ = 0.0, eprev = 0.0, d, raw, e;
    bit  isat;
    int es [$];
    for (int i = 0; i < 20; i++) es.push_back($urandom_range(0, 40) - 20);
    for (int i = 0; i < 6; i++) es.push_back(-300);   // drive into the clamp
    for (int i = 0; i < 6; i++) es.push_back(300);
    for (int i = 0; i < 20; i++) es.push_back($urandom_range(0, 200) - 100);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    check(k == GAIN_ONE && kinv == GAIN_ONE, "k and 1/k are not 1 after reset");
    foreach (es[i]) begin
      e = real'(es[i]);
      isat  = (lim(integ + KI / 16384.0 * e) != integ + KI / 16384.0 * e);
      integ = lim(integ + KI / 16384.0 * e);
      raw   = integ + KP / 16384.0 * e + KD / 16384.0 * (e - eprev);
      d     = lim(raw);
      eprev = e;
      @(negedge clk) begin err = err_t'(es[i]); ev = 1'b1; end
      @(negedge clk) ev = 1'b0;
      check(upd == 1'b1, "upd did not follow err_valid by one clock");
      check(delta == gain_t'($rtoi(d * 16384.0 + (d < 0 ? -0.5 : 0.5))),
            $sformatf("step %0d: delta %0d expected %f", i, delta, d * 16384.0));
      check(k == GAIN_ONE + delta && kinv == GAIN_ONE - delta, "k / kinv not 1 +- delta");
      check(sat == (raw != d || isat), $sformatf("step %0d: sat flag %0b", i, sat));
      if (sat) nsat++;
      repeat (3) @(negedge clk);
      check(upd == 1'b0, "upd longer than one clock");
    end
    check(nsat > 0, "clamp never reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
