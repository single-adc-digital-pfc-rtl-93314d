// tb_duty_m2: drives random stored values and regulator gains into the
// method-2 duty composition (d* = 1 - k(1-d1) + r*kinv*d2) and compares the
// registered output, one clock later, with the same expression evaluated in
// real arithmetic, clamped to 0 .. 999 31/32 counts; the tolerance covers the
// truncation of the fixed-point products (8/32 count). Extreme gains are
// included so that both clamps are reached.
module tb_duty_m2;
  import pfc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  duty_t om_d1 = '0;
  duty_t d2 = '0;
  gain_t k = GAIN_ONE;
  gain_t kinv = GAIN_ONE;
  gain_t r = GAIN_ONE;
  duty_t d_out;
  int checks = 0, failures = 0, nlo = 0, nhi = 0;

  duty_m2 dut (.clk(clk), .rst_n(rst_n), .om_d1(om_d1), .d2(d2), .k(k), .kinv(kinv), .r(r), .d_out(d_out));
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

  initial begin
    real e, got;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      om_d1 = duty_t'($urandom_range(0, 30000));
      d2 = duty_t'(int'($urandom_range(0, 1600)) - 800);
      k = gain_t'($urandom_range(11000, 22000));
      kinv = gain_t'(2 * 16384 - int'(k));
      r = gain_t'($urandom_range(4000, 32000));
      if (i % 50 == 0) k = gain_t'(2 * 16384);        // k = 2: d* clamps at 0
      if (i % 50 == 1) k = gain_t'(0);                // k = 0: d* = 1, clamps at max
      kinv = gain_t'(2 * 16384 - int'(k));
      e = 1000.0 - (real'(k) / 16384.0) * (real'(om_d1) / 32.0) + (real'(r) / 16384.0) * (real'(kinv) / 16384.0) * (real'(d2) / 32.0);
      if (e < 0.0) begin e = 0.0; nlo++; end
      if (e > 999.0 + 31.0 / 32.0) begin e = 999.0 + 31.0 / 32.0; nhi++; end
      @(negedge clk);
      got = real'(d_out) / 32.0;
      check(got > e - 0.25 && got < e + 0.25, $sformatf("case %0d: d* %f expected %f", i, got, e));
    end
    check(nlo > 0 && nhi > 0, "clamps not reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
