// tb_sd_adc: closes the sigma-delta loop through a behavioural RC/comparator
// model and checks that each 1000-clock window returns vin/VREF*WINDOW
// counts within +-3, and that a sample comes exactly every WINDOW clocks.
module tb_sd_adc;
  import pfc_pkg::*;
  localparam int WINDOW = 1000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic comp, fb, valid;
  adc_t sample;
  real vin = 0.0;
  int checks = 0, failures = 0;
  longint cyc = 0, last_valid = -1;

  sd_adc #(.WINDOW(WINDOW)) dut (
    .clk(clk), .rst_n(rst_n), .comp_in(comp), .fb_out(fb),
    .sample(sample), .sample_valid(valid));
  sd_analog_model u_ana (.clk(clk), .vin(vin), .fb(fb), .comp(comp));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int nval = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (valid && rst_n) begin
      if (last_valid >= 0) check(cyc - last_valid == WINDOW, $sformatf("sample spacing %0d", cyc - last_valid));
      last_valid <= cyc;
      nval <= nval + 1;
    end
  end

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real vs [6] = '{4.0, 0.5, 2.5, 3.9, 1.234, 4.6};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (vs[i]) begin
      vin = vs[i];
      // settle for two windows, then check three
      repeat (2) @(posedge valid);
      repeat (3) begin
        real expv, got;
        @(posedge clk iff valid);
        expv = vin / 5.0 * WINDOW;
        got  = real'(sample);
        check(got > expv - 3.0 && got < expv + 3.0,
              $sformatf("vin=%f sample=%0d expected %f", vin, sample, expv));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
