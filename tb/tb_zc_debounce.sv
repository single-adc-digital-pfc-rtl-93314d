// tb_zc_debounce: checks the zero-crossing synchronisation with a short
// filter (DEBOUNCE_CYCLES = 20) and lead (SYNC_LEAD = 30 clocks):
//  - comparator glitches shorter than the filter neither change the level nor
//    give a pulse, also a low glitch inside a window;
//  - the first window after reset only follows the level and gives no pulse;
//  - a later window gives exactly one pulse, half the previous window width
//    minus SYNC_LEAD after the comparator edge (+-2 clocks), i.e. just before
//    the window centre;
//  - when half the previous width is not longer than the filter delay plus
//    the lead, the pulse comes at once, DEBOUNCE + 3 clocks after the edge;
//  - the falling edge of a window gives no pulse.
module tb_zc_debounce;
  localparam int DB = 20, LEAD = 30;
  logic clk = 1'b0, rst_n = 1'b0, comp = 1'b0;
  logic level, sync;
  int checks = 0, failures = 0, nsync = 0;
  longint cyc = 0, t_set = 0, t_sync = 0;

  zc_debounce #(.DEBOUNCE_CYCLES(DB), .SYNC_LEAD(LEAD)) dut (
    .clk(clk), .rst_n(rst_n), .comp_in(comp), .zc_level(level), .sync_pulse(sync));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (sync && rst_n) begin nsync <= nsync + 1; t_sync <= cyc; end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // one window: comp high for w clocks (with an optional short low glitch),
  // then low for gap clocks
  task automatic window(input int w, input int gap, input bit glitch);
    @(negedge clk) begin comp = 1'b1; t_set = cyc; end
    if (glitch) begin
      repeat (w / 3) @(negedge clk);
      comp = 1'b0;
      repeat (3) @(negedge clk);
      comp = 1'b1;
      repeat (w - w / 3 - 3) @(negedge clk);
    end else begin
      repeat (w) @(negedge clk);
    end
    comp = 1'b0;
    repeat (gap) @(negedge clk);
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n0;
    longint exp_t;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // glitches shorter than the filter
    for (int g = 0; g < 10; g++) begin
      @(negedge clk) comp = 1'b1;
      repeat (1 + g % (DB - 2)) @(negedge clk);
      comp = 1'b0;
      repeat (5) @(negedge clk);
    end
    repeat (40) @(posedge clk);
    check(nsync == 0, "glitches produced a sync pulse");
    check(level == 1'b0, "glitches changed the filtered level");

    // first window: measured only
    @(negedge clk) begin comp = 1'b1; t_set = cyc; end
    repeat (DB + 10) @(negedge clk);
    check(level == 1'b1, "level did not follow a stable high");
    repeat (400 - DB - 10) @(negedge clk);
    comp = 1'b0;
    repeat (DB + 10) @(negedge clk);
    check(level == 1'b0, "level did not follow a stable low");
    check(nsync == 0, "the first window after reset gave a pulse");
    repeat (500) @(negedge clk);

    // second window (previous width 400): pulse 200 - LEAD after the edge
    window(300, 600, 1'b1);
    check(nsync == 1, $sformatf("window 2: %0d pulses in total, expected 1", nsync));
    exp_t = t_set + 400 / 2 - LEAD;
    check(t_sync >= exp_t - 2 && t_sync <= exp_t + 2,
          $sformatf("window 2: pulse %0d clocks after the edge, expected %0d",
                    t_sync - t_set, exp_t - t_set));

    // third window (previous width 300): pulse 150 - LEAD after the edge
    window(60, 600, 1'b0);
    check(nsync == 2, $sformatf("window 3: %0d pulses in total, expected 2", nsync));
    exp_t = t_set + 300 / 2 - LEAD;
    check(t_sync >= exp_t - 2 && t_sync <= exp_t + 2,
          $sformatf("window 3: pulse %0d clocks after the edge, expected %0d",
                    t_sync - t_set, exp_t - t_set));

    // fourth window (previous width 60, half 30 < DB + 2 + LEAD): at once
    n0 = nsync;
    window(200, 600, 1'b0);
    check(nsync == n0 + 1, "window 4: no single pulse");
    check(t_sync - t_set == DB + 3,
          $sformatf("window 4: pulse %0d clocks after the edge, expected %0d",
                    t_sync - t_set, DB + 3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
