// tb_duty_sequencer: drives ticks and zero-crossing syncs for half-periods of
// nominal, long and short length and checks, for every tick, that the address
// is floor(j*DEPTH/N) (N = length of the previous half-period, clamped), that
// n_half reports the measured length, and that repeats (long half-period) and
// skips (short half-period) both occur, as many as the address span needs.
module tb_duty_sequencer;
  localparam int DEPTH = 1000;
  logic clk = 1'b0, rst_n = 1'b0, sync = 1'b0, tick = 1'b0;
  logic [9:0] addr;
  logic [11:0] n_half;
  logic restart, rep, skip;
  int checks = 0, failures = 0;

  duty_sequencer #(.DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .sync(sync), .tick(tick), .addr(addr),
    .restart(restart), .n_half(n_half), .rep_evt(rep), .skip_evt(skip));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #500_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lens [] = '{1000, 1000, 1111, 1000, 909, 1000, 700, 2500, 1000};
    int nprev;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (lens[h]) begin
      int nreps, nskips, alast;
      nreps = 0; nskips = 0;
      if (h == 0) nprev = DEPTH;
      else nprev = (lens[h-1] < DEPTH / 2) ? DEPTH / 2 : (lens[h-1] > 2 * DEPTH) ? 2 * DEPTH : lens[h-1];
      for (int j = 0; j < lens[h]; j++) begin
        int expa;
        @(negedge clk) begin tick = 1'b1; sync = (j == 0); end
        @(negedge clk) begin tick = 1'b0; sync = 1'b0; end
        if (rep && j < nprev) nreps++;
        if (skip && j < nprev) nskips++;
        expa = int'((longint'(j) * DEPTH) / nprev);
        if (expa > DEPTH - 1) expa = DEPTH - 1;
        check(int'(addr) == expa, $sformatf("half %0d tick %0d: addr %0d expected %0d", h, j, addr, expa));
        if (j == 0) begin
          check(restart == 1'b1, "no restart pulse");
          check(int'(n_half) == nprev, $sformatf("n_half %0d expected %0d", n_half, nprev));
        end
        repeat (2) @(negedge clk);
      end
      // over a half-period of nprev ticks: nprev-DEPTH repeats or DEPTH-nprev skips
      // address reached after nprev-1 steps decides how many were 0 or 2
      alast = int'((longint'(nprev - 1) * DEPTH) / nprev);
      if (nprev > DEPTH && lens[h] >= nprev) check(nreps == nprev - 1 - alast, $sformatf("half %0d repeats %0d", h, nreps));
      if (nprev < DEPTH && lens[h] >= nprev) check(nskips == alast - (nprev - 1), $sformatf("half %0d skips %0d", h, nskips));
      if (nprev == DEPTH) check(nreps == 0 && nskips == 0, "repeats/skips in a nominal half-period");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
