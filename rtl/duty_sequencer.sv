// duty_sequencer: which stored duty value applies in each switching cycle.
//
// The tables hold DEPTH values for a nominal half-period of DEPTH switching
// cycles. A sync pulse (zero crossing) arms a restart; the next tick (one per
// switching cycle, given ahead of the period start by the DPWM) sets the
// address back to 0. The number of ticks between two restarts is the measured
// length N of the half-period, in switching cycles. During the following
// half-period the address advances by DEPTH/N per tick with a DDA:
//   acc += DEPTH; while (acc >= N) { acc -= N; addr++ }
// so addr_j = floor(j*DEPTH/N). If the mains half-period is longer than
// nominal (N > DEPTH) some values are used twice (step 0, rep_evt), if it is
// shorter some are skipped (step 2, skip_evt), and in both cases the repeats
// or skips are spread evenly over the half-period. The address never passes
// DEPTH-1 (a late zero crossing holds the last value). N is clamped to
// [DEPTH/2, 2*DEPTH]; before two syncs have been seen N = DEPTH.
//
// Repeating or skipping values evenly when the line period is off follows the
// reference design; the DDA is this design's way of doing it.
//
// Timing: addr and restart change one clock after tick.
module duty_sequencer #(
  parameter int unsigned DEPTH = 1000,
  parameter int unsigned AW    = $clog2(DEPTH),
  parameter int unsigned N_W   = $clog2(2 * DEPTH + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           sync,
  input  logic           tick,
  output logic [AW-1:0]  addr,
  output logic           restart,   // pulse: addr went back to 0
  output logic [N_W-1:0] n_half,    // length of the last half-period
  output logic           rep_evt,   // pulse: a value was repeated
  output logic           skip_evt   // pulse: a value was skipped
);
  localparam int unsigned N_MIN = DEPTH / 2;
  localparam int unsigned N_MAX = 2 * DEPTH;

  logic           pending, seen;
  logic [N_W-1:0] cyc;
  logic [N_W:0]   acc;
  logic [N_W+1:0] acc1;
  logic [N_W-1:0] n_new;

  always_comb begin
    acc1 = (N_W+2)'(acc) + (N_W+2)'(DEPTH);
    if (32'(cyc) < N_MIN)      n_new = N_W'(N_MIN);
    else if (32'(cyc) > N_MAX) n_new = N_W'(N_MAX);
    else                       n_new = cyc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending  <= 1'b0;
      seen     <= 1'b0;
      cyc      <= '0;
      acc      <= '0;
      addr     <= '0;
      n_half   <= N_W'(DEPTH);
      restart  <= 1'b0;
      rep_evt  <= 1'b0;
      skip_evt <= 1'b0;
    end else begin
      restart  <= 1'b0;
      rep_evt  <= 1'b0;
      skip_evt <= 1'b0;
      if (sync) pending <= 1'b1;
      if (tick) begin
        if (pending || sync) begin
          pending <= 1'b0;
          seen    <= 1'b1;
          if (seen) n_half <= n_new;
          cyc     <= N_W'(1);
          acc     <= '0;
          addr    <= '0;
          restart <= 1'b1;
        end else begin
          if (cyc != '1) cyc <= cyc + 1'b1;
          if (acc1 >= (N_W+2)'(2 * n_half)) begin
            acc      <= (N_W+1)'(acc1 - (N_W+2)'(2 * n_half));
            skip_evt <= 1'b1;
            if (32'(addr) + 2 <= DEPTH - 1) addr <= addr + AW'(2);
            else                            addr <= AW'(DEPTH - 1);
          end else if (acc1 >= (N_W+2)'(n_half)) begin
            acc <= (N_W+1)'(acc1 - (N_W+2)'(n_half));
            if (32'(addr) + 1 <= DEPTH - 1) addr <= addr + 1'b1;
          end else begin
            acc     <= (N_W+1)'(acc1);
            rep_evt <= 1'b1;
          end
        end
      end
    end
  end

  // the address always points inside the table, and a value is never
  // repeated and skipped in the same step
  a_addr_range: assert property (@(posedge clk) disable iff (!rst_n) 32'(addr) < DEPTH);
  a_one_event:  assert property (@(posedge clk) disable iff (!rst_n) !(rep_evt && skip_evt));

endmodule
