// zc_debounce: synchronisation with the ac mains.
//
// The zero-crossing comparator outputs '1' while the (divided) input voltage
// is below about 10 V, i.e. in a window of a few hundred microseconds centred
// on every zero crossing of the line. Its output is noisy near the threshold.
// This block brings it into the clock domain with a two-flop synchroniser and
// accepts a new level only after it has been stable for DEBOUNCE_CYCLES
// clocks (zc_level).
//
// The zero crossing itself is the centre of the window. The block measures
// the width of every filtered window and, when the next window opens, gives
// sync_pulse half that width later, i.e. at the predicted zero crossing,
// minus SYNC_LEAD clocks. The lead (default half a switching period) offsets
// the mean wait of the table sequencer for the next switching period, so that
// on average the table starts at the zero crossing itself. The debounce delay
// shifts both edges of the window equally, so it cancels. The
// first window after reset has no previous width; it is only measured and
// gives no pulse, so the first pulse comes one half-period later. Starting the duty tables at the true zero crossing matters:
// starting them at the window edge (about 10 switching cycles early at
// 230 V) leaves a volt-second error that distorts the current.
//
// A simple debounce filter on a threshold comparator follows the reference
// design; the stable-count filter, its length and the window-centre timing
// are this design's own choices.
//
// Timing: sync_pulse is one clock long, once per rectified half-period,
// max(DEBOUNCE_CYCLES + 3, (previous window width)/2 - SYNC_LEAD) clocks (+-1)
// after the comparator output rises.
module zc_debounce #(
  parameter int unsigned DEBOUNCE_CYCLES = 500,
  parameter int unsigned WIDTH_W         = 20,    // window width counter, clocks
  parameter int unsigned SYNC_LEAD       = 500    // clocks the pulse is moved earlier
) (
  input  logic clk,
  input  logic rst_n,
  input  logic comp_in,     // asynchronous comparator output
  output logic zc_level,    // filtered comparator level
  output logic sync_pulse   // one clock, at each zero crossing
);
  localparam int unsigned CW = $clog2(DEBOUNCE_CYCLES + 1);
  // clocks from the comparator edge to rise, plus the wanted lead
  localparam int unsigned LAG = DEBOUNCE_CYCLES + 2 + SYNC_LEAD;

  logic [1:0]         sync_ff;
  logic [CW-1:0]      cnt;
  logic               rise;         // filtered level goes 0 -> 1
  logic [WIDTH_W-1:0] width;        // clocks of the current window so far
  logic [WIDTH_W-1:0] half_w;       // half the width of the previous window
  logic [WIDTH_W-1:0] wait_cnt;
  logic               waiting;

  // debounce filter
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_ff  <= '0;
      cnt      <= '0;
      zc_level <= 1'b0;
      rise     <= 1'b0;
    end else begin
      sync_ff <= {sync_ff[0], comp_in};
      rise    <= 1'b0;
      if (sync_ff[1] == zc_level) begin
        cnt <= '0;
      end else if (cnt == CW'(DEBOUNCE_CYCLES - 1)) begin
        cnt      <= '0;
        zc_level <= sync_ff[1];
        rise     <= sync_ff[1];
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  // window width and centre
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      width      <= '0;
      half_w     <= '0;
      wait_cnt   <= '0;
      waiting    <= 1'b0;
      sync_pulse <= 1'b0;
    end else begin
      sync_pulse <= 1'b0;
      if (zc_level) begin
        if (width != '1) width <= width + 1'b1;
      end else if (width != '0) begin
        half_w <= width >> 1;      // window just closed
        width  <= '0;
      end
      if (rise) begin
        if (half_w == '0) begin
          // first window after reset: only measured, no pulse
        end else if (32'(half_w) <= LAG) begin
          sync_pulse <= 1'b1;
        end else begin
          waiting  <= 1'b1;
          wait_cnt <= half_w - WIDTH_W'(LAG);
        end
      end else if (waiting) begin
        if (wait_cnt == '0) begin
          waiting    <= 1'b0;
          sync_pulse <= 1'b1;
        end else begin
          wait_cnt <= wait_cnt - 1'b1;
        end
      end
    end
  end

endmodule
