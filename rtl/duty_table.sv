// duty_table: memory of one pre-calculated duty-cycle parameter.
//
// DEPTH words of DUTY_W bits, one per switching cycle of a rectified
// half-period (1000 x 16 bit by default, one block RAM). Each word is in
// duty_t format (11 integer bits in two's complement, 5 fraction bits, units
// of DPWM clock counts). Depending on the control method a table holds 1-d,
// 1-d1, d2, 1-da or dc.
//
// The values are calculated off line for the nominal operating point. In the
// reference design they are part of the FPGA configuration; here the memory
// has a write port through which they are loaded after reset (this design's
// choice, so that one netlist serves any converter). Read: synchronous, rdata
// is valid one clock after raddr.
module duty_table
  import pfc_pkg::*;
#(
  parameter int unsigned DEPTH = 1000,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  duty_t         wdata,
  input  logic [AW-1:0] raddr,
  output duty_t         rdata
);
  duty_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && 32'(waddr) < DEPTH) mem[waddr] <= wdata;
    rdata <= (32'(raddr) < DEPTH) ? mem[raddr] : '0;
  end

endmodule
