// tb_duty_table: writes random words to every address, reads them back in
// random order and checks the one-clock read latency.
module tb_duty_table;
  import pfc_pkg::*;
  localparam int DEPTH = 1000;
  logic clk = 1'b0, we = 1'b0;
  logic [9:0] waddr = '0, raddr = '0;
  duty_t wdata = '0, rdata;
  duty_t ref_mem [DEPTH];
  int checks = 0, failures = 0;

  duty_table #(.DEPTH(DEPTH)) dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                                   .raddr(raddr), .rdata(rdata));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      ref_mem[a] = duty_t'($urandom);
      @(negedge clk) begin we = 1'b1; waddr = 10'(a); wdata = ref_mem[a]; end
    end
    @(negedge clk) we = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      int a = $urandom_range(0, DEPTH - 1);
      @(negedge clk) raddr = 10'(a);
      @(negedge clk);
      check(rdata == ref_mem[a], $sformatf("addr %0d: %h expected %h", a, rdata, ref_mem[a]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
