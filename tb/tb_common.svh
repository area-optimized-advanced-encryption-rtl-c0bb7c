// tb_common.svh: shared testbench scaffolding, included inside a testbench module.
// Provides the check counters, a 100 MHz clock, the CHECK macro, the final report task
// and a watchdog that fails the run after WATCHDOG_CYCLES clock cycles. The including
// module must declare `localparam int WATCHDOG_CYCLES` before the include.
int   checks   = 0;
int   failures = 0;
logic clk      = 1'b0;

always #5 clk = ~clk;

`define CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      if (failures <= 10) $display("FAIL: %s", msg); \
    end \
  end

task automatic finish_tb();
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
endtask

initial begin
  repeat (WATCHDOG_CYCLES) @(posedge clk);
  failures++;
  $display("FAIL: watchdog expired after %0d cycles", WATCHDOG_CYCLES);
  finish_tb();
end
