// tb_sd_timers: self-checking test of the SDRAM controller timing counters
// at their default settings (100 MHz clock).
//
// Measures, in clock cycles, the start-up pause (20000 = 200 us), the refresh
// interval after a reload (780 = 7.8 us), the waits after ar_cntr_load
// (end 6 cycles later, so the next command is 7 cycles after a refresh) and
// ras_cntr_load (end 2 cycles later: 3 cycles between commands), and the
// count of 8 start-up auto refreshes.
`timescale 1ns/1ps
module tb_sd_timers;
  logic clk = 0, rst = 0;
  logic refresh_cntr_load = 0, ar_cntr_load = 0, ar_cycles_cntr_ce = 0, ras_cntr_load = 0;
  logic start_cntr_end, refresh_cntr_end, ar_cntr_end, ar_cycles_cntr_end, ras_cntr_end;

  always #5 clk = ~clk;

  sd_timers dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // cycles from the edge that takes a load until the end flag is seen high
  task automatic measure(ref logic load, ref logic flag, output int n);
    @(negedge clk); load = 1;
    @(negedge clk); load = 0;
    n = 1;
    while (!flag && n < 100000) begin @(negedge clk); n++; end
  endtask

  initial begin
    int n;
    #1 rst = 1;
    @(negedge clk);
    rst = 0;
    n = 0;
    while (!start_cntr_end && n < 100000) begin @(negedge clk); n++; end
    check(n == 20000, $sformatf("start-up pause %0d cycles", n));
    @(negedge clk);
    check(start_cntr_end, "start-up end stays high");

    measure(refresh_cntr_load, refresh_cntr_end, n);
    check(n == 780, $sformatf("refresh interval %0d cycles", n));
    repeat (5) @(negedge clk);
    check(refresh_cntr_end, "refresh request held until reload");

    measure(ar_cntr_load, ar_cntr_end, n);
    check(n == 6, $sformatf("auto-refresh wait %0d cycles", n));
    measure(ras_cntr_load, ras_cntr_end, n);
    check(n == 2, $sformatf("ras wait %0d cycles", n));

    for (int i = 0; i < 8; i++) begin
      check(!ar_cycles_cntr_end, $sformatf("auto-refresh count not ended after %0d", i));
      @(negedge clk); ar_cycles_cntr_ce = 1;
      @(negedge clk); ar_cycles_cntr_ce = 0;
    end
    check(ar_cycles_cntr_end, "auto-refresh count ends at 8");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
