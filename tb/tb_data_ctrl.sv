// tb_data_ctrl: self-checking test of the SDRAM data control.
//
// Cycle c is the clock period after rising edge c. The testbench drives the
// SDRAM data pins with a value unique to each cycle. Checks:
//   * write: wr_cmd with wr_data in cycle t gives dq_oe high and dq_out =
//     wr_data in cycle t+1 only;
//   * read: a READ decided in cycle t is sampled by the SDRAM at edge t+2 and
//     its data is on the pins during cycle t+1+CL; rdfifo_wr must be high in
//     cycle t+2+CL exactly, with rdfifo_din = the pin value of cycle t+1+CL,
//     for CAS latency 2 and 3, for single reads and back-to-back bursts.
`timescale 1ns/1ps
module tb_data_ctrl;
  logic clk = 0, rst = 0, cl3 = 0;
  logic wr_cmd = 0, rd_cmd = 0, dq_oe, rdfifo_wr;
  logic [31:0] wr_data = 0, dq_out, dq_in, rdfifo_din;

  always #5 clk = ~clk;

  data_ctrl dut (.*);

  int cyc = 0;
  function automatic logic [31:0] pin_val(input int c);
    return 32'hA5000000 ^ (c * 32'h00010203);
  endfunction
  always @(posedge clk) cyc <= cyc + 1;
  assign dq_in = pin_val(cyc);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // expected read strobes, keyed by cycle
  bit          exp_wr  [int];
  logic [31:0] exp_din [int];
  logic [31:0] exp_dq  [int];
  int n_rd = 0, n_wr = 0;

  // compare outputs in the middle of each cycle
  always @(negedge clk) if (!rst) begin
    checks++;
    if (rdfifo_wr != exp_wr.exists(cyc)) begin
      failures++;
      $display("FAIL rdfifo_wr=%0b at cycle %0d", rdfifo_wr, cyc);
    end else if (rdfifo_wr) begin
      n_rd++;
      check(rdfifo_din == exp_din[cyc], "read data");
    end
    checks++;
    if (dq_oe != exp_dq.exists(cyc)) begin
      failures++;
      $display("FAIL dq_oe=%0b at cycle %0d", dq_oe, cyc);
    end else if (dq_oe) begin
      n_wr++;
      check(dq_out == exp_dq[cyc], "write data");
    end
  end

  // drive one decision cycle (called at a negedge, for cycle cyc)
  task automatic step(input bit r, input bit w);
    int t = cyc;
    int cl = cl3 ? 3 : 2;
    rd_cmd = r; wr_cmd = w; wr_data = $urandom;
    if (r) begin exp_wr[t + 2 + cl] = 1; exp_din[t + 2 + cl] = pin_val(t + 1 + cl); end
    if (w) exp_dq[t + 1] = wr_data;
    @(negedge clk);
    rd_cmd = 0; wr_cmd = 0;
  endtask

  initial begin
    #1 rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int pass = 0; pass < 2; pass++) begin
      cl3 = pass[0];
      step(1, 0);                                   // single read
      repeat (8) step(0, 0);
      for (int i = 0; i < 6; i++) step(1, 0);       // burst
      repeat (8) step(0, 0);
      for (int i = 0; i < 5; i++) step(0, 1);       // write burst
      repeat (3) step(0, 0);
      for (int i = 0; i < 20; i++) step($urandom % 2 == 0, 0);
      repeat (8) step(0, 0);
    end
    check(n_rd > 20 && n_wr == 10, $sformatf("strobes seen: %0d reads, %0d writes", n_rd, n_wr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
