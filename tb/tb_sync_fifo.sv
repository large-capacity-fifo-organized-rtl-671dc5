// tb_sync_fifo: self-checking test of the 16 x 32 synchronous FIFO.
//
// Random pushes and pops (pushes favoured in the first half, pops in the
// second, so the FIFO runs full and empty) are compared with a queue
// reference model: the show-ahead output, the count, and the full, empty and
// almost_full flags (level 10 here) every cycle. Writes while full and reads
// while empty are not attempted (the FIFO asserts on them).
`timescale 1ns/1ps
module tb_sync_fifo;
  localparam int unsigned DEPTH = 16;
  localparam int unsigned AF    = 10;

  logic clk = 0, rst = 0;
  logic wr_en = 0, rd_en = 0;
  logic [31:0] din = 0, dout;
  logic full, empty, almost_full;
  logic [4:0] count;

  always #5 clk = ~clk;

  sync_fifo #(.DEPTH(DEPTH), .WIDTH(32), .AF_LEVEL(AF)) dut (
    .clk, .rst, .wr_en, .din, .rd_en, .dout, .full, .empty, .almost_full, .count
  );

  logic [31:0] model [$];
  int checks = 0, failures = 0;
  int saw_full = 0, saw_empty = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t (model size %0d)", what, $time, model.size());
    end
  endtask

  initial begin
    #1 rst = 1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      check(count == 5'(model.size()), "count");
      check(full == (model.size() == DEPTH), "full");
      check(empty == (model.size() == 0), "empty");
      check(almost_full == (model.size() >= AF), "almost_full");
      if (model.size() != 0) check(dout == model[0], "dout");
      if (full) saw_full++;
      if (empty) saw_empty++;
      wr_en = !full && (($urandom % 100) < ((i % 400) < 200 ? 70 : 30));
      rd_en = !empty && (($urandom % 100) < ((i % 400) < 200 ? 30 : 70));
      din   = $urandom;
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(din);
    end
    check(saw_full > 0, "never full");
    check(saw_empty > 0, "never empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
