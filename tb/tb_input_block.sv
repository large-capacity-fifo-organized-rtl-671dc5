// tb_input_block: self-checking test of the input block.
//
// clk runs at 100 MHz; the write strobe wr is pulsed about every 33 ns
// (30 MHz). Checks:
//   * byte order: every word popped from the FIFO is {b3,b2,b1,b0} of four
//     consecutive bytes, first byte least significant;
//   * latency: a word reaches an empty FIFO at most 5 clk cycles after the
//     strobe of its fourth byte;
//   * rate: with the FIFO drained, 400 bytes at 30 MHz never see wr_ready low;
//   * stall: with nothing popped, exactly 16 words (FIFO) + 1 word (word
//     register) + 3 bytes are taken before wr_ready falls; then a byte written
//     anyway is dropped, and after draining everything arrives in order.
`timescale 1ns/1ps
module tb_input_block;
  logic clk = 0, rst = 0, wr = 0;
  logic [7:0] data_in = 0;
  logic wr_ready, fifo_rd, fifo_empty, fifo_full;
  logic pop_rd = 0, drain_rd = 0;
  assign fifo_rd = pop_rd | drain_rd;
  logic [31:0] fifo_dout;

  always #5 clk = ~clk;

  input_block dut (.clk, .rst, .wr, .data_in, .wr_ready, .fifo_rd, .fifo_dout, .fifo_empty, .fifo_full);

  int checks = 0, failures = 0;
  logic [7:0] sent [$];
  int low_seen = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // one strobe, no wait for wr_ready
  task automatic strobe(input logic [7:0] b);
    data_in = b;
    #2 wr = 1;
    #15 wr = 0;
    #16;
  endtask

  // pop and check one word (FIFO must hold one)
  task automatic pop_check();
    logic [31:0] exp;
    @(negedge clk);
    exp = {sent[3], sent[2], sent[1], sent[0]};
    check(fifo_dout == exp, $sformatf("word order %h vs %h", fifo_dout, exp));
    repeat (4) void'(sent.pop_front());
    pop_rd = 1;
    @(negedge clk);
    pop_rd = 0;
  endtask

  // continuous drain while enabled
  bit drain = 0;
  int popped = 0;
  always @(negedge clk) begin
    if (drain && !fifo_empty && !drain_rd) begin
      logic [31:0] exp;
      exp = {sent[3], sent[2], sent[1], sent[0]};
      checks++;
      if (fifo_dout != exp) begin
        failures++;
        $display("FAIL drained word %h expected %h", fifo_dout, exp);
      end
      repeat (4) void'(sent.pop_front());
      drain_rd <= 1;
      popped++;
    end else begin
      drain_rd <= 0;
    end
  end

  initial begin
    int taken;
    #1 rst = 1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (3) @(posedge clk);

    // latency of single words into an empty FIFO
    for (int w = 0; w < 4; w++) begin
      realtime t4;
      for (int b = 0; b < 3; b++) begin
        sent.push_back(8'($urandom)); strobe(sent[$]);
      end
      sent.push_back(8'($urandom));
      data_in = sent[$];
      #2 wr = 1;
      t4 = $realtime;
      #15 wr = 0;
      while (fifo_empty && ($realtime - t4) < 200.0) @(posedge clk);
      check(!fifo_empty && ($realtime - t4) <= 50.0, $sformatf("latency %0t", $realtime - t4));
      #16;
      pop_check();
    end

    // sustained rate with draining
    drain = 1;
    for (int i = 0; i < 400; i++) begin
      if (!wr_ready) low_seen++;
      sent.push_back(8'($urandom)); strobe(sent[$]);
    end
    check(low_seen == 0, "wr_ready low at 30 MHz");
    repeat (20) @(posedge clk);
    check(popped == 100 && sent.size() == 0, "all 100 words drained");
    drain = 0;
    repeat (5) @(posedge clk);

    // stall: fill FIFO and word register
    taken = 0;
    for (int i = 0; i < 100 && wr_ready; i++) begin
      sent.push_back(8'($urandom)); strobe(sent[$]);
      taken++;
      repeat (10) @(posedge clk);
    end
    check(taken == 16 * 4 + 4 + 3, $sformatf("bytes before stall %0d", taken));
    check(fifo_full, "FIFO full at stall");
    strobe(8'hEE);                 // dropped: wr_ready is low
    check(!wr_ready, "still stalled");
    drain = 1;
    repeat (60) @(posedge clk);
    check(wr_ready, "wr_ready back after drain");
    sent.push_back(8'h5A); strobe(sent[$]);   // completes the 18th word
    repeat (60) @(posedge clk);
    check(sent.size() == 0 && fifo_empty, "all words after stall drained in order");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
