// tb_output_block: self-checking test of the output block.
//
// clk runs at 100 MHz, out_clk at 30 MHz. Checks:
//   * byte order: the reader gets the bytes of each word least significant
//     first, words in FIFO order;
//   * rate: with the FIFO kept supplied, a reader asking for a byte every
//     out_clk cycle finds rd_ready high every time after the first word
//     (1600 bytes);
//   * holding: with no reads, the block takes 2 words into its registers and
//     16 into the FIFO; almost_full rises at 8 stored words, full at 16;
//   * rd_ready is low while nothing is stored.
`timescale 1ns/1ps
module tb_output_block;
  logic clk = 0, out_clk = 0, rst = 0;
  logic rd = 0, rd_ready;
  logic [7:0] data_out;
  logic fifo_wr = 0, fifo_full, fifo_almost_full, fifo_empty;
  logic [31:0] fifo_din = 0;

  always #5 clk = ~clk;
  always #16.5 out_clk = ~out_clk;

  output_block dut (.clk, .rst, .out_clk, .rd, .data_out, .rd_ready,
                    .fifo_wr, .fifo_din, .fifo_full, .fifo_almost_full, .fifo_empty);

  int checks = 0, failures = 0;
  logic [7:0] exp_bytes [$];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // producer: pushes n random words whenever the FIFO is not full
  bit produce = 0;
  int to_push = 0;
  always @(negedge clk) begin
    if (produce && to_push > 0 && !fifo_full) begin
      logic [31:0] w;
      w = $urandom;
      fifo_din <= w;
      fifo_wr  <= 1;
      for (int i = 0; i < 4; i++) exp_bytes.push_back(w[8*i +: 8]);
      to_push--;
    end else begin
      fifo_wr <= 0;
    end
  end

  task automatic read_n(input int n, output int waits);
    waits = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge out_clk);
      while (!rd_ready) begin
        rd = 0; waits++;
        @(negedge out_clk);
      end
      check(data_out == exp_bytes[0], $sformatf("byte %0d: %02h vs %02h", i, data_out, exp_bytes[0]));
      void'(exp_bytes.pop_front());
      rd = 1;
    end
    @(negedge out_clk);
    rd = 0;
  endtask

  initial begin
    int waits;
    #1 rst = 1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (10) @(posedge out_clk);
    check(!rd_ready, "rd_ready low when empty");

    // rate: 400 words, reader continuous
    to_push = 400; produce = 1;
    repeat (40) @(posedge clk);
    read_n(1600, waits);
    check(waits == 0, $sformatf("reader waited %0d cycles", waits));

    // holding: 20 words offered, no reads
    to_push = 20;
    repeat (8 + 4) @(posedge clk);
    repeat (100) @(posedge clk);
    check(to_push == 2, $sformatf("words taken %0d", 20 - to_push));
    check(fifo_full && fifo_almost_full, "full and almost_full");
    check(rd_ready, "rd_ready high with data");
    read_n(4 * 18, waits);
    check(!fifo_almost_full, "almost_full cleared");
    read_n(4 * 2, waits);
    repeat (20) @(posedge clk);
    check(exp_bytes.size() == 0 && fifo_empty, "everything read");
    repeat (10) @(posedge out_clk);
    check(!rd_ready, "rd_ready low at end");

    // almost_full level: 8 words in the FIFO (after 2 in the registers)
    produce = 0;
    to_push = 9;
    produce = 1;
    repeat (60) @(posedge clk);
    check(!fifo_almost_full, "7 stored words: not almost full");
    to_push = 1;
    repeat (10) @(posedge clk);
    check(fifo_almost_full, "8 stored words: almost full");
    read_n(40, waits);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #300us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
