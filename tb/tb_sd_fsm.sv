// tb_sd_fsm: self-checking test of the SDRAM command state machine, driven
// through the real timing counters (start-up pause shortened to 50 cycles,
// refresh interval to 400 cycles).
//
// The testbench stands in for the FIFOs and address counters: it keeps the
// number of words waiting in the input FIFO and of free places in the output
// FIFO, and column counters for both pointers, all updated from the strobes
// of the state machine. Every command on the registered command pins is
// logged with its cycle. Checks:
//   * start-up: nothing before the pause ends, then PRE (all banks, all
//     chips), 8 REF, MRS, in that order and with the spacing of the timers;
//   * a write burst of 5 words: ACT, 5 back-to-back WRITEs 3 cycles after it,
//     PRE 4 cycles after the last (the FIFO reports empty a cycle late), one FIFO pop and counter step per WRITE;
//   * a write burst starting at column 508 stops at the row end (4 words)
//     and the rest follows in a new row;
//   * a read burst stops when the output FIFO has no room;
//   * both streams waiting: rows alternate between them;
//   * refresh: one REF per interval, all chips, from idle, and a long burst
//     is cut short for it.
`timescale 1ns/1ps
module tb_sd_fsm;
  import sdfifo_pkg::*;

  logic clk = 0, rst = 0;
  logic rdFIFO_f, wrFIFO_e, rd_en = 0, wr_en = 0;
  logic row_column, read_write, rd_addr_cntr, wr_addr_cntr, mrs, auto_cs, pre_all, sd_idle;
  logic end_of_rd_row, end_of_wr_row, we_rdFIFO, re_wrFIFO;
  logic sd_ras, sd_cas, sd_we, sd_cke;
  logic start_cntr_end, ar_cntr_end, refresh_cntr_end, ar_cycles_cntr_end, ras_cntr_end;
  logic ar_cntr_load, ar_cycles_cntr_ce, ras_cntr_load, refresh_cntr_load;

  always #5 clk = ~clk;

  sd_fsm dut (.sd_clk(clk), .*);
  sd_timers #(.INIT_CYCLES(50), .REFRESH_CYCLES(400)) u_t (.*);

  // FIFO and counter stand-ins
  int wr_words = 0, rd_space = 16;
  int wr_col = 0, rd_col = 0;
  assign wrFIFO_e      = (wr_words == 0);
  assign rdFIFO_f      = (rd_space == 0);
  assign end_of_wr_row = (wr_col == 511);
  assign end_of_rd_row = (rd_col == 511);

  // command log, and the address-path selects registered like the pins
  typedef struct { sd_cmd_e cmd; longint cyc; logic rw; logic rc; logic ac; logic pa; logic md; } ev_t;
  ev_t    log_q [$];
  longint cyc = 0;
  logic   rw_q, rc_q, ac_q, pa_q, md_q;
  int     n_pop = 0, n_push = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    rw_q <= read_write; rc_q <= row_column; ac_q <= auto_cs; pa_q <= pre_all; md_q <= mrs;
    if (sd_cmd_e'({sd_ras, sd_cas, sd_we}) != CMD_NOP && !rst)
      log_q.push_back('{sd_cmd_e'({sd_ras, sd_cas, sd_we}), cyc, rw_q, rc_q, ac_q, pa_q, md_q});
    if (re_wrFIFO) begin wr_words <= wr_words - 1; wr_col <= (wr_col + 1) % 512; n_pop++; end
    if (we_rdFIFO) begin rd_space <= rd_space - 1; rd_col <= (rd_col + 1) % 512; n_push++; end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int count_cmd(input sd_cmd_e c, input int from);
    int n = 0;
    for (int i = from; i < log_q.size(); i++) if (log_q[i].cmd == c) n++;
    return n;
  endfunction

  task automatic wait_idle(input int max_cycles);
    int n = 0;
    repeat (2) @(negedge clk);
    while (!sd_idle && n < max_cycles) begin @(negedge clk); n++; end
  endtask

  initial begin
    int base, n;
    #1 rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;

    // ---- start-up ----
    repeat (200) @(negedge clk);
    check(sd_idle, "idle after start-up");
    check(log_q.size() == 10, $sformatf("10 start-up commands, got %0d", log_q.size()));
    if (log_q.size() >= 10) begin
      check(log_q[0].cmd == CMD_PRE && log_q[0].pa && log_q[0].ac, "first command PRE all");
      check(log_q[0].cyc >= 50, "nothing before the start-up pause");
      for (int i = 1; i <= 8; i++) check(log_q[i].cmd == CMD_REF && log_q[i].ac, "REF x8");
      check(log_q[9].cmd == CMD_MRS && log_q[9].md && log_q[9].ac, "then MRS");
      check(log_q[1].cyc - log_q[0].cyc == 3, "PRE to REF 3 cycles");
      for (int i = 2; i <= 9; i++) check(log_q[i].cyc - log_q[i-1].cyc == 7, "REF spacing 7 cycles");
    end
    check(sd_cke, "clock enable high");

    // ---- write burst of 5 ----
    base = log_q.size();
    wr_en = 1; wr_col = 100;
    @(negedge clk); wr_words = 5;
    wait_idle(100);
    check(log_q.size() - base == 7, $sformatf("ACT + 5 WRITE + PRE, got %0d", log_q.size() - base));
    if (log_q.size() - base == 7) begin
      check(log_q[base].cmd == CMD_ACT && log_q[base].rc && !log_q[base].rw, "ACT with write row");
      for (int i = 1; i <= 5; i++) begin
        check(log_q[base+i].cmd == CMD_WRITE && !log_q[base+i].rc && !log_q[base+i].rw, "WRITE column");
        check(log_q[base+i].cyc - log_q[base].cyc == 2 + i, "WRITE timing");
      end
      // the FIFO reports empty one cycle after the last pop: 1 idle cycle, then 3
      check(log_q[base+6].cmd == CMD_PRE && log_q[base+6].cyc - log_q[base+5].cyc == 4, "PRE 4 cycles after the last WRITE");
    end
    check(n_pop == 5 && wr_col == 105, "5 pops and counter steps");

    // ---- write burst across a row end ----
    base = log_q.size();
    wr_col = 508;
    @(negedge clk); wr_words = 10;
    wait_idle(100); wait_idle(100);
    check(count_cmd(CMD_ACT, base) == 2 && count_cmd(CMD_WRITE, base) == 10, "two rows for 10 words");
    if (log_q.size() > base + 5)
      check(log_q[base+5].cmd == CMD_PRE, "row closed after 4 words at the row end");
    wr_en = 0;

    // ---- read burst until the output FIFO is full ----
    base = log_q.size();
    rd_space = 6; rd_col = 0;
    rd_en = 1;
    wait_idle(100);
    rd_en = 0;
    check(count_cmd(CMD_READ, base) == 6 && rd_space == 0, "6 reads fill the output FIFO");
    check(log_q[base].rw, "read row from the read pointer");

    // ---- arbitration ----
    base = log_q.size();
    rd_en = 1; wr_en = 1;
    for (int k = 0; k < 6; k++) begin
      @(negedge clk); rd_space = 2; wr_words = 2;
      wait_idle(100);
    end
    n = 0;
    begin
      int last_rw = -1;
      for (int i = base; i < log_q.size(); i++)
        if (log_q[i].cmd == CMD_ACT) begin
          if (last_rw == int'(log_q[i].rw)) n++;
          last_rw = int'(log_q[i].rw);
        end
    end
    check(count_cmd(CMD_ACT, base) >= 6 && n == 0, "rows alternate between the streams");

    // ---- refresh cuts a long write burst ----
    rd_en = 0;
    base = log_q.size();
    wr_col = 0;
    @(negedge clk); wr_words = 2000;
    repeat (1500) @(negedge clk);
    wr_en = 0;
    wait_idle(100);
    n = count_cmd(CMD_REF, base);
    check(n >= 3 && n <= 4, $sformatf("refreshes in 1500 cycles: %0d", n));
    begin
      longint last = -1;
      int cut = 0;
      for (int i = base; i < log_q.size(); i++) begin
        if (log_q[i].cmd == CMD_REF) begin
          check(log_q[i].ac, "REF on all chips");
          if (last >= 0) check(log_q[i].cyc - last <= 400 + 20, "refresh interval");
          last = log_q[i].cyc;
          if (i >= 2 && log_q[i-1].cmd == CMD_PRE && log_q[i-2].cmd == CMD_WRITE &&
              log_q[i-2].cyc - log_q[i-3].cyc == 1 && wr_col != 511) cut++;
        end
      end
      check(cut > 0, "a burst was cut short by a refresh");
    end

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
