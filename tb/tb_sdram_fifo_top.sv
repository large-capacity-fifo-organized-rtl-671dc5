// tb_sdram_fifo_top: end-to-end test of the SDRAM FIFO memory block at its
// default parameters, with the SDRAM behavioural model.
//
// Clocks: clk 100 MHz, input write strobe about 30 MHz, out_clk 25 MHz in
// phase 1 and 29.4 MHz in phases 2 and 3 (both streams near 30 MHz at once).
// Three phases, each after a reset:
//   phase 1, CAS latency 2 (mode register default): 1500 words from a start
//     address 12 words before the end of a row;
//   phase 2, CAS latency 3 (mode register written during the start-up
//     pause): 1000 words from 40 words below the first address of chip
//     select 1;
//   phase 3, CAS latency 2: 400 words from 256 words below the top of memory,
//     so the pointers wrap from chip select 3 to address 0.
// In each phase the host sets the write start address during the start-up
// pause and the writer starts at once, so the input FIFO fills and stalls it
// until the SDRAM is ready. In phases 1 and 2, once the write pointer is 64
// words ahead, the host sets the read start address to the same place and
// the reader follows the writer (delay-line use), so both streams compete for
// the SDRAM. In phase 3 the whole block is written first and the read start
// address is set afterwards (buffer / replay use). Every byte read is
// compared with the byte written. The SDRAM model counts protocol
// violations. Mechanisms counted and required: input FIFO full (writer
// stall), output FIFO almost full (reads held back), refreshes, refresh
// cutting a burst short, write and read bursts ended by a row end,
// arbitration between both streams, CAS latency 2 and 3 reads, writes to chip
// selects 0, 1 and 3, pointer wrap at the top of memory. Rates are checked
// too: after the first 128 bytes the writer must not fall more than 10%
// behind its 30 MHz strobe, nor the reader more than 10% (plus 2 us to
// start) behind out_clk.
`timescale 1ns/1ps
module tb_sdram_fifo_top;
  import sdfifo_pkg::*;

  logic clk = 0, out_clk = 0, rst = 0;   // rises at the start of each phase
  logic wr = 0, rd = 0;
  logic [7:0] data_in = 0;
  logic wr_ready, rd_ready;
  logic [7:0] data_out;
  logic wrc = 0, cs_read_reg = 0, cs_write_reg = 0, cs_mode_reg = 0;
  logic [ADDR_W-1:0] data_bus = 0;
  logic sd_cke, sd_ras_n, sd_cas_n, sd_we_n, sd_dqm, sd_dq_oe;
  logic [3:0] sd_cs_n;
  logic [1:0] sd_ba;
  logic [11:0] sd_a;
  logic [31:0] sd_dq_out, sd_dq_in;

  int violations, n_ref, n_act, n_write, n_read, n_read_cl3, n_mrs;
  int n_write_chip [4];

  always #5  clk = ~clk;
  realtime out_half = 20.0;   // out_clk half period: 25 MHz, then 29.4 MHz
  always #(out_half) out_clk = ~out_clk;

  sdram_fifo_top dut (
    .clk, .rst, .wr, .data_in, .wr_ready, .out_clk, .rd, .data_out, .rd_ready,
    .wrc, .cs_read_reg, .cs_write_reg, .cs_mode_reg, .data_bus,
    .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_a, .sd_dqm,
    .sd_dq_out, .sd_dq_oe, .sd_dq_in
  );

  sdram_model mem (
    .clk, .cke(sd_cke), .cs_n(sd_cs_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n), .we_n(sd_we_n),
    .ba(sd_ba), .a(sd_a), .dqm(sd_dqm), .dq_in(sd_dq_out), .dq_oe(sd_dq_oe), .dq_out(sd_dq_in),
    .violations, .n_ref, .n_act, .n_write, .n_read, .n_read_cl3, .n_mrs, .n_write_chip
  );

  int checks = 0, failures = 0;

  // ---- mechanism counters ----
  int m_in_full = 0, m_out_af = 0, m_ref_cut = 0, m_wr_row_end = 0, m_rd_row_end = 0;
  int m_arbitrate = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.wrFIFO_full) m_in_full++;
    if (dut.rdFIFO_f && dut.rd_en) m_out_af++;
    if (dut.refresh_cntr_end && (dut.u_fsm.issue_w || dut.u_fsm.issue_r)) m_ref_cut++;
    if (dut.re_wrFIFO && dut.end_of_wr_row) m_wr_row_end++;
    if (dut.we_rdFIFO && dut.end_of_rd_row) m_rd_row_end++;
    if (dut.sd_idle && dut.u_fsm.want_w && dut.u_fsm.want_r && !dut.refresh_cntr_end) m_arbitrate++;
  end

  // ---- stimulus helpers ----
  function automatic logic [7:0] pattern(int unsigned phase, int unsigned n);
    logic [31:0] h = (phase * 32'h9E3779B9) ^ (n * 32'h85EBCA6B);
    h = h ^ (h >> 13);
    return h[7:0] ^ h[23:16];
  endfunction

  task automatic host_write(input logic rsel, input logic wsel, input logic msel,
                            input logic [ADDR_W-1:0] v);
    @(negedge clk);
    wrc = 1; cs_read_reg = rsel; cs_write_reg = wsel; cs_mode_reg = msel; data_bus = v;
    @(negedge clk);
    wrc = 0; cs_read_reg = 0; cs_write_reg = 0; cs_mode_reg = 0;
  endtask

  // writer: bytes n0 .. n0+nbytes-1 of the phase pattern, one strobe every ~33 ns
  int bytes_written = 0;
  task automatic write_bytes(input int unsigned phase, input int unsigned n0, input int unsigned nbytes);
    for (int unsigned i = 0; i < nbytes; i++) begin
      while (!wr_ready) #1;
      data_in = pattern(phase, n0 + i);
      #2 wr = 1;
      #15 wr = 0;
      #16;
      bytes_written++;
    end
  endtask

  // reader: checks nbytes bytes against the phase pattern starting at n0
  int bytes_read = 0;
  task automatic read_bytes(input int unsigned phase, input int unsigned n0, input int unsigned nbytes);
    for (int unsigned i = 0; i < nbytes; i++) begin
      @(negedge out_clk);
      while (!rd_ready) begin
        rd = 0;
        @(negedge out_clk);
      end
      checks++;
      if (data_out !== pattern(phase, n0 + i)) begin
        failures++;
        if (failures < 10)
          $display("FAIL phase %0d byte %0d: got %02h expected %02h", phase, n0 + i, data_out, pattern(phase, n0 + i));
      end
      rd = 1;
      bytes_read++;
    end
    @(negedge out_clk);
    rd = 0;
  endtask

  task automatic wait_written(input logic [ADDR_W-1:0] ptr);
    while (dut.write_ptr != ptr || !dut.wrFIFO_e) @(posedge clk);
  endtask

  task automatic run_phase(input int unsigned phase, input logic cas3,
                           input logic [ADDR_W-1:0] base, input int unsigned words,
                           input logic follow);
    realtime tw0, tw1, tr0, tr1;
    bytes_written = 0;
    #1 rst = 1;
    repeat (5) @(posedge clk);
    rst = 0;
    if (cas3) host_write(0, 0, 1, ADDR_W'(12'h030));
    host_write(0, 1, 0, base);
    tw0 = 0; tw1 = 0; tr0 = 0; tr1 = 0;
    fork
      begin
        // stalls while the controller runs its start-up sequence
        write_bytes(phase, 0, 128);
        tw0 = $realtime;
        write_bytes(phase, 128, 4 * words - 128);
        tw1 = $realtime;
      end
      begin
        // start the read stream once the writer is 64 words ahead, or
        // once the whole block is in the SDRAM
        if (follow)
          while (dut.write_ptr - base < ADDR_W'(64) || !dut.wr_en) @(posedge clk);
        else
          wait_written(base + ADDR_W'(words));
        host_write(1, 0, 0, base);
        tr0 = $realtime;
        read_bytes(phase, 0, 4 * words);
        tr1 = $realtime;
      end
    join
    wait_written(base + ADDR_W'(words));
    checks++;
    if (dut.write_ptr != base + ADDR_W'(words)) failures++;
    // input: one byte per 33 ns strobe, plus 10%
    checks++;
    if ((tw1 - tw0) > 1.1 * 33.0 * (4 * words - 128)) begin
      failures++;
      $display("FAIL phase %0d: input rate too low (%0t for %0d bytes)", phase, tw1 - tw0, 4 * words - 128);
    end
    // output: one byte per out_clk cycle, plus 10% and 2 us to start
    checks++;
    if ((tr1 - tr0) > 1.1 * 2.0 * out_half * 4 * words + 2000.0) begin
      failures++;
      $display("FAIL phase %0d: output rate too low (%0t for %0d bytes)", phase, tr1 - tr0, 4 * words);
    end
  endtask

  initial begin
    // phase 1: CAS latency 2, start 12 words before the end of a row
    run_phase(1, 0, {2'd0, 2'd3, 12'd5, 9'd500}, 1500, 1);
    // phase 2: CAS latency 3, start 40 words below chip select 1
    out_half = 17.0;
    run_phase(2, 1, 25'h07F_FFD8, 1000, 1);
    // phase 3: write 400 words across the top of memory, then read them back
    run_phase(3, 0, 25'h1FF_FF00, 400, 0);
    checks++;
    // the read stream keeps prefetching into the output FIFO (up to its
    // almost-full level plus the reads in flight) after the reader stops
    if (dut.write_ptr != ADDR_W'(400 - 256) || dut.read_ptr < ADDR_W'(400 - 256)
        || dut.read_ptr > ADDR_W'(400 - 256 + 16)) begin
      failures++;
      $display("FAIL: pointers did not wrap (%h %h)", dut.write_ptr, dut.read_ptr);
    end

    checks++; if (violations != 0) failures++;
    checks++; if (m_in_full == 0)    begin failures++; $display("FAIL: input FIFO never full"); end
    checks++; if (m_out_af == 0)     begin failures++; $display("FAIL: output FIFO never almost full"); end
    checks++; if (n_ref == 0)        begin failures++; $display("FAIL: no refresh"); end
    checks++; if (m_ref_cut == 0)    begin failures++; $display("FAIL: no burst cut by refresh"); end
    checks++; if (m_wr_row_end == 0) begin failures++; $display("FAIL: no write row end"); end
    checks++; if (m_rd_row_end == 0) begin failures++; $display("FAIL: no read row end"); end
    checks++; if (m_arbitrate == 0)  begin failures++; $display("FAIL: no arbitration"); end
    checks++; if (n_read - n_read_cl3 == 0) begin failures++; $display("FAIL: no CL2 read"); end
    checks++; if (n_read_cl3 == 0)   begin failures++; $display("FAIL: no CL3 read"); end
    checks++; if (n_write_chip[0] == 0 || n_write_chip[1] == 0) begin failures++; $display("FAIL: chip select 1 never written"); end
    checks++; if (n_write_chip[3] == 0) begin failures++; $display("FAIL: chip select 3 never written"); end
    $display("stats: violations=%0d refresh=%0d act=%0d write=%0d read=%0d read_cl3=%0d mrs=%0d",
             violations, n_ref, n_act, n_write, n_read, n_read_cl3, n_mrs);
    $display("mechanisms: in_full=%0d out_af=%0d ref_cut=%0d wr_row_end=%0d rd_row_end=%0d arbitrate=%0d",
             m_in_full, m_out_af, m_ref_cut, m_wr_row_end, m_rd_row_end, m_arbitrate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("FAIL: watchdog (written %0d read %0d wptr %h rptr %h wr_en %b rd_en %b)", bytes_written, bytes_read,
             dut.write_ptr, dut.read_ptr, dut.wr_en, dut.rd_en);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
