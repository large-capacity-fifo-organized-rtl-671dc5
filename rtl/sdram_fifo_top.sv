// sdram_fifo_top: large-capacity FIFO-organised memory on SDR SDRAM.
//
// An 8-bit input stream and an 8-bit output stream, each with its own clock
// and handshake, share one 32-bit SDRAM array of 2^25 words (128 MB on four
// chip selects). The input block packs four bytes into a word and queues it
// in a 16-word input FIFO; the SDRAM controller (sd_fsm with its timers, the
// address control and the data control) writes queued words at the write
// pointer and reads words at the read pointer into a 16-word output FIFO,
// from which the output block hands them out byte by byte. The controller
// keeps the input FIFO from filling and the output FIFO from emptying. Both
// pointers are set by a host through the start-address registers; a stream is
// served only after its start address has been written, and each pointer then
// advances on its own, so the memory acts as a FIFO, a long delay line or a
// pattern store, depending on how the host places the pointers.
//
// Clock domains: wr (the input strobe clocks the byte registers), out_clk
// (the output byte counter) and clk (FIFOs, state machines, SDRAM; 100 MHz in
// the design). Resets are asynchronous, active high.
//
// SDRAM pins: commands, address and write data are registered. The
// bidirectional data bus is split into sd_dq_out / sd_dq_oe (to a tri-state
// pad) and sd_dq_in (from it). sd_dqm is held low: all byte lanes are always
// written and read.
//
// wrFIFO_full, rdFIFO_empty, read_ptr and write_ptr are named internal nets
// that nothing here reads: they are kept as observation points for
// simulation and debug (the pointers show where each stream stands), and lint
// reports them as unused.
//
// From the design: the block structure and its connections, the 8/32-bit
// widths, the FIFO depth, the 25-bit address split and the four chip selects.
// This implementation's own: the host strobe protocol, the timing constants
// and the split data bus.
module sdram_fifo_top
  import sdfifo_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH     = 16,
  parameter int unsigned OUT_AF_LEVEL   = 8,
  parameter int unsigned INIT_CYCLES    = 20000,
  parameter int unsigned REFRESH_CYCLES = 780,
  parameter int unsigned AR_WAIT        = 5,
  parameter int unsigned RAS_WAIT       = 1,
  parameter int unsigned AR_INIT_COUNT  = 8
) (
  input  logic              clk,
  input  logic              rst,
  // input stream
  input  logic              wr,
  input  logic [BYTE_W-1:0] data_in,
  output logic              wr_ready,
  // output stream
  input  logic              out_clk,
  input  logic              rd,
  output logic [BYTE_W-1:0] data_out,
  output logic              rd_ready,
  // host register interface
  input  logic              wrc,
  input  logic              cs_read_reg,
  input  logic              cs_write_reg,
  input  logic              cs_mode_reg,
  input  logic [ADDR_W-1:0] data_bus,
  // SDRAM
  output logic              sd_cke,
  output logic [NCS-1:0]    sd_cs_n,
  output logic              sd_ras_n,
  output logic              sd_cas_n,
  output logic              sd_we_n,
  output logic [BA_W-1:0]   sd_ba,
  output logic [11:0]       sd_a,
  output logic              sd_dqm,
  output logic [WORD_W-1:0] sd_dq_out,
  output logic              sd_dq_oe,
  input  logic [WORD_W-1:0] sd_dq_in
);
  // input FIFO (SDRAM write side)
  logic              wrFIFO_e, wrFIFO_full, re_wrFIFO;
  logic [WORD_W-1:0] wrFIFO_dout;
  // output FIFO (SDRAM read side)
  logic              rdFIFO_f, rdFIFO_full, rdFIFO_empty, rdFIFO_wr;
  logic [WORD_W-1:0] rdFIFO_din;
  // controller
  logic row_column, read_write, rd_addr_cntr, wr_addr_cntr, mrs, auto_cs, pre_all;
  logic sd_idle, we_rdFIFO, rd_en, wr_en, end_of_rd_row, end_of_wr_row, cl3;
  logic start_cntr_end, ar_cntr_end, refresh_cntr_end, ar_cycles_cntr_end, ras_cntr_end;
  logic ar_cntr_load, ar_cycles_cntr_ce, ras_cntr_load, refresh_cntr_load;
  logic [ADDR_W-1:0] read_ptr, write_ptr;

  assign sd_dqm = 1'b0;

  input_block #(.FIFO_DEPTH(FIFO_DEPTH)) u_input (
    .clk(clk), .rst(rst),
    .wr(wr), .data_in(data_in), .wr_ready(wr_ready),
    .fifo_rd(re_wrFIFO), .fifo_dout(wrFIFO_dout),
    .fifo_empty(wrFIFO_e), .fifo_full(wrFIFO_full)
  );

  output_block #(.FIFO_DEPTH(FIFO_DEPTH), .AF_LEVEL(OUT_AF_LEVEL)) u_output (
    .clk(clk), .rst(rst),
    .out_clk(out_clk), .rd(rd), .data_out(data_out), .rd_ready(rd_ready),
    .fifo_wr(rdFIFO_wr), .fifo_din(rdFIFO_din),
    .fifo_full(rdFIFO_full), .fifo_almost_full(rdFIFO_f), .fifo_empty(rdFIFO_empty)
  );

  sd_timers #(
    .INIT_CYCLES(INIT_CYCLES), .REFRESH_CYCLES(REFRESH_CYCLES),
    .AR_WAIT(AR_WAIT), .RAS_WAIT(RAS_WAIT), .AR_INIT_COUNT(AR_INIT_COUNT)
  ) u_timers (
    .clk(clk), .rst(rst),
    .refresh_cntr_load(refresh_cntr_load), .ar_cntr_load(ar_cntr_load),
    .ar_cycles_cntr_ce(ar_cycles_cntr_ce), .ras_cntr_load(ras_cntr_load),
    .start_cntr_end(start_cntr_end), .refresh_cntr_end(refresh_cntr_end),
    .ar_cntr_end(ar_cntr_end), .ar_cycles_cntr_end(ar_cycles_cntr_end),
    .ras_cntr_end(ras_cntr_end)
  );

  sd_fsm u_fsm (
    .sd_clk(clk), .rst(rst),
    .rdFIFO_f(rdFIFO_f), .wrFIFO_e(wrFIFO_e), .rd_en(rd_en), .wr_en(wr_en),
    .row_column(row_column), .read_write(read_write),
    .rd_addr_cntr(rd_addr_cntr), .wr_addr_cntr(wr_addr_cntr),
    .mrs(mrs), .auto_cs(auto_cs), .pre_all(pre_all), .sd_idle(sd_idle),
    .end_of_rd_row(end_of_rd_row), .end_of_wr_row(end_of_wr_row),
    .we_rdFIFO(we_rdFIFO), .re_wrFIFO(re_wrFIFO),
    .sd_ras(sd_ras_n), .sd_cas(sd_cas_n), .sd_we(sd_we_n), .sd_cke(sd_cke),
    .start_cntr_end(start_cntr_end), .ar_cntr_end(ar_cntr_end),
    .refresh_cntr_end(refresh_cntr_end), .ar_cycles_cntr_end(ar_cycles_cntr_end),
    .ras_cntr_end(ras_cntr_end),
    .ar_cntr_load(ar_cntr_load), .ar_cycles_cntr_ce(ar_cycles_cntr_ce),
    .ras_cntr_load(ras_cntr_load), .refresh_cntr_load(refresh_cntr_load)
  );

  addr_ctrl u_addr (
    .clk(clk), .rst(rst),
    .wrc(wrc), .cs_read_reg(cs_read_reg), .cs_write_reg(cs_write_reg),
    .cs_mode_reg(cs_mode_reg), .data_bus(data_bus),
    .sd_idle(sd_idle), .ce_read(rd_addr_cntr), .ce_write(wr_addr_cntr),
    .read_or_write(read_write), .r_or_c(row_column), .mode(mrs),
    .auto_cs(auto_cs), .pre_all(pre_all),
    .rd_en(rd_en), .wr_en(wr_en),
    .end_read_row(end_of_rd_row), .end_write_row(end_of_wr_row), .cl3(cl3),
    .sd_a(sd_a), .sd_ba(sd_ba), .sd_cs_n(sd_cs_n),
    .read_cntr(read_ptr), .write_cntr(write_ptr)
  );

  data_ctrl u_data (
    .clk(clk), .rst(rst), .cl3(cl3),
    .wr_cmd(re_wrFIFO), .wr_data(wrFIFO_dout),
    .dq_out(sd_dq_out), .dq_oe(sd_dq_oe),
    .rd_cmd(we_rdFIFO), .dq_in(sd_dq_in),
    .rdfifo_wr(rdFIFO_wr), .rdfifo_din(rdFIFO_din)
  );

  a_out_fifo_no_overflow: assert property (@(posedge clk) disable iff (rst) !(rdFIFO_wr && rdFIFO_full));
endmodule
