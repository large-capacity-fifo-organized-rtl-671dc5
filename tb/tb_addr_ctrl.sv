// tb_addr_ctrl: self-checking test of the SDRAM address control.
//
// Checks the start-address protocol (a stream is enabled only after its
// start address is written and the controller is idle), both counters
// (increment, end of row at column 511, carry into the next row, bank and
// chip select), the registered address pins for row, column, mode register
// and precharge-all selections, the chip-select decoder and auto_cs, and the
// CAS latency taken from the mode register. Expected pin values are computed
// from the field split: [24:23] chip, [22:21] bank, [20:9] row, [8:0] column.
`timescale 1ns/1ps
module tb_addr_ctrl;
  logic clk = 0, rst = 0;
  logic wrc = 0, cs_read_reg = 0, cs_write_reg = 0, cs_mode_reg = 0;
  logic [24:0] data_bus = 0;
  logic sd_idle = 0, ce_read = 0, ce_write = 0, read_or_write = 0, r_or_c = 0;
  logic mode = 0, auto_cs = 0, pre_all = 0;
  logic rd_en, wr_en, end_read_row, end_write_row, cl3;
  logic [11:0] sd_a;
  logic [1:0] sd_ba;
  logic [3:0] sd_cs_n;
  logic [24:0] read_cntr, write_cntr;

  always #5 clk = ~clk;

  addr_ctrl dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic host(input logic r, input logic w, input logic m, input logic [24:0] v);
    @(negedge clk);
    wrc = 1; cs_read_reg = r; cs_write_reg = w; cs_mode_reg = m; data_bus = v;
    @(negedge clk);
    wrc = 0; cs_read_reg = 0; cs_write_reg = 0; cs_mode_reg = 0; data_bus = '0;
  endtask

  // drive the selects for one cycle and check the registered pins after it
  task automatic pins(input logic rw, input logic rc, input logic md, input logic pa, input logic ac,
                      input logic [24:0] ptr, input string what);
    logic [11:0] ea;
    logic [3:0]  ecs;
    @(negedge clk);
    read_or_write = rw; r_or_c = rc; mode = md; pre_all = pa; auto_cs = ac;
    @(negedge clk);
    ea  = md ? 12'h020 : pa ? 12'h400 : rc ? ptr[20:9] : {3'b000, ptr[8:0]};
    ecs = ac ? 4'b0000 : ~(4'b0001 << ptr[24:23]);
    check(sd_a == ea, $sformatf("%s: A %h vs %h", what, sd_a, ea));
    check(sd_cs_n == ecs, $sformatf("%s: CS %b vs %b", what, sd_cs_n, ecs));
    if (!md) check(sd_ba == ptr[22:21], $sformatf("%s: BA", what));
    read_or_write = 0; r_or_c = 0; mode = 0; pre_all = 0; auto_cs = 0;
  endtask

  initial begin
    logic [24:0] wp, rp;
    #1 rst = 1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    check(!rd_en && !wr_en, "streams off after reset");
    check(sd_cs_n == 4'b1111, "no chip selected after reset");
    check(!cl3, "CAS latency 2 by default");

    wp = {2'd2, 2'd1, 12'hABC, 9'd509};
    rp = {2'd1, 2'd3, 12'h123, 9'd7};
    host(0, 1, 0, wp);
    repeat (3) @(negedge clk);
    check(!wr_en, "write stream waits for idle");
    sd_idle = 1;
    @(negedge clk);
    check(wr_en && write_cntr == wp, "write pointer loaded at idle");
    check(!rd_en, "read stream still off");
    host(1, 0, 0, rp);
    @(negedge clk);
    check(rd_en && read_cntr == rp, "read pointer loaded");
    sd_idle = 0;

    pins(0, 1, 0, 0, 0, wp, "write row");
    pins(0, 0, 0, 0, 0, wp, "write column");
    pins(1, 1, 0, 0, 0, rp, "read row");
    pins(1, 0, 0, 0, 0, rp, "read column");
    pins(0, 0, 0, 1, 1, wp, "precharge all");
    pins(0, 0, 1, 0, 1, wp, "mode register");

    // write counter across the end of a row
    for (int i = 0; i < 5; i++) begin
      check(end_write_row == (wp[8:0] == 9'd511), $sformatf("end_write_row at column %0d", wp[8:0]));
      @(negedge clk); ce_write = 1;
      @(negedge clk); ce_write = 0;
      wp++;
      check(write_cntr == wp, "write counter increment");
      check(read_cntr == rp, "read counter unchanged");
    end
    pins(0, 1, 0, 0, 0, wp, "next row");

    // read counter across the end of a chip select region
    host(1, 0, 0, 25'h0FF_FFFE);
    sd_idle = 1; @(negedge clk); sd_idle = 0;
    rp = 25'h0FF_FFFE;
    check(read_cntr == rp, "read pointer reloaded");
    for (int i = 0; i < 3; i++) begin
      check(end_read_row == (rp[8:0] == 9'd511), "end_read_row");
      @(negedge clk); ce_read = 1;
      @(negedge clk); ce_read = 0;
      rp++;
      check(read_cntr == rp, "read counter increment");
    end
    pins(1, 1, 0, 0, 0, rp, "chip 2 row");

    // mode register: CAS latency 3
    host(0, 0, 1, 25'h030);
    check(cl3, "CAS latency 3 after mode write");
    @(negedge clk); mode = 1; auto_cs = 1;
    @(negedge clk);
    check(sd_a == 12'h030, "mode register on address pins");
    mode = 0; auto_cs = 0;

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
