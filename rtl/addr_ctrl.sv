// addr_ctrl: SDRAM address control of the SDRAM FIFO memory block.
//
// Holds the two stream pointers of the FIFO-organised memory. The host writes
// a 25-bit start address into read_regs (cs_read_reg) or write_regs
// (cs_write_reg) with the strobe wrc on clk. A small state machine per stream
// then loads the start address into its counter (read_cntr / write_cntr) as
// soon as the SDRAM controller is idle and from then on enables the stream
// (rd_en / wr_en): the controller serves a stream only after its start
// address has been written. Each counter advances by one 32-bit word on
// ce_read / ce_write; end_read_row / end_write_row mark the last column of a
// row. Each pointer is built as a 9-bit column counter and a 16-bit counter
// for chip select, bank and row that steps when the column wraps, which keeps
// the carry chain short; together they count through all 2^25 words and wrap
// to zero at the top.
//
// The selected counter (read_or_write = 1 selects the read counter) is split
// as [24:23] chip select (decoded to four active-low selects, or all of them
// with auto_cs), [22:21] bank, [20:9] row and [8:0] column. The address pins
// A[11:0] carry the row (r_or_c = 1), the column with A10 low, the mode
// register (mode = 1) or A10 high for a precharge of all banks (pre_all = 1).
// The 12-bit mode register, written from data_bus[11:0] with cs_mode_reg,
// gives the CAS latency (bits 6:4) to the data path as cl3.
//
// Timing: sd_a, sd_ba and sd_cs_n are registered (one clk after the select
// inputs), in step with the command registers of sd_fsm.
//
// From the design: the register/counter/FSM structure, the 25-bit address and
// its field split, the CS decoder, the row/column and mode multiplexers and
// the mode register giving the CAS latency, and the 9-bit plus 16-bit
// counter split. This implementation's own: the
// host strobe protocol, the load-when-idle rule, the precharge-all input and
// the registered outputs.
module addr_ctrl
  import sdfifo_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  // host interface
  input  logic               wrc,
  input  logic               cs_read_reg,
  input  logic               cs_write_reg,
  input  logic               cs_mode_reg,
  input  logic [ADDR_W-1:0]  data_bus,
  // from sd_fsm
  input  logic               sd_idle,
  input  logic               ce_read,
  input  logic               ce_write,
  input  logic               read_or_write,
  input  logic               r_or_c,
  input  logic               mode,
  input  logic               auto_cs,
  input  logic               pre_all,
  // to sd_fsm / data path
  output logic               rd_en,
  output logic               wr_en,
  output logic               end_read_row,
  output logic               end_write_row,
  output logic               cl3,
  // SDRAM pins
  output logic [11:0]        sd_a,
  output logic [BA_W-1:0]    sd_ba,
  output logic [NCS-1:0]     sd_cs_n,
  // current pointers (observation)
  output logic [ADDR_W-1:0]  read_cntr,
  output logic [ADDR_W-1:0]  write_cntr
);
  typedef enum logic [1:0] {P_OFF, P_LOAD, P_RUN} ptr_state_e;

  logic [ADDR_W-1:0] read_regs, write_regs;
  logic [11:0]       mode_reg;
  ptr_state_e        rd_state, wr_state;

  // host registers
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      read_regs  <= '0;
      write_regs <= '0;
      mode_reg   <= MODE_DEFAULT;
    end else if (wrc) begin
      if (cs_read_reg)  read_regs  <= data_bus;
      if (cs_write_reg) write_regs <= data_bus;
      if (cs_mode_reg)  mode_reg   <= data_bus[11:0];
    end
  end

  // read pointer FSM and counter
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      rd_state  <= P_OFF;
      read_cntr <= '0;
    end else if (wrc && cs_read_reg) begin
      rd_state <= P_LOAD;
    end else begin
      unique case (rd_state)
        P_OFF:  ;
        P_LOAD: if (sd_idle) begin
                  read_cntr <= read_regs;
                  rd_state  <= P_RUN;
                end
        P_RUN:  if (ce_read) begin
                  read_cntr[COL_W-1:0] <= read_cntr[COL_W-1:0] + 1'b1;
                  if (end_read_row)
                    read_cntr[ADDR_W-1:COL_W] <= read_cntr[ADDR_W-1:COL_W] + 1'b1;
                end
        default: rd_state <= P_OFF;
      endcase
    end
  end

  // write pointer FSM and counter
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wr_state   <= P_OFF;
      write_cntr <= '0;
    end else if (wrc && cs_write_reg) begin
      wr_state <= P_LOAD;
    end else begin
      unique case (wr_state)
        P_OFF:  ;
        P_LOAD: if (sd_idle) begin
                  write_cntr <= write_regs;
                  wr_state   <= P_RUN;
                end
        P_RUN:  if (ce_write) begin
                  write_cntr[COL_W-1:0] <= write_cntr[COL_W-1:0] + 1'b1;
                  if (end_write_row)
                    write_cntr[ADDR_W-1:COL_W] <= write_cntr[ADDR_W-1:COL_W] + 1'b1;
                end
        default: wr_state <= P_OFF;
      endcase
    end
  end

  assign rd_en         = (rd_state == P_RUN);
  assign wr_en         = (wr_state == P_RUN);
  assign end_read_row  = &read_cntr[COL_W-1:0];
  assign end_write_row = &write_cntr[COL_W-1:0];
  assign cl3           = (mode_reg[6:4] == 3'd3);

  // address multiplexers and chip-select decoder
  logic [ADDR_W-1:0] addr;
  logic [11:0]       a_next;
  logic [NCS-1:0]    cs_next;

  assign addr = read_or_write ? read_cntr : write_cntr;

  always_comb begin
    if (mode)         a_next = mode_reg;
    else if (pre_all) a_next = 12'h400;
    else if (r_or_c)  a_next = addr[COL_W +: ROW_W];
    else              a_next = {3'b000, addr[COL_W-1:0]};
    cs_next = '1;
    if (auto_cs) cs_next = '0;
    else         cs_next[addr[ADDR_W-1 -: CSEL_W]] = 1'b0;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sd_a    <= '0;
      sd_ba   <= '0;
      sd_cs_n <= '1;
    end else begin
      sd_a    <= a_next;
      sd_ba   <= mode ? '0 : addr[COL_W+ROW_W +: BA_W];
      sd_cs_n <= cs_next;
    end
  end
endmodule
