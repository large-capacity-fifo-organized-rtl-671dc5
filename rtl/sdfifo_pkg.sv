// sdfifo_pkg: types and constants shared by the SDRAM FIFO memory block.
//
// The SDRAM command is the 3-bit group {ras_n, cas_n, we_n} sampled by the
// SDRAM on a clock edge while its chip select is low (JEDEC SDR encoding).
// The address split (2 chip-select bits, 2 bank bits, 12 row bits, 9 column
// bits of a 25-bit word address) is the one of the address control figure of
// the design; the command encoding is the standard SDR SDRAM one.
package sdfifo_pkg;

  typedef enum logic [2:0] {
    CMD_MRS   = 3'b000,  // load mode register
    CMD_REF   = 3'b001,  // auto refresh
    CMD_PRE   = 3'b010,  // precharge (A10 = 1: all banks)
    CMD_ACT   = 3'b011,  // activate row
    CMD_WRITE = 3'b100,  // write column
    CMD_READ  = 3'b101,  // read column
    CMD_BST   = 3'b110,  // burst terminate (unused)
    CMD_NOP   = 3'b111   // no operation
  } sd_cmd_e;

  // Word address fields, in 32-bit words.
  localparam int unsigned COL_W  = 9;
  localparam int unsigned ROW_W  = 12;
  localparam int unsigned BA_W   = 2;
  localparam int unsigned CSEL_W = 2;
  localparam int unsigned ADDR_W = COL_W + ROW_W + BA_W + CSEL_W;  // 25
  localparam int unsigned NCS    = 1 << CSEL_W;                    // 4 chip selects

  localparam int unsigned WORD_W = 32;
  localparam int unsigned BYTE_W = 8;

  // Mode register reset value: burst length 1, sequential, CAS latency 2,
  // programmed burst mode on writes.
  localparam logic [11:0] MODE_DEFAULT = 12'h020;

endpackage
