// sd_fsm: SDRAM command state machine of the SDRAM FIFO memory block.
//
// After reset it waits for the start-up pause (start_cntr_end), precharges
// all banks, issues AR_INIT_COUNT auto refreshes (ar_cycles_cntr) and loads
// the mode register (mrs). In normal operation it keeps the input FIFO
// drained and the output FIFO filled:
//   * a due refresh (refresh_cntr_end) is served first, from idle, on all
//     chips (auto_cs);
//   * otherwise, if the write stream is enabled and the input FIFO holds data
//     (not wrFIFO_e), or the read stream is enabled and the output FIFO has
//     room (not rdFIFO_f), it activates the row of that stream's pointer;
//     when both want service the one not served last goes first;
//   * it then issues one WRITE (re_wrFIFO, wr_addr_cntr) or READ (we_rdFIFO,
//     rd_addr_cntr) per clock, one 32-bit word each (burst length 1), until
//     the FIFO condition ends, the row ends (end_of_wr_row / end_of_rd_row)
//     or a refresh falls due;
//   * it then waits (ras_cntr), precharges all banks and returns to idle.
// Only one row is open at a time, and idle means all banks are precharged.
//
// Interface: row_column (1 = row address), read_write (1 = read pointer),
// mrs (mode register on the address pins) and auto_cs (select all chips)
// steer addr_ctrl; pre_all puts A10 high for a precharge. we_rdFIFO marks a
// READ whose data data_ctrl later writes into the output FIFO. The counter
// handshakes go to sd_timers. sd_ras, sd_cas, sd_we and sd_cke are registered
// and appear one clock after the state that decides them, together with the
// registered address of addr_ctrl.
//
// From the design: the module's role, its name and its port names. This
// implementation's own: the states, the alternating service order, the
// single-word bursts and the refresh pre-emption of a burst.
module sd_fsm
  import sdfifo_pkg::*;
(
  input  logic sd_clk,
  input  logic rst,
  // FIFO flags and stream enables
  input  logic rdFIFO_f,
  input  logic wrFIFO_e,
  input  logic rd_en,
  input  logic wr_en,
  // address control
  output logic row_column,
  output logic read_write,
  output logic rd_addr_cntr,
  output logic wr_addr_cntr,
  output logic mrs,
  output logic auto_cs,
  output logic pre_all,
  output logic sd_idle,
  input  logic end_of_rd_row,
  input  logic end_of_wr_row,
  // FIFO strobes
  output logic we_rdFIFO,
  output logic re_wrFIFO,
  // SDRAM command pins
  output logic sd_ras,
  output logic sd_cas,
  output logic sd_we,
  output logic sd_cke,
  // timers
  input  logic start_cntr_end,
  input  logic ar_cntr_end,
  input  logic refresh_cntr_end,
  input  logic ar_cycles_cntr_end,
  input  logic ras_cntr_end,
  output logic ar_cntr_load,
  output logic ar_cycles_cntr_ce,
  output logic ras_cntr_load,
  output logic refresh_cntr_load
);
  typedef enum logic [4:0] {
    S_INIT_WAIT, S_INIT_PRE, S_INIT_PRE_W, S_INIT_REF, S_INIT_REF_W,
    S_INIT_MRS, S_INIT_MRS_W,
    S_IDLE, S_REF, S_REF_W, S_ACT, S_ACT_W, S_WRITE, S_READ,
    S_REC_W, S_PRE, S_PRE_W
  } sd_state_e;

  sd_state_e state, state_next;
  sd_cmd_e   cmd;
  logic      dir_read, dir_read_next;   // stream of the current row
  logic      want_w, want_r, issue_w, issue_r;

  assign want_w  = wr_en && !wrFIFO_e;
  assign want_r  = rd_en && !rdFIFO_f;
  assign issue_w = (state == S_WRITE) && want_w;
  assign issue_r = (state == S_READ)  && want_r;
  assign sd_idle = (state == S_IDLE);

  always_comb begin
    state_next        = state;
    dir_read_next     = dir_read;
    cmd               = CMD_NOP;
    row_column        = 1'b0;
    read_write        = dir_read;
    mrs               = 1'b0;
    auto_cs           = 1'b0;
    pre_all           = 1'b0;
    rd_addr_cntr      = 1'b0;
    wr_addr_cntr      = 1'b0;
    we_rdFIFO         = 1'b0;
    re_wrFIFO         = 1'b0;
    ar_cntr_load      = 1'b0;
    ar_cycles_cntr_ce = 1'b0;
    ras_cntr_load     = 1'b0;
    refresh_cntr_load = 1'b0;
    unique case (state)
      S_INIT_WAIT: if (start_cntr_end) state_next = S_INIT_PRE;
      S_INIT_PRE: begin
        cmd = CMD_PRE; pre_all = 1'b1; auto_cs = 1'b1; ras_cntr_load = 1'b1;
        state_next = S_INIT_PRE_W;
      end
      S_INIT_PRE_W: if (ras_cntr_end) state_next = S_INIT_REF;
      S_INIT_REF: begin
        cmd = CMD_REF; auto_cs = 1'b1; ar_cntr_load = 1'b1; ar_cycles_cntr_ce = 1'b1;
        state_next = S_INIT_REF_W;
      end
      S_INIT_REF_W: if (ar_cntr_end) state_next = ar_cycles_cntr_end ? S_INIT_MRS : S_INIT_REF;
      S_INIT_MRS: begin
        cmd = CMD_MRS; mrs = 1'b1; auto_cs = 1'b1; ras_cntr_load = 1'b1;
        refresh_cntr_load = 1'b1;
        state_next = S_INIT_MRS_W;
      end
      S_INIT_MRS_W: if (ras_cntr_end) state_next = S_IDLE;
      S_IDLE: begin
        if (refresh_cntr_end) begin
          state_next = S_REF;
        end else if (want_w && (!want_r || dir_read)) begin
          dir_read_next = 1'b0;
          state_next    = S_ACT;
        end else if (want_r) begin
          dir_read_next = 1'b1;
          state_next    = S_ACT;
        end
      end
      S_REF: begin
        cmd = CMD_REF; auto_cs = 1'b1; ar_cntr_load = 1'b1; refresh_cntr_load = 1'b1;
        state_next = S_REF_W;
      end
      S_REF_W: if (ar_cntr_end) state_next = S_IDLE;
      S_ACT: begin
        cmd = CMD_ACT; row_column = 1'b1; ras_cntr_load = 1'b1;
        state_next = S_ACT_W;
      end
      S_ACT_W: if (ras_cntr_end) state_next = dir_read ? S_READ : S_WRITE;
      S_WRITE: begin
        if (issue_w) begin
          cmd = CMD_WRITE; re_wrFIFO = 1'b1; wr_addr_cntr = 1'b1;
        end
        if (!issue_w || end_of_wr_row || refresh_cntr_end) begin
          ras_cntr_load = 1'b1;
          state_next    = S_REC_W;
        end
      end
      S_READ: begin
        if (issue_r) begin
          cmd = CMD_READ; we_rdFIFO = 1'b1; rd_addr_cntr = 1'b1;
        end
        if (!issue_r || end_of_rd_row || refresh_cntr_end) begin
          ras_cntr_load = 1'b1;
          state_next    = S_REC_W;
        end
      end
      S_REC_W: if (ras_cntr_end) state_next = S_PRE;
      S_PRE: begin
        cmd = CMD_PRE; pre_all = 1'b1; auto_cs = 1'b1; ras_cntr_load = 1'b1;
        state_next = S_PRE_W;
      end
      S_PRE_W: if (ras_cntr_end) state_next = S_IDLE;
      default: state_next = S_INIT_WAIT;
    endcase
  end

  always_ff @(posedge sd_clk or posedge rst) begin
    if (rst) begin
      state    <= S_INIT_WAIT;
      dir_read <= 1'b0;
      {sd_ras, sd_cas, sd_we} <= CMD_NOP;
      sd_cke   <= 1'b0;
    end else begin
      state    <= state_next;
      dir_read <= dir_read_next;
      {sd_ras, sd_cas, sd_we} <= cmd;
      sd_cke   <= 1'b1;
    end
  end

  a_one_stream: assert property (@(posedge sd_clk) disable iff (rst) !(re_wrFIFO && we_rdFIFO));
endmodule
