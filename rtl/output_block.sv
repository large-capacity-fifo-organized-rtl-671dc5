// output_block: output side of the SDRAM FIFO memory block.
//
// The state machine (clk domain) moves 32-bit words from the output FIFO into
// a pair of word registers used in turn (ping-pong), filling a register as
// soon as it is free, and tells the output side by toggling that register's
// load flag. On the out_clk side a 2-bit counter selects one byte of the
// current register through a 4-to-1 multiplexer onto data_out, least
// significant byte first. rd_ready is high while data_out holds a valid byte;
// a rising out_clk edge with rd high consumes that byte. After the fourth
// byte the counter toggles that register's new_data flag, which frees it for
// the state machine, and moves on to the other register. The second register
// lets the next word be ready when a word ends, so the reader sees no gap
// while words cross the clock domains.
//
// Interface: out_clk and rd belong to the external reader; the FIFO write
// side (fifo_wr, fifo_din, fifo_full, fifo_almost_full) faces the SDRAM
// controller and runs on clk. fifo_empty is brought out as well.
//
// Timing: a freed register is refilled about 3 clk cycles later and shows up
// 2 out_clk cycles after that, if the FIFO holds a word; with clk at 100 MHz
// a reader at 30 MHz and more is never held up while the FIFO has data. The
// almost_full flag rises at AF_LEVEL words, leaving room for the reads still
// on their way from the SDRAM.
//
// From the design: the FIFO, word register, multiplexer, counter and state
// machine, the independent out_clk for the counter, new_data and rd_ready.
// This implementation's own: the second word register, the toggle handshake
// across the clock domains and the almost_full level.
module output_block
  import sdfifo_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned AF_LEVEL   = 8
) (
  input  logic              clk,
  input  logic              rst,
  // output stream
  input  logic              out_clk,
  input  logic              rd,
  output logic [BYTE_W-1:0] data_out,
  output logic              rd_ready,
  // output FIFO write side (SDRAM controller)
  input  logic              fifo_wr,
  input  logic [WORD_W-1:0] fifo_din,
  output logic              fifo_full,
  output logic              fifo_almost_full,
  output logic              fifo_empty
);
  typedef enum logic [0:0] {S_WAIT, S_LOAD} out_state_e;

  // ---- clk domain: FIFO, word registers and FSM ----
  logic [WORD_W-1:0] word_reg [2];
  logic [WORD_W-1:0] fifo_dout;
  logic [1:0]        load_tog;     // per register: toggles once per load
  logic [1:0]        new_data_s;   // new_data toggles synchronised to clk
  logic              fill_sel;     // register the FSM fills next
  logic              rd_fifo;
  out_state_e        state;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count_unused;

  sync_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(WORD_W), .AF_LEVEL(AF_LEVEL)) u_fifo (
    .clk         (clk),
    .rst         (rst),
    .wr_en       (fifo_wr),
    .din         (fifo_din),
    .rd_en       (rd_fifo),
    .dout        (fifo_dout),
    .full        (fifo_full),
    .empty       (fifo_empty),
    .almost_full (fifo_almost_full),
    .count       (fifo_count_unused)
  );

  // a register is free once its new_data flag has caught up with its load flag
  assign rd_fifo = (state == S_WAIT) && (new_data_s[fill_sel] == load_tog[fill_sel]) && !fifo_empty;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state    <= S_WAIT;
      load_tog <= '0;
      fill_sel <= 1'b0;
    end else begin
      unique case (state)
        S_WAIT: if (rd_fifo) state <= S_LOAD;
        S_LOAD: begin
                  load_tog[fill_sel] <= ~load_tog[fill_sel];
                  fill_sel           <= ~fill_sel;
                  state              <= S_WAIT;
                end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rd_fifo) word_reg[fill_sel] <= fifo_dout;
  end

  // ---- out_clk domain: byte counter and multiplexer ----
  logic [1:0] byte_cnt;
  logic [1:0] new_data;    // per register: toggles once per consumed word
  logic [1:0] load_s;
  logic       out_sel;     // register being read out

  for (genvar i = 0; i < 2; i++) begin : g_sync
    cdc_sync u_sync_load (.clk(out_clk), .rst(rst), .d(load_tog[i]), .q(load_s[i]));
    cdc_sync u_sync_new  (.clk(clk),     .rst(rst), .d(new_data[i]), .q(new_data_s[i]));
  end

  assign rd_ready = (load_s[out_sel] != new_data[out_sel]);

  always_ff @(posedge out_clk or posedge rst) begin
    if (rst) begin
      byte_cnt <= '0;
      new_data <= '0;
      out_sel  <= 1'b0;
    end else if (rd && rd_ready) begin
      byte_cnt <= byte_cnt + 1'b1;
      if (byte_cnt == 2'd3) begin
        new_data[out_sel] <= ~new_data[out_sel];
        out_sel           <= ~out_sel;
      end
    end
  end

  always_comb begin
    unique case (byte_cnt)
      2'd0: data_out = word_reg[out_sel][7:0];
      2'd1: data_out = word_reg[out_sel][15:8];
      2'd2: data_out = word_reg[out_sel][23:16];
      2'd3: data_out = word_reg[out_sel][31:24];
    endcase
  end
endmodule
