// input_block: input side of the SDRAM FIFO memory block.
//
// Byte registers collect four 8-bit writes from the input stream; a 2-bit
// counter clocked by the write strobe wr selects the register that takes
// data_in, starting with reg0 (the least significant byte) after reset. The
// fourth byte is written, together with reg2..reg0, straight into a 32-bit
// word register (it plays the part of reg3), and the data_ready flag (a
// toggle in the wr domain) tells the state machine in the clk domain to write
// that word into the input FIFO (wr_fifo). The word register frees reg0..reg2
// at once, so the next word's first three bytes are taken while the previous
// word crosses into the clk domain. wr_ready is low only when the fourth byte
// of a word is due while the previous word is still waiting for the FIFO, so
// a full FIFO stalls the writer. A byte written while wr_ready is low is
// dropped.
//
// Interface: wr is the external write strobe and the clock of the byte
// registers (each rising edge with wr_ready high stores data_in). The FIFO
// read side (fifo_rd, fifo_dout, fifo_empty) faces the SDRAM controller and
// runs on clk; fifo_full is brought out as well.
//
// Timing: a completed word reaches the FIFO 3 to 4 clk cycles after the
// fourth wr edge (two synchroniser stages and the state machine), later if
// the FIFO is full. With clk at 100 MHz this keeps up with a byte strobe of
// 30 MHz and more: wr_ready stays high as long as the FIFO has room.
//
// From the design: the register/counter/FSM/FIFO structure, byte order, the
// reset start at the LSB register and the wr_ready handshake. This
// implementation's own: the toggle handshake across the clock domains, the
// word register taking the place of reg3 (so the writer need not wait for
// each word to cross clock domains) and the dropping of bytes written while
// not ready.
module input_block
  import sdfifo_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst,
  // input stream
  input  logic              wr,
  input  logic [BYTE_W-1:0] data_in,
  output logic              wr_ready,
  // input FIFO read side (SDRAM controller)
  input  logic              fifo_rd,
  output logic [WORD_W-1:0] fifo_dout,
  output logic              fifo_empty,
  output logic              fifo_full
);
  typedef enum logic [0:0] {S_IDLE, S_STORE} in_state_e;

  // ---- wr domain: byte registers, counter and word register ----
  logic [BYTE_W-1:0] regs [3];    // reg0..reg2
  logic [WORD_W-1:0] word_q;      // completed word, reg3 merged in
  logic [1:0]        byte_cnt;
  logic              ready_tog;   // data_ready: toggles once per completed word
  logic              ack_tog;     // clk domain: toggles once per stored word
  logic              pending;

  assign pending  = (ready_tog != ack_tog);
  assign wr_ready = !(pending && byte_cnt == 2'd3);

  always_ff @(posedge wr or posedge rst) begin
    if (rst) begin
      byte_cnt  <= '0;
      ready_tog <= 1'b0;
    end else if (wr_ready) begin
      byte_cnt <= byte_cnt + 1'b1;
      if (byte_cnt == 2'd3) ready_tog <= ~ready_tog;
    end
  end

  always_ff @(posedge wr) begin
    if (wr_ready) begin
      if (byte_cnt == 2'd3) word_q <= {data_in, regs[2], regs[1], regs[0]};
      else                  regs[byte_cnt] <= data_in;
    end
  end

  // ---- clk domain: FSM writing the word into the FIFO ----
  logic      ready_s;
  in_state_e state;
  logic      wr_fifo;
  logic      fifo_af_unused;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count_unused;

  cdc_sync u_sync (.clk(clk), .rst(rst), .d(ready_tog), .q(ready_s));

  assign wr_fifo = (state == S_STORE) && !fifo_full;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state   <= S_IDLE;
      ack_tog <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE:  if (ready_s != ack_tog) state <= S_STORE;
        S_STORE: if (!fifo_full) begin
                   ack_tog <= ~ack_tog;
                   state   <= S_IDLE;
                 end
      endcase
    end
  end

  sync_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(WORD_W), .AF_LEVEL(FIFO_DEPTH)) u_fifo (
    .clk         (clk),
    .rst         (rst),
    .wr_en       (wr_fifo),
    .din         (word_q),
    .rd_en       (fifo_rd),
    .dout        (fifo_dout),
    .full        (fifo_full),
    .empty       (fifo_empty),
    .almost_full (fifo_af_unused),
    .count       (fifo_count_unused)
  );
endmodule
