// data_ctrl: SDRAM data control of the SDRAM FIFO memory block.
//
// Write path: the word at the head of the input FIFO is registered into the
// write-data register together with the output enable when sd_fsm issues a
// WRITE (wr_cmd), so that data and command reach the SDRAM on the same edge.
// Read path: the SDRAM data pins are registered every clock (capture
// register). A READ decided by sd_fsm (rd_cmd) enters a tag shift register.
// The command leaves the command register one clock later, the SDRAM samples
// it on the next edge and returns the data two or three clocks after that, by
// the CAS latency (cl3 = 1: three), into the capture register. A
// multiplexer picks the matching tap of the shift register as the output FIFO
// write strobe (rdfifo_wr), with the capture register as its data.
//
// Timing: rd_cmd in clock t gives rdfifo_wr in clock t+4 (CAS latency 2) or
// t+5 (CAS latency 3); the word is in the FIFO one clock later.
//
// From the design: two parallel registers and a multiplexer choosing a two-
// or three-clock delay by the CAS latency from the address control. This
// implementation's own: the tag shift register and the split of the
// bidirectional data bus into dq_out / dq_oe / dq_in.
module data_ctrl
  import sdfifo_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              cl3,
  // write path
  input  logic              wr_cmd,
  input  logic [WORD_W-1:0] wr_data,
  output logic [WORD_W-1:0] dq_out,
  output logic              dq_oe,
  // read path
  input  logic              rd_cmd,
  input  logic [WORD_W-1:0] dq_in,
  output logic              rdfifo_wr,
  output logic [WORD_W-1:0] rdfifo_din
);
  logic [5:1] tag;    // tag[i] is high i clocks after a READ decision

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      dq_out     <= '0;
      dq_oe      <= 1'b0;
      rdfifo_din <= '0;
      tag        <= '0;
    end else begin
      dq_oe      <= wr_cmd;
      if (wr_cmd) dq_out <= wr_data;
      rdfifo_din <= dq_in;
      tag        <= {tag[4:1], rd_cmd};
    end
  end

  assign rdfifo_wr = cl3 ? tag[5] : tag[4];
endmodule
