// sync_fifo: single-clock first-in first-out buffer, 16 words of 32 bits by
// default, as used twice in the SDRAM FIFO memory block (between the input
// block and the SDRAM data path, and between the SDRAM data path and the
// output block).
//
// The storage is a dual-port array written at wr_ptr and read at rd_ptr. The
// read port is show-ahead: dout always shows the oldest word while empty is
// low, and rd_en removes it at the next rising edge. An up/down counter holds
// the number of stored words and gives full, empty and almost_full; the
// almost_full level AF_LEVEL lets a producer with several words in flight stop
// early. A write while full and a read while empty are ignored (and flagged
// by assertions). The depth and width are those of the design's two
// dual-port RAMs; the show-ahead read port and the almost_full flag are this
// implementation's choice.
module sync_fifo #(
  parameter int unsigned DEPTH    = 16,
  parameter int unsigned WIDTH    = 32,
  parameter int unsigned AF_LEVEL = 16
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           wr_en,
  input  logic [WIDTH-1:0]               din,
  input  logic                           rd_en,
  output logic [WIDTH-1:0]               dout,
  output logic                           full,
  output logic                           empty,
  output logic                           almost_full,
  output logic [$clog2(DEPTH+1)-1:0]     count
);
  localparam int unsigned PW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign full        = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign empty       = (count == '0);
  assign almost_full = (count >= AF_LEVEL[$clog2(DEPTH+1)-1:0]);
  assign do_wr       = wr_en && !full;
  assign do_rd       = rd_en && !empty;
  assign dout        = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= (wr_ptr == PW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= (rd_ptr == PW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(rd_en && empty));
endmodule
