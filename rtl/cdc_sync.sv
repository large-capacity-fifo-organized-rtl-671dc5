// cdc_sync: two-flop synchroniser for a single level signal.
//
// d is a level (here always a toggle flag) from another clock domain; q
// follows it two rising edges of clk later. Reset clears both stages.
module cdc_sync (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);
  logic meta;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
