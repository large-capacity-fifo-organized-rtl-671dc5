// sd_timers: timing counters of the SDRAM controller.
//
// Five counters give the waits the SDRAM command state machine (sd_fsm)
// needs, each reporting its end on a *_end output:
//   start_cntr      counts INIT_CYCLES clocks after reset (power-up pause
//                   before the first command); its end stays high.
//   refresh_cntr    10-bit down counter; refresh_cntr_load reloads it with
//                   REFRESH_CYCLES-1, and refresh_cntr_end stays high from
//                   zero until the next load (a refresh is due).
//   ar_cntr         4-bit down counter, loaded with AR_WAIT by ar_cntr_load;
//                   ends at zero (wait after an auto refresh, tRC).
//   ar_cycles_cntr  4-bit up counter of the auto refreshes of the start-up
//                   sequence (ar_cycles_cntr_ce); ends at AR_INIT_COUNT.
//   ras_cntr        4-bit down counter, loaded with RAS_WAIT by
//                   ras_cntr_load; ends at zero (tRCD, tRP, tWR/tRAS waits).
// A state that loads a down counter with N and then waits for its end issues
// the next command N+2 clocks after its own.
//
// The counter names and their end/load/enable signals are those of the
// design's SDRAM state machine; the widths follow the design's counter list
// (10-bit and 4-bit down counters). The cycle counts are this
// implementation's, for a 100 MHz clock and a -75 speed grade SDR SDRAM.
module sd_timers #(
  parameter int unsigned INIT_CYCLES    = 20000, // 200 us at 100 MHz
  parameter int unsigned REFRESH_CYCLES = 780,   // 7.8 us at 100 MHz
  parameter int unsigned AR_WAIT        = 5,     // REF to next command: 7 clocks
  parameter int unsigned RAS_WAIT       = 1,     // 3 clocks between commands
  parameter int unsigned AR_INIT_COUNT  = 8      // auto refreshes at start-up
) (
  input  logic clk,
  input  logic rst,
  input  logic refresh_cntr_load,
  input  logic ar_cntr_load,
  input  logic ar_cycles_cntr_ce,
  input  logic ras_cntr_load,
  output logic start_cntr_end,
  output logic refresh_cntr_end,
  output logic ar_cntr_end,
  output logic ar_cycles_cntr_end,
  output logic ras_cntr_end
);
  localparam int unsigned SW = $clog2(INIT_CYCLES + 1);

  logic [SW-1:0] start_cntr;
  logic [9:0]    refresh_cntr;
  logic [3:0]    ar_cntr, ar_cycles_cntr, ras_cntr;

  assign start_cntr_end     = (start_cntr == SW'(INIT_CYCLES));
  assign refresh_cntr_end   = (refresh_cntr == '0);
  assign ar_cntr_end        = (ar_cntr == '0);
  assign ar_cycles_cntr_end = (ar_cycles_cntr == 4'(AR_INIT_COUNT));
  assign ras_cntr_end       = (ras_cntr == '0);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      start_cntr     <= '0;
      refresh_cntr   <= 10'(REFRESH_CYCLES - 1);
      ar_cntr        <= '0;
      ar_cycles_cntr <= '0;
      ras_cntr       <= '0;
    end else begin
      if (!start_cntr_end) start_cntr <= start_cntr + 1'b1;

      if (refresh_cntr_load)     refresh_cntr <= 10'(REFRESH_CYCLES - 1);
      else if (!refresh_cntr_end) refresh_cntr <= refresh_cntr - 1'b1;

      if (ar_cntr_load)     ar_cntr <= 4'(AR_WAIT);
      else if (!ar_cntr_end) ar_cntr <= ar_cntr - 1'b1;

      if (ar_cycles_cntr_ce && !ar_cycles_cntr_end) ar_cycles_cntr <= ar_cycles_cntr + 1'b1;

      if (ras_cntr_load)     ras_cntr <= 4'(RAS_WAIT);
      else if (!ras_cntr_end) ras_cntr <= ras_cntr - 1'b1;
    end
  end
endmodule
