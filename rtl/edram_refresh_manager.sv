// edram_refresh_manager: the eDRAM refresh manager.
//
// A chain of ring oscillator -> refresh pulse generator -> cache line pointer
// generator, as in the design. The temperature sensor's reading sets the
// oscillator's rate; each refresh pulse names one row (set) to refresh in
// every bank and way, and a flag telling whether this sweep is a TIME step
// for the dead-line predictors. One manager serves all banks; sharing it is
// this implementation's choice.
//
// Interface:
//   temp_c_i     temperature in degrees C
//   ref_valid_o  one-cycle refresh request
//   ref_row_o    row to refresh
//   ref_epoch_o  the request belongs to a TIME-step sweep
//
// Timing at the defaults: one request every 19 cycles at 75 C; a full sweep
// of 2048 rows every 38912 cycles (19.5 us at 2 GHz); TIME every 256 sweeps.
module edram_refresh_manager #(
  parameter int unsigned ROWS          = 2048,
  parameter int unsigned PERIOD_AT_REF = 19,
  parameter int unsigned REF_TEMP_C    = 75,
  parameter int unsigned OSC_DIV       = 1,
  parameter int unsigned TIME_PERIODS  = 256
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [7:0]              temp_c_i,
  output logic                    ref_valid_o,
  output logic [$clog2(ROWS)-1:0] ref_row_o,
  output logic                    ref_epoch_o
);

  logic osc_tick, sweep_done;

  ring_oscillator #(
    .PERIOD_AT_REF(PERIOD_AT_REF),
    .REF_TEMP_C   (REF_TEMP_C)
  ) u_osc (
    .clk     (clk),
    .rst_n   (rst_n),
    .temp_c_i(temp_c_i),
    .tick_o  (osc_tick)
  );

  refresh_pulse_gen #(
    .OSC_DIV     (OSC_DIV),
    .TIME_PERIODS(TIME_PERIODS)
  ) u_pulse (
    .clk         (clk),
    .rst_n       (rst_n),
    .osc_tick_i  (osc_tick),
    .sweep_done_i(sweep_done),
    .pulse_o     (ref_valid_o),
    .time_epoch_o(ref_epoch_o)
  );

  line_pointer_gen #(
    .ROWS(ROWS)
  ) u_ptr (
    .clk         (clk),
    .rst_n       (rst_n),
    .pulse_i     (ref_valid_o),
    .row_o       (ref_row_o),
    .sweep_done_o(sweep_done)
  );

endmodule
