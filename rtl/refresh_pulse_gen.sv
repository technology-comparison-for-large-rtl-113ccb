// refresh_pulse_gen: refresh pulse generator of the eDRAM refresh manager.
//
// It divides the ring oscillator's ticks by OSC_DIV into refresh pulses; each
// pulse refreshes one row (one set, all ways) at the row the line pointer
// generator points to. It also counts completed refresh sweeps (one sweep is
// one retention period) and raises time_epoch_o during every TIME_PERIODS-th
// sweep: during that sweep each line's dead-line predictor takes one TIME
// step at its refresh slot, so that TIME = 256 * retention_time as in the
// design. Reusing the refresh timing for the predictor follows the design;
// the epoch-sweep mechanism is this implementation's choice.
//
// Interface:
//   osc_tick_i     ring oscillator tick
//   sweep_done_i   the current pulse targets the last row (from the pointer
//                  generator)
//   pulse_o        one-cycle refresh pulse
//   time_epoch_o   the current sweep advances the predictors
module refresh_pulse_gen #(
  parameter int unsigned OSC_DIV      = 1,
  parameter int unsigned TIME_PERIODS = 256
) (
  input  logic clk,
  input  logic rst_n,
  input  logic osc_tick_i,
  input  logic sweep_done_i,
  output logic pulse_o,
  output logic time_epoch_o
);

  localparam int unsigned DIV_W = (OSC_DIV > 1) ? $clog2(OSC_DIV) : 1;
  localparam int unsigned PER_W = (TIME_PERIODS > 1) ? $clog2(TIME_PERIODS) : 1;

  logic [DIV_W-1:0] div_q;
  logic [PER_W-1:0] period_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_q   <= '0;
      pulse_o <= 1'b0;
    end else begin
      pulse_o <= 1'b0;
      if (osc_tick_i) begin
        if (div_q == DIV_W'(OSC_DIV - 1)) begin
          div_q   <= '0;
          pulse_o <= 1'b1;
        end else begin
          div_q <= div_q + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      period_q <= '0;
    else if (sweep_done_i)
      period_q <= (period_q == PER_W'(TIME_PERIODS - 1)) ? '0 : period_q + 1'b1;
  end

  assign time_epoch_o = (period_q == PER_W'(TIME_PERIODS - 1));

endmodule
