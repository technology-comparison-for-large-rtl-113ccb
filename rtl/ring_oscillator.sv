// ring_oscillator: behavioural model of the temperature-dependent ring
// oscillator of the eDRAM refresh manager.
//
// The real part is an analog ring of inverters whose frequency rises with
// temperature, following the eDRAM cells' retention time, which shortens as
// the die heats. This model stands in for it with a phase accumulator clocked
// by the system clock: every cycle it adds the temperature in degrees C and
// emits a tick when the sum passes REF_TEMP_C * PERIOD_AT_REF. The tick rate
// is therefore proportional to the temperature, one tick every PERIOD_AT_REF
// cycles at REF_TEMP_C. The rising frequency with temperature follows the
// design; the proportional law and the calibration are this model's own.
//
// Default: 19 cycles per tick at 75 C, so that the 2048 rows of a bank are
// refreshed within the 20 us retention time at 2 GHz (2048 * 19 = 38912
// cycles < 40000).
//
// Interface: temp_c_i is the temperature sensor's reading (degrees C, values
// below 1 count as 1); tick_o is a one-cycle pulse.
module ring_oscillator #(
  parameter int unsigned PERIOD_AT_REF = 19,
  parameter int unsigned REF_TEMP_C    = 75
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] temp_c_i,
  output logic       tick_o
);

  localparam int unsigned THRESH = REF_TEMP_C * PERIOD_AT_REF;
  localparam int unsigned ACC_W  = $clog2(THRESH + 256) + 1;

  logic [ACC_W-1:0] acc_q, acc_sum;
  logic [7:0]       step;

  assign step    = (temp_c_i == 8'd0) ? 8'd1 : temp_c_i;
  assign acc_sum = acc_q + ACC_W'(step);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q  <= '0;
      tick_o <= 1'b0;
    end else if (acc_sum >= ACC_W'(THRESH)) begin
      acc_q  <= acc_sum - ACC_W'(THRESH);
      tick_o <= 1'b1;
    end else begin
      acc_q  <= acc_sum;
      tick_o <= 1'b0;
    end
  end

endmodule
