// line_pointer_gen: cache line pointer generator of the eDRAM refresh manager.
//
// It holds the row (set index) that the next refresh pulse refreshes and
// steps it by one on every pulse, wrapping after ROWS rows, so that one sweep
// of ROWS pulses refreshes every row once. The pointer drives the row decoder
// of every way's data array. Sequential order is this implementation's choice.
//
// Interface:
//   pulse_i        refresh pulse
//   row_o          row refreshed by a pulse in this cycle
//   sweep_done_o   pulse_i targets the last row (end of a sweep)
module line_pointer_gen #(
  parameter int unsigned ROWS = 2048
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    pulse_i,
  output logic [$clog2(ROWS)-1:0] row_o,
  output logic                    sweep_done_o
);

  localparam int unsigned ROW_W = $clog2(ROWS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      row_o <= '0;
    else if (pulse_i)
      row_o <= (row_o == ROW_W'(ROWS - 1)) ? '0 : row_o + 1'b1;
  end

  assign sweep_done_o = pulse_i && (row_o == ROW_W'(ROWS - 1));

endmodule
