// tb_refresh_pulse_gen: drives oscillator ticks and sweep-end marks into the
// pulse generator (divide by 3, TIME of 4 sweeps) and checks the number of
// pulses and that the TIME epoch flag is up during exactly every 4th sweep.
module tb_refresh_pulse_gen;
  logic clk = 0, rst_n = 0, osc, sweep_done, pulse, epoch;
  int checks = 0, failures = 0;
  localparam int ROWS = 5;

  refresh_pulse_gen #(.OSC_DIV(3), .TIME_PERIODS(4)) dut (
    .clk(clk), .rst_n(rst_n), .osc_tick_i(osc), .sweep_done_i(sweep_done),
    .pulse_o(pulse), .time_epoch_o(epoch));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference row counter in the bench, standing in for the pointer generator
  int row = 0, sweep = 0, ticks = 0, pulses = 0;
  assign sweep_done = pulse && row == ROWS - 1;
  always @(posedge clk)
    if (rst_n && pulse) begin
      if (row == ROWS - 1) begin row <= 0; sweep <= sweep + 1; end
      else row <= row + 1;
    end

  initial begin
    osc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      if (pulse) begin
        pulses++;
        check(epoch == ((sweep % 4) == 3), $sformatf("epoch=%0b in sweep %0d", epoch, sweep));
      end
      osc = ($urandom_range(0, 2) == 0);
      if (osc) ticks++;
      @(posedge clk);
    end
    @(negedge clk);
    check(pulses == ticks / 3 || pulses == (ticks - 1) / 3 || pulses == (ticks - 2) / 3,
          $sformatf("%0d pulses from %0d ticks", pulses, ticks));
    check(sweep >= 8, "at least two TIME periods were seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
