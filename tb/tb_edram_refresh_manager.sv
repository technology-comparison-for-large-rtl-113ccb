// tb_edram_refresh_manager: 16 rows, 4 cycles per pulse at 75 C, TIME of 3
// sweeps. Checks the pulse spacing (4 cycles at 75 C), the row order, the
// epoch flag in every 3rd sweep, and that 95 C gives more pulses than 75 C.
module tb_edram_refresh_manager;
  localparam int ROWS = 16;
  logic clk = 0, rst_n = 0, v, ep;
  logic [3:0] row;
  logic [7:0] temp;
  int checks = 0, failures = 0;

  edram_refresh_manager #(.ROWS(ROWS), .PERIOD_AT_REF(4), .REF_TEMP_C(75),
                          .OSC_DIV(1), .TIME_PERIODS(3)) dut (
    .clk(clk), .rst_n(rst_n), .temp_c_i(temp),
    .ref_valid_o(v), .ref_row_o(row), .ref_epoch_o(ep));

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

  int n75, n95;
  initial begin
    int last, exp_row, sweep, n;
    temp = 75;
    repeat (2) @(posedge clk);
    rst_n = 1;
    last = -1; exp_row = 0; sweep = 0; n = 0;
    for (int c = 0; c < 4 * ROWS * 7; c++) begin
      @(negedge clk);
      if (v) begin
        if (last >= 0) check(c - last == 4, $sformatf("pulse spacing %0d", c - last));
        check(int'(row) == exp_row, $sformatf("row %0d expected %0d", row, exp_row));
        check(ep == (sweep % 3 == 2), $sformatf("epoch %0b in sweep %0d", ep, sweep));
        last = c; n++;
        if (exp_row == ROWS - 1) begin exp_row = 0; sweep++; end else exp_row++;
      end
    end
    n75 = n;
    check(sweep >= 6, "six sweeps seen");
    temp = 95; n = 0;
    for (int c = 0; c < 4 * ROWS * 7; c++) begin @(negedge clk); if (v) n++; end
    n95 = n;
    check(n95 > n75, $sformatf("95 C gives %0d pulses, 75 C %0d", n95, n75));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
