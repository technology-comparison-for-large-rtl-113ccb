// tb_line_pointer_gen: random pulses into a 6-row pointer generator; checks
// the row sequence 0,1,..,5,0,.. and that sweep_done marks row 5 only.
module tb_line_pointer_gen;
  localparam int ROWS = 6;
  logic clk = 0, rst_n = 0, pulse, done;
  logic [$clog2(ROWS)-1:0] row;
  int checks = 0, failures = 0, exp_row = 0;

  line_pointer_gen #(.ROWS(ROWS)) dut (.clk(clk), .rst_n(rst_n), .pulse_i(pulse),
                                       .row_o(row), .sweep_done_o(done));

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

  initial begin
    pulse = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 500; c++) begin
      @(negedge clk);
      pulse = $urandom_range(0, 1);
      #1;
      check(int'(row) == exp_row, $sformatf("row %0d, expected %0d", row, exp_row));
      check(done == (pulse && exp_row == ROWS - 1), "sweep_done");
      if (pulse) exp_row = (exp_row + 1) % ROWS;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
