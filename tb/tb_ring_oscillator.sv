// tb_ring_oscillator: counts oscillator ticks at 75 C and 95 C and compares
// the counts with cycles * T / (75 * 19); also checks the tick spacing at
// 75 C is exactly 19 cycles.
module tb_ring_oscillator;
  logic clk = 0, rst_n = 0, tick;
  logic [7:0] temp;
  int checks = 0, failures = 0;

  ring_oscillator dut (.clk(clk), .rst_n(rst_n), .temp_c_i(temp), .tick_o(tick));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(int t, int cycles);
    int n = 0, last = -1, gaps_ok = 1;
    temp = 8'(t);
    rst_n = 0; @(posedge clk); rst_n = 1;
    for (int c = 0; c < cycles; c++) begin
      @(posedge clk);
      if (tick) begin
        if (t == 75 && last >= 0 && c - last != 19) gaps_ok = 0;
        last = c; n++;
      end
    end
    begin
      int exp = cycles * t / (75 * 19);
      check(n >= exp - 1 && n <= exp + 1, $sformatf("%0d C: %0d ticks, expected about %0d", t, n, exp));
    end
    if (t == 75) check(gaps_ok == 1, "ticks are 19 cycles apart at 75 C");
  endtask

  initial begin
    temp = 75;
    measure(75, 19000);
    measure(95, 19000);
    measure(45, 19000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
