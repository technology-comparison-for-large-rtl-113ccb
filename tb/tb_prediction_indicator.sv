// tb_prediction_indicator: exhaustive check of the prediction indicator's
// next-state logic, then a run of false predictions that must reach I6 after
// six steps and stay there.
module tb_prediction_indicator;
  import l3c_pkg::*;

  ind_state_e ind, nx;
  logic f, t;
  int checks = 0, failures = 0;

  prediction_indicator dut (.ind_i(ind), .false_i(f), .true_i(t), .ind_o(nx));

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 7; i++)
      for (int b = 0; b < 4; b++) begin
        int exp;
        ind = ind_state_e'(i); {f, t} = 2'(b); #1;
        if (i == 6)      exp = 6;
        else if (f)      exp = i + 1;
        else if (t)      exp = (i == 0) ? 0 : i - 1;
        else             exp = i;
        check(int'(nx) == exp, $sformatf("I%0d f=%0b t=%0b -> %0d, expected %0d", i, f, t, nx, exp));
      end
    ind = I0; f = 1; t = 0;
    for (int k = 0; k < 8; k++) begin #1; ind = nx; end
    check(ind == I6, "eight false predictions end in I6");
    f = 0; t = 1; #1;
    check(nx == I6, "I6 ignores true predictions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
