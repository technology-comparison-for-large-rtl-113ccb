// tb_dead_line_predictor: exhaustive check of the dead-line predictor's
// next-state logic against a reference table of its state diagram, then a
// walk of one line from S0 through the intermediate states to dead and
// disabled for every indicator value, counting the TIME steps it takes
// (indicator I0 -> 1 step to dead, I1 -> 2, ..., I5 -> 6).
module tb_dead_line_predictor;
  import l3c_pkg::*;

  pred_state_e st, nx;
  ind_state_e  ind;
  logic access, slot, epoch, skip, dis;
  int checks = 0, failures = 0;

  dead_line_predictor dut (
    .state_i(st), .ind_i(ind), .access_i(access),
    .refresh_slot_i(slot), .time_epoch_i(epoch),
    .state_o(nx), .skip_refresh_o(skip), .disable_o(dis)
  );

  // Reference: the diagram's edges.
  function automatic pred_state_e ref_next(int s, int i, bit a, bit sl, bit ep);
    int entry [6] = '{1, 3, 4, 5, 6, 7};      // S0 -> by indicator I0..I5
    int chain [8] = '{0, 2, 2, 1, 3, 4, 5, 6}; // S7->S6 ... S3->S1, S1->S2
    if (a) return S0;
    if (!sl || i == 6) return pred_state_e'(s);
    if (s == 1) return S2;
    if (s == 2) return S2;
    if (!ep) return pred_state_e'(s);
    if (s == 0) return pred_state_e'(entry[i]);
    return pred_state_e'(chain[s]);
  endfunction

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
    for (int s = 0; s < 8; s++)
      for (int i = 0; i < 7; i++)
        for (int b = 0; b < 8; b++) begin
          bit exp_skip, exp_dis;
          pred_state_e exp;
          exp_skip = 0; exp_dis = 0;
          st = pred_state_e'(s); ind = ind_state_e'(i);
          {access, slot, epoch} = 3'(b);
          #1;
          exp      = ref_next(s, i, access, slot, epoch);
          exp_dis  = !access && slot && i != 6 && s == 1;
          exp_skip = !access && slot && ((i != 6 && s == 1) || s == 2);
          check(nx == exp, $sformatf("next s=%0d i=%0d in=%b got %0d exp %0d", s, i, b, nx, exp));
          check(skip == exp_skip, $sformatf("skip s=%0d i=%0d in=%b", s, i, b));
          check(dis == exp_dis, $sformatf("disable s=%0d i=%0d in=%b", s, i, b));
        end

    // TIME steps to the dead state for each indicator value
    for (int i = 0; i < 6; i++) begin
      int steps;
      steps = 0;
      st = S0; ind = ind_state_e'(i); access = 0; slot = 1; epoch = 1;
      while (st != S1 && steps < 10) begin
        #1; st = nx; steps++;
      end
      check(steps == i + 1, $sformatf("I%0d: %0d TIME steps to dead, expected %0d", i, steps, i + 1));
      // an access while predicted dead revives the line
      access = 1; #1; check(nx == S0, "access revives a dead line");
      access = 0; epoch = 0; #1;
      check(nx == S2 && skip && dis, "dead line is disabled at its next refresh slot");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
