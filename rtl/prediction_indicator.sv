// prediction_indicator: next-state logic of a set's dynamic prediction
// indicator.
//
// The indicator (I0..I6, see l3c_pkg) chooses how long a line of the set must
// go unaccessed before it is predicted dead. A false prediction (a tag match
// on a disabled line) moves it one state up, towards longer decay intervals:
// I0 -> I1 -> ... -> I5 -> I6. A true prediction (a disabled line evicted)
// moves it one state down, I5 -> ... -> I1 -> I0, and keeps I0 in I0. I6 has
// no way out but reset: the set's predictors stay off. These transitions are
// the design's indicator state diagram.
//
// Choice made here: if both events come in the same cycle (the bank never
// produces that) the false prediction wins, as the more cautious move.
//
// Interface (purely combinational, one instance per bank, used on the set
// being accessed):
//   ind_i    current indicator
//   false_i  false prediction seen in this set
//   true_i   true prediction seen in this set
//   ind_o    next indicator
module prediction_indicator
  import l3c_pkg::*;
(
  input  ind_state_e ind_i,
  input  logic       false_i,
  input  logic       true_i,
  output ind_state_e ind_o
);

  always_comb begin
    ind_o = ind_i;
    if (ind_i != I6) begin
      if (false_i)
        ind_o = ind_state_e'(ind_i + 3'd1);
      else if (true_i && ind_i != I0)
        ind_o = ind_state_e'(ind_i - 3'd1);
    end
  end

endmodule
