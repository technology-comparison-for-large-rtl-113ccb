// dead_line_predictor: next-state logic of the time-based dead-line predictor
// of one cache line.
//
// Each line carries a three-bit predictor state (S0..S7, see l3c_pkg). A hit
// or an insertion returns the line to S0 (live). Every TIME period (256
// retention periods) the state advances one step: from S0 it jumps to S1 if
// the set's indicator is I0, to S3 if I1, S4 if I2, S5 if I3, S6 if I4 and S7
// if I5; the intermediate states then walk S7 -> S6 -> S5 -> S4 -> S3 -> S1.
// A line in S1 is predicted dead and its refresh is skipped; one retention
// period later, at its next refresh slot, it becomes S2 (disabled): its
// content is gone and any access to it misses. Those transitions follow the
// design's predictor state diagram.
//
// Choices made here: the TIME step and the S1 -> S2 step are both taken at the
// line's own refresh slot (refresh_slot), so that the per-line state needs no
// counter of its own; while the set's indicator is I6 the predictor is off:
// the state does not advance and no refresh is skipped; and a line that holds
// no valid data ages like any other, so that empty rows stop being refreshed.
//
// Interface (purely combinational, one instance per way):
//   state_i        current state of the line
//   ind_i          the set's prediction indicator
//   access_i       hit or insertion of this line in this cycle
//   refresh_slot_i the refresh pointer is at this line's set
//   time_epoch_i   the current refresh sweep is the one that advances TIME
//   state_o        next state
//   skip_refresh_o do not refresh the row at this slot
//   disable_o      the line becomes disabled at this slot (S1 -> S2)
module dead_line_predictor
  import l3c_pkg::*;
(
  input  pred_state_e state_i,
  input  ind_state_e  ind_i,
  input  logic        access_i,
  input  logic        refresh_slot_i,
  input  logic        time_epoch_i,
  output pred_state_e state_o,
  output logic        skip_refresh_o,
  output logic        disable_o
);

  logic pred_on;
  assign pred_on = (ind_i != I6);

  // First intermediate state after S0 for each indicator value.
  function automatic pred_state_e first_step(ind_state_e ind);
    unique case (ind)
      I0:      return S1;
      I1:      return S3;
      I2:      return S4;
      I3:      return S5;
      I4:      return S6;
      I5:      return S7;
      default: return S0;          // I6: predictor off
    endcase
  endfunction

  always_comb begin
    state_o        = state_i;
    skip_refresh_o = 1'b0;
    disable_o      = 1'b0;
    if (access_i) begin
      state_o = S0;
    end else if (refresh_slot_i && pred_on) begin
      unique case (state_i)
        S0: if (time_epoch_i) state_o = first_step(ind_i);
        S7: if (time_epoch_i) state_o = S6;
        S6: if (time_epoch_i) state_o = S5;
        S5: if (time_epoch_i) state_o = S4;
        S4: if (time_epoch_i) state_o = S3;
        S3: if (time_epoch_i) state_o = S1;
        S1: begin
          // Predicted dead one retention period ago and not accessed since:
          // the refresh is skipped and the content expires.
          state_o        = S2;
          skip_refresh_o = 1'b1;
          disable_o      = 1'b1;
        end
        S2: skip_refresh_o = 1'b1;
        default: ;
      endcase
    end else if (refresh_slot_i && state_i == S2) begin
      // A disabled line has nothing left to refresh.
      skip_refresh_o = 1'b1;
    end
  end

endmodule
