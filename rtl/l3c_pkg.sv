// l3c_pkg: types and constants shared by the eDRAM last-level cache.
//
// The cache is 32 MB, 16-way set associative, with 64-byte lines in 16 banks.
// Those sizes and the two state machines encoded here come from the design
// being implemented. The physical address width (40 bits), and so the tag
// width, is this implementation's own choice. The line address is split into
// {tag, set, bank}: the banks are interleaved on the lowest line-address bits,
// which is also a choice made here.
package l3c_pkg;

  localparam int unsigned PADDR_W    = 40;   // physical address bits (chosen)
  localparam int unsigned LINE_BYTES = 64;
  localparam int unsigned LINE_W     = LINE_BYTES * 8;            // 512
  localparam int unsigned OFFSET_W   = $clog2(LINE_BYTES);        // 6
  localparam int unsigned LADDR_W    = PADDR_W - OFFSET_W;        // 34: line address

  // Dead-line predictor state, one per line (three bits).
  //   S0 live, S1 dead (refresh skipped), S2 disabled (content lost),
  //   S3..S7 intermediate states, entered from S0 according to the set's
  //   prediction indicator and walked down S7 -> S6 -> ... -> S3 -> S1.
  typedef enum logic [2:0] {
    S0 = 3'd0, S1 = 3'd1, S2 = 3'd2, S3 = 3'd3,
    S4 = 3'd4, S5 = 3'd5, S6 = 3'd6, S7 = 3'd7
  } pred_state_e;

  // Dynamic prediction indicator, one per set (three bits).
  //   I0..I5 choose the decay interval; I6 switches the set's predictors off.
  typedef enum logic [2:0] {
    I0 = 3'd0, I1 = 3'd1, I2 = 3'd2, I3 = 3'd3,
    I4 = 3'd4, I5 = 3'd5, I6 = 3'd6
  } ind_state_e;

  // Request type on a bank's processor-side port.
  typedef enum logic {
    REQ_READ  = 1'b0,    // read a full line
    REQ_WRITE = 1'b1     // write a full line (write-back from the private L2)
  } req_op_e;

  // Per-cycle activity of one bank, for statistics and for checking.
  typedef struct packed {
    logic       hit;            // request hit
    logic       miss;           // request missed
    logic       false_pred;     // tag match on a disabled line
    logic       true_pred;      // disabled line evicted
    logic       refresh_slot;   // a refresh slot was processed
    logic [7:0] rows_refreshed; // rows refreshed in that slot
    logic [7:0] rows_skipped;   // rows whose refresh was skipped in that slot
    logic [7:0] lines_disabled; // lines that went S1 -> S2 in that slot
    logic       dead_writeback; // dirty dead line written back to memory
    logic       victim_writeback; // dirty victim written back on a miss
    logic       ref_stall;      // a request waited because of refresh work
    logic       refq_overflow;  // a refresh pulse was lost (must never happen)
    logic       decay_read;     // data array returned expired data (must never happen)
  } bank_ev_t;

endpackage
