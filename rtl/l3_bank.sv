// l3_bank: one bank of the eDRAM last-level cache with dead-line prediction.
//
// What it does. The bank is a write-back, SETS-set, WAYS-way cache of 64-byte
// lines built from an SRAM tag array and one gain-cell eDRAM data array per
// way. Tag and data are accessed one after the other: the data array is only
// read or written once the tag lookup has hit (or when a line is filled or
// written back). Next to its tag, each line keeps a disable bit and the state
// of a time-based dead-line predictor; each set keeps a prediction indicator.
// Refresh requests from the refresh manager name one set; the bank refreshes
// that row in every way except the ways whose predictor says "dead" or
// "disabled". That skipping is the design's way of saving refresh energy.
//
// How it works. One controller runs the jobs below; only the tail of a hit
// overlaps with later jobs:
//   * After reset it clears the tag array, one set per cycle (SETS cycles);
//     refresh requests are ignored meanwhile, since no line holds data.
//   * Refresh slot: read the set's tags, step each way's predictor
//     (dead_line_predictor), refresh the rows not skipped, write the tags
//     back. A dirty line that goes from dead (S1) to disabled (S2) is read and
//     written back to memory first, while its content is still within the
//     retention time.
//   * Access: read the set's tags. A hit returns the predictor to S0 and
//     reads (or writes) the data array, all in the lookup cycle. Its
//     response then travels down a delay line and leaves ACCESS_CYCLES
//     cycles after the request was taken, while the controller is already
//     back in IDLE: hits are pipelined, one accepted every two cycles (the
//     single-port tag array needs one cycle to read and one to write). A tag match on a disabled line is a
//     miss and a false prediction; the line is refilled in place. Otherwise a
//     victim is chosen (an invalid way, else a disabled way, else the
//     pseudo-LRU way); evicting a disabled line is a true prediction; a dirty
//     live victim is written back first. A read miss fetches the line from
//     memory; a write miss (a full-line write-back from L2) allocates the
//     line without fetching it. False and true predictions step the set's
//     prediction indicator (prediction_indicator). Misses block the bank;
//     a miss answers only once every older hit has answered, so responses
//     stay in request order.
// Refresh requests that arrive while a job is running wait in a queue of
// REFQ_DEPTH entries and are served before new requests; requests are stalled
// while refresh work is pending, as the design says normal accesses are.
//
// Followed from the design: sequential tag-then-data access, write-back, 16
// ways, 64-byte lines, 2048 sets per bank (32 MB / 16 banks), the predictor
// and indicator state machines, refresh skipping of dead lines, write-back of
// dirty dead lines, false/true prediction detection, pseudo-LRU replacement,
// a 4.29 ns hit latency (ACCESS_CYCLES = 9 at 2 GHz). This implementation's
// own choices: how the bank is pipelined (the design asks for a pipelined
// cache but gives no structure; here hits overlap and misses block), the
// refresh queue, write-allocate without fetch, the victim order, and the port
// protocol below.
//
// Interface:
//   req_*      request: valid/ready; op (read or full-line write); bank-local
//              line address {tag, set}; write data
//   resp_*     response, one cycle, for every request: hit flag and read data
//              (no back-pressure)
//   ref_*      refresh request from the refresh manager (one-cycle pulse)
//   mem_*      main-memory request (valid/ready, held until taken) and read
//              data return (always accepted); one outstanding request
//   ev_o       activity of this cycle
module l3_bank
  import l3c_pkg::*;
#(
  parameter int unsigned SETS             = 2048,
  parameter int unsigned WAYS             = 16,
  parameter int unsigned BADDR_W          = 30,     // bank-local line address
  parameter int unsigned ACCESS_CYCLES    = 9,      // hit latency, >= 3
  parameter int unsigned RETENTION_CYCLES = 40000,
  parameter int unsigned REFQ_DEPTH       = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // processor side
  input  logic                     req_valid_i,
  output logic                     req_ready_o,
  input  req_op_e                  req_op_i,
  input  logic [BADDR_W-1:0]       req_addr_i,
  input  logic [LINE_W-1:0]        req_wdata_i,
  output logic                     resp_valid_o,
  output logic                     resp_hit_o,
  output logic [LINE_W-1:0]        resp_rdata_o,
  // refresh manager
  input  logic                     ref_valid_i,
  input  logic [$clog2(SETS)-1:0]  ref_row_i,
  input  logic                     ref_epoch_i,
  // main memory
  output logic                     mem_req_valid_o,
  input  logic                     mem_req_ready_i,
  output logic                     mem_req_we_o,
  output logic [BADDR_W-1:0]       mem_req_addr_o,
  output logic [LINE_W-1:0]        mem_req_wdata_o,
  input  logic                     mem_resp_valid_i,
  input  logic [LINE_W-1:0]        mem_resp_rdata_i,
  // statistics
  output bank_ev_t                 ev_o
);

  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned WAY_W = $clog2(WAYS);
  localparam int unsigned TAG_W = BADDR_W - SET_W;
  localparam int unsigned QP_W  = $clog2(REFQ_DEPTH);

  typedef struct packed {
    logic              valid;
    logic              dirty;
    logic              dis;      // disable bit
    pred_state_e       pred;     // dead-line predictor
    logic [TAG_W-1:0]  tag;
  } way_t;

  typedef struct packed {
    way_t [WAYS-1:0]   way;
    ind_state_e        ind;      // prediction indicator
    logic [WAYS-2:0]   plru;
  } set_t;

  localparam int unsigned SET_BITS = $bits(set_t);

  initial assert (ACCESS_CYCLES >= 3) else $error("l3_bank: ACCESS_CYCLES must be >= 3");

  // ---------------------------------------------------------------- state
  typedef enum logic [3:0] {
    ST_INIT,      // clearing the tag array
    ST_IDLE,
    ST_RF_RD,     // refresh: tag read issued
    ST_RF_UPD,    // refresh: predictors stepped, rows refreshed, tags written
    ST_RF_WBRD,   // refresh: reading a dirty line that expires
    ST_RF_WBMEM,  // refresh: writing it to memory
    ST_AC_LK,     // access: tags available, hit/miss decided
    ST_AC_VRD,    // miss: reading the dirty victim
    ST_AC_VWB,    // miss: writing the victim to memory
    ST_AC_MRQ,    // read miss: request to memory
    ST_AC_MWT,    // read miss: waiting for the line
    ST_AC_FILL    // miss: line written into the data array, tags updated
  } state_e;

  state_e state_q;

  // ----------------------------------------------------- refresh queue
  logic [SET_W:0]   refq_mem [REFQ_DEPTH];   // {epoch, row}
  logic [QP_W-1:0]  refq_rd_q, refq_wr_q;
  logic [QP_W:0]    refq_cnt_q;
  logic             refq_pop, refq_empty, refq_full;
  logic [SET_W:0]   refq_head;

  assign refq_empty = (refq_cnt_q == '0);
  assign refq_full  = (refq_cnt_q == (QP_W+1)'(REFQ_DEPTH));
  assign refq_head  = refq_mem[refq_rd_q];

  // While the tag array is being cleared after reset no line holds data, so
  // refresh requests are dropped rather than queued.
  logic refq_push;
  assign refq_push = ref_valid_i && !refq_full && (state_q != ST_INIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      refq_rd_q  <= '0;
      refq_wr_q  <= '0;
      refq_cnt_q <= '0;
    end else begin
      if (refq_push)
        refq_wr_q <= QP_W'((int'(refq_wr_q) + 1) % REFQ_DEPTH);
      if (refq_pop)
        refq_rd_q <= QP_W'((int'(refq_rd_q) + 1) % REFQ_DEPTH);
      refq_cnt_q <= refq_cnt_q + (QP_W+1)'(refq_push) - (QP_W+1)'(refq_pop);
    end
  end

  always_ff @(posedge clk)
    if (refq_push) refq_mem[refq_wr_q] <= {ref_epoch_i, ref_row_i};

  // ------------------------------------------------------- tag array
  logic                tag_en, tag_we;
  logic [SET_W-1:0]    tag_addr;
  set_t                tag_wdata, tag_rdata;

  sram_tag_array #(.DEPTH(SETS), .WIDTH(SET_BITS)) u_tags (
    .clk    (clk),
    .en_i   (tag_en),
    .we_i   (tag_we),
    .addr_i (tag_addr),
    .wdata_i(tag_wdata),
    .rdata_o(tag_rdata)
  );

  // ------------------------------------------------------ data arrays
  logic [WAYS-1:0]              d_rd, d_wr, d_ref;
  logic [SET_W-1:0]             d_row, d_ref_row;
  logic [LINE_W-1:0]            d_wdata;
  logic [WAYS-1:0][LINE_W-1:0]  d_rdata;
  logic [WAYS-1:0]              d_decayed;

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    edram_data_array #(
      .ROWS(SETS), .WIDTH(LINE_W), .RETENTION_CYCLES(RETENTION_CYCLES)
    ) u_data (
      .clk      (clk),
      .rst_n    (rst_n),
      .rd_en_i  (d_rd[w]),
      .wr_en_i  (d_wr[w]),
      .row_i    (d_row),
      .wdata_i  (d_wdata),
      .rdata_o  (d_rdata[w]),
      .decayed_o(d_decayed[w]),
      .ref_en_i (d_ref[w]),
      .ref_row_i(d_ref_row)
    );
  end

  // ------------------------------------------------ job registers
  logic [SET_W-1:0]    set_q;        // set of the current job
  logic                epoch_q;      // refresh job is a TIME step
  req_op_e             op_q;
  logic [TAG_W-1:0]    tag_q;
  logic [LINE_W-1:0]   wdata_q;
  set_t                cur_q;        // tags of the set, as they will be written
  logic [WAY_W-1:0]    way_q;        // way being served
  logic [WAYS-1:0]     wbmask_q;     // refresh: dirty lines to write back
  logic [7:0]          cnt_q;        // latency counter
  logic                false_q, true_q;
  logic [LINE_W-1:0]   resp_data_q;
  logic                resp_valid_q, resp_hit_q;
  logic                mreq_valid_q, mreq_we_q;
  logic [BADDR_W-1:0]  mreq_addr_q;
  logic [LINE_W-1:0]   mreq_wdata_q;
  logic [SET_W-1:0]    init_q;

  // ------------------------------------------------ hit pipeline
  // A hit finishes its tag update and data-array access in the lookup cycle;
  // only its response still has to wait out the access latency. It does so
  // in this delay line of ACCESS_CYCLES-1 stages, while the controller goes
  // back to IDLE and can take the next request. Stage 0 records the way read;
  // stage 1 captures the data the array returns one cycle after the read.
  localparam int unsigned HP_D = ACCESS_CYCLES - 1;
  logic [HP_D-1:0]     hp_v_q, hp_rd_q;
  logic [WAY_W-1:0]    hp_way_q;
  logic [LINE_W-1:0]   hp_data_q [HP_D];
  logic                hp_busy;
  assign hp_busy = |hp_v_q;

  // ------------------------------------------- refresh slot datapath
  set_t             rf_new;
  logic [WAYS-1:0]  rf_skip, rf_dis;
  for (genvar w = 0; w < WAYS; w++) begin : g_rf_pred
    pred_state_e nxt;
    dead_line_predictor u_pred (
      .state_i       (tag_rdata.way[w].pred),
      .ind_i         (tag_rdata.ind),
      .access_i      (1'b0),
      .refresh_slot_i(1'b1),
      .time_epoch_i  (epoch_q),
      .state_o       (nxt),
      .skip_refresh_o(rf_skip[w]),
      .disable_o     (rf_dis[w])
    );
    always_comb begin
      rf_new.way[w]      = tag_rdata.way[w];
      rf_new.way[w].pred = nxt;
      if (rf_dis[w]) begin
        rf_new.way[w].dis   = 1'b1;
        rf_new.way[w].dirty = 1'b0;   // written back below
      end
    end
  end
  assign rf_new.ind  = tag_rdata.ind;
  assign rf_new.plru = tag_rdata.plru;

  logic [WAYS-1:0] rf_wb;
  always_comb
    for (int w = 0; w < WAYS; w++)
      rf_wb[w] = rf_dis[w] && tag_rdata.way[w].dirty;

  // ------------------------------------------------- lookup datapath
  logic [WAYS-1:0]  hit_vec, mdis_vec, inv_vec, disw_vec;
  logic             lk_hit, lk_mdis;
  logic [WAY_W-1:0] hit_way, mdis_way, inv_way, disw_way, plru_victim, victim;
  logic             any_inv, any_dis;

  always_comb begin
    hit_way = '0; mdis_way = '0; inv_way = '0; disw_way = '0;
    any_inv = 1'b0; any_dis = 1'b0;
    for (int w = 0; w < WAYS; w++) begin
      hit_vec[w]  = tag_rdata.way[w].valid && !tag_rdata.way[w].dis &&
                    tag_rdata.way[w].tag == tag_q;
      mdis_vec[w] = tag_rdata.way[w].valid &&  tag_rdata.way[w].dis &&
                    tag_rdata.way[w].tag == tag_q;
      inv_vec[w]  = !tag_rdata.way[w].valid;
      disw_vec[w] = tag_rdata.way[w].valid && tag_rdata.way[w].dis;
    end
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (hit_vec[w])  hit_way  = WAY_W'(w);
      if (mdis_vec[w]) mdis_way = WAY_W'(w);
      if (inv_vec[w])  begin inv_way  = WAY_W'(w); any_inv = 1'b1; end
      if (disw_vec[w]) begin disw_way = WAY_W'(w); any_dis = 1'b1; end
    end
  end
  assign lk_hit  = |hit_vec;
  assign lk_mdis = |mdis_vec;

  logic [WAYS-2:0]  plru_next;
  logic             plru_touch;
  logic [WAY_W-1:0] plru_way;
  plru #(.WAYS(WAYS)) u_plru (
    .bits_i  (cur_sel_plru()),
    .touch_i (plru_touch),
    .way_i   (plru_way),
    .bits_o  (plru_next),
    .victim_o(plru_victim)
  );

  // The pseudo-LRU bits come from the tag read during lookup and from the
  // held copy when the fill is written.
  function automatic logic [WAYS-2:0] cur_sel_plru();
    return (state_q == ST_AC_LK) ? tag_rdata.plru : cur_q.plru;
  endfunction

  always_comb begin
    if (lk_mdis)      victim = mdis_way;
    else if (any_inv) victim = inv_way;
    else if (any_dis) victim = disw_way;
    else              victim = plru_victim;
  end

  ind_state_e ind_next;
  prediction_indicator u_ind (
    .ind_i  (cur_q.ind),
    .false_i(false_q),
    .true_i (true_q),
    .ind_o  (ind_next)
  );

  // lowest pending write-back way of a refresh job
  logic [WAY_W-1:0] wb_way;
  always_comb begin
    wb_way = '0;
    for (int w = WAYS - 1; w >= 0; w--)
      if (wbmask_q[w]) wb_way = WAY_W'(w);
  end

  // ----------------------------------------------------- control
  always_comb begin
    tag_en    = 1'b0;
    tag_we    = 1'b0;
    tag_addr  = set_q;
    tag_wdata = cur_q;
    d_rd      = '0;
    d_wr      = '0;
    d_ref     = '0;
    d_row     = set_q;
    d_ref_row = set_q;
    d_wdata   = wdata_q;
    refq_pop  = 1'b0;
    plru_touch = 1'b0;
    plru_way   = way_q;
    unique case (state_q)
      ST_INIT: begin
        tag_en    = 1'b1;
        tag_we    = 1'b1;
        tag_addr  = init_q;
        tag_wdata = '0;
      end
      ST_IDLE: begin
        if (!refq_empty) begin
          refq_pop = 1'b1;
          tag_en   = 1'b1;
          tag_addr = refq_head[SET_W-1:0];
        end else if (req_valid_i) begin
          tag_en   = 1'b1;
          tag_addr = req_addr_i[SET_W-1:0];
        end
      end
      ST_RF_UPD: begin
        tag_en    = 1'b1;
        tag_we    = 1'b1;
        tag_wdata = rf_new;
        d_ref     = ~rf_skip;
        // dirty lines about to expire are read out first
        d_rd      = '0;
      end
      ST_RF_WBRD: if (cnt_q == 8'd0) d_rd[wb_way] = 1'b1;
      ST_AC_LK: begin
        if (lk_hit) begin
          tag_en     = 1'b1;
          tag_we     = 1'b1;
          tag_wdata  = tag_rdata;
          tag_wdata.way[hit_way].pred = S0;
          if (op_q == REQ_WRITE) tag_wdata.way[hit_way].dirty = 1'b1;
          plru_touch = 1'b1;
          plru_way   = hit_way;
          tag_wdata.plru = plru_next;
          if (op_q == REQ_WRITE) d_wr[hit_way] = 1'b1;
          else                   d_rd[hit_way] = 1'b1;
        end
      end
      ST_AC_VRD: if (cnt_q == 8'd0) d_rd[way_q] = 1'b1;
      ST_AC_FILL: if (!hp_busy) begin
        tag_en     = 1'b1;
        tag_we     = 1'b1;
        tag_wdata  = cur_q;
        tag_wdata.way[way_q] = '{valid: 1'b1, dirty: (op_q == REQ_WRITE),
                                 dis: 1'b0, pred: S0, tag: tag_q};
        tag_wdata.ind  = ind_next;
        plru_touch     = 1'b1;
        tag_wdata.plru = plru_next;
        d_wr[way_q]    = 1'b1;
      end
      default: ;
    endcase
  end

  assign req_ready_o = (state_q == ST_IDLE) && refq_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= ST_INIT;
      init_q       <= '0;
      resp_valid_q <= 1'b0;
      resp_hit_q   <= 1'b0;
      mreq_valid_q <= 1'b0;
      mreq_we_q    <= 1'b0;
      cnt_q        <= '0;
      false_q      <= 1'b0;
      true_q       <= 1'b0;
      wbmask_q     <= '0;
      way_q        <= '0;
      set_q        <= '0;
      epoch_q      <= 1'b0;
      op_q         <= REQ_READ;
      tag_q        <= '0;
      wdata_q      <= '0;
      cur_q        <= '0;
      resp_data_q  <= '0;
      mreq_addr_q  <= '0;
      mreq_wdata_q <= '0;
    end else begin
      resp_valid_q <= 1'b0;
      unique case (state_q)
        ST_INIT: begin
          init_q <= init_q + 1'b1;
          if (init_q == SET_W'(SETS - 1)) state_q <= ST_IDLE;
        end
        ST_IDLE: begin
          if (!refq_empty) begin
            set_q   <= refq_head[SET_W-1:0];
            epoch_q <= refq_head[SET_W];
            state_q <= ST_RF_RD;
          end else if (req_valid_i) begin
            set_q   <= req_addr_i[SET_W-1:0];
            tag_q   <= req_addr_i[BADDR_W-1:SET_W];
            op_q    <= req_op_i;
            wdata_q <= req_wdata_i;
            state_q <= ST_AC_LK;
          end
        end
        // ---------------- refresh slot
        ST_RF_RD: state_q <= ST_RF_UPD;
        ST_RF_UPD: begin
          wbmask_q <= rf_wb;
          cur_q    <= rf_new;
          cnt_q    <= 8'd0;
          state_q  <= (|rf_wb) ? ST_RF_WBRD : ST_IDLE;
        end
        ST_RF_WBRD: begin
          // one cycle to issue the read, ACCESS_CYCLES-2 more for the data
          if (cnt_q == 8'(ACCESS_CYCLES - 2)) begin
            mreq_valid_q <= 1'b1;
            mreq_we_q    <= 1'b1;
            mreq_addr_q  <= {cur_q.way[wb_way].tag, set_q};
            mreq_wdata_q <= d_rdata[wb_way];
            state_q      <= ST_RF_WBMEM;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        ST_RF_WBMEM: if (mem_req_ready_i) begin
          mreq_valid_q      <= 1'b0;
          wbmask_q[wb_way]  <= 1'b0;
          cnt_q             <= 8'd0;
          state_q           <= (wbmask_q == (WAYS'(1) << wb_way)) ? ST_IDLE : ST_RF_WBRD;
        end
        // ---------------- access
        ST_AC_LK: begin
          cur_q   <= tag_rdata;
          false_q <= 1'b0;
          true_q  <= 1'b0;
          cnt_q   <= 8'd0;
          if (lk_hit) begin
            way_q   <= hit_way;
            state_q <= ST_IDLE;
          end else begin
            way_q   <= victim;
            false_q <= lk_mdis;
            true_q  <= !lk_mdis && tag_rdata.way[victim].valid && tag_rdata.way[victim].dis;
            if (!lk_mdis && tag_rdata.way[victim].valid && !tag_rdata.way[victim].dis &&
                tag_rdata.way[victim].dirty)
              state_q <= ST_AC_VRD;
            else if (op_q == REQ_READ)
              state_q <= ST_AC_MRQ;
            else
              state_q <= ST_AC_FILL;
          end
        end
        ST_AC_VRD: begin
          if (cnt_q == 8'(ACCESS_CYCLES - 2)) begin
            mreq_valid_q <= 1'b1;
            mreq_we_q    <= 1'b1;
            mreq_addr_q  <= {cur_q.way[way_q].tag, set_q};
            mreq_wdata_q <= d_rdata[way_q];
            state_q      <= ST_AC_VWB;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        ST_AC_VWB: if (mem_req_ready_i) begin
          mreq_valid_q <= 1'b0;
          state_q      <= (op_q == REQ_READ) ? ST_AC_MRQ : ST_AC_FILL;
        end
        ST_AC_MRQ: begin
          if (mreq_valid_q && mem_req_ready_i) begin
            mreq_valid_q <= 1'b0;
            state_q      <= ST_AC_MWT;
          end else begin
            mreq_valid_q <= 1'b1;
            mreq_we_q    <= 1'b0;
            mreq_addr_q  <= {tag_q, set_q};
          end
        end
        ST_AC_MWT: if (mem_resp_valid_i) begin
          wdata_q <= mem_resp_rdata_i;
          state_q <= ST_AC_FILL;
        end
        // a miss answers only after every older hit has answered
        ST_AC_FILL: if (!hp_busy) begin
          resp_valid_q <= 1'b1;
          resp_hit_q   <= 1'b0;
          resp_data_q  <= (op_q == REQ_READ) ? wdata_q : '0;
          state_q      <= ST_IDLE;
        end
        default: state_q <= ST_IDLE;
      endcase
      if (hp_v_q[HP_D-1]) begin
        resp_valid_q <= 1'b1;
        resp_hit_q   <= 1'b1;
        resp_data_q  <= hp_rd_q[HP_D-1] ? hp_data_q[HP_D-1] : '0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hp_v_q   <= '0;
      hp_rd_q  <= '0;
      hp_way_q <= '0;
    end else begin
      hp_v_q   <= {hp_v_q[HP_D-2:0], (state_q == ST_AC_LK) && lk_hit};
      hp_rd_q  <= {hp_rd_q[HP_D-2:0], (state_q == ST_AC_LK) && (op_q == REQ_READ)};
      if (state_q == ST_AC_LK) hp_way_q <= hit_way;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < HP_D; i++) hp_data_q[i] <= '0;
    end else begin
      hp_data_q[0] <= '0;
      hp_data_q[1] <= d_rdata[hp_way_q];
      for (int i = 2; i < HP_D; i++) hp_data_q[i] <= hp_data_q[i-1];
    end
  end

  assign resp_valid_o    = resp_valid_q;
  assign resp_hit_o      = resp_hit_q;
  assign resp_rdata_o    = resp_data_q;
  assign mem_req_valid_o = mreq_valid_q;
  assign mem_req_we_o    = mreq_we_q;
  assign mem_req_addr_o  = mreq_addr_q;
  assign mem_req_wdata_o = mreq_wdata_q;

  // ------------------------------------------------------ activity
  logic decay_seen_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) decay_seen_q <= 1'b0;
    else        decay_seen_q <= |(d_rd & ~d_wr);
  end

  // which way was read in the previous cycle
  logic [WAYS-1:0] rd_prev_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_prev_q <= '0;
    else        rd_prev_q <= d_rd;
  end

  always_comb begin
    ev_o = '0;
    ev_o.hit              = (state_q == ST_AC_LK) && lk_hit;
    ev_o.miss             = (state_q == ST_AC_LK) && !lk_hit;
    ev_o.false_pred       = (state_q == ST_AC_LK) && !lk_hit && lk_mdis;
    ev_o.true_pred        = (state_q == ST_AC_LK) && !lk_hit && !lk_mdis &&
                            tag_rdata.way[victim].valid && tag_rdata.way[victim].dis;
    ev_o.refresh_slot     = (state_q == ST_RF_UPD);
    ev_o.rows_refreshed   = (state_q == ST_RF_UPD) ? 8'($countones(~rf_skip)) : 8'd0;
    ev_o.rows_skipped     = (state_q == ST_RF_UPD) ? 8'($countones(rf_skip))  : 8'd0;
    ev_o.lines_disabled   = (state_q == ST_RF_UPD) ? 8'($countones(rf_dis))   : 8'd0;
    ev_o.dead_writeback   = (state_q == ST_RF_WBMEM) && mem_req_ready_i;
    ev_o.victim_writeback = (state_q == ST_AC_VWB) && mem_req_ready_i;
    ev_o.ref_stall        = req_valid_i && !req_ready_o && state_q != ST_INIT &&
                            (!refq_empty || state_q inside {ST_RF_RD, ST_RF_UPD,
                                                             ST_RF_WBRD, ST_RF_WBMEM});
    ev_o.refq_overflow    = ref_valid_i && refq_full && (state_q != ST_INIT);
    ev_o.decay_read       = decay_seen_q && |(rd_prev_q & d_decayed);
  end

  // ----------------------------------------------------- assertions
  a_no_refq_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(ref_valid_i && refq_full && state_q != ST_INIT))
    else $error("l3_bank: refresh request lost");
  a_mem_hold: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req_valid_o && !mem_req_ready_i |=> mem_req_valid_o && $stable(mem_req_addr_o))
    else $error("l3_bank: memory request changed before it was taken");

endmodule
