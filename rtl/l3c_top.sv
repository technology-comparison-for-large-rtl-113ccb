// l3c_top: 32 MB eDRAM last-level cache with refresh skipping driven by
// dynamic dead-line prediction.
//
// The cache has NUM_BANKS banks (l3_bank), each SETS sets of WAYS 64-byte
// lines; at the defaults 16 x 2048 x 16 x 64 B = 32 MB. One refresh manager
// (edram_refresh_manager) produces a refresh request every few cycles for
// one row (set index); the request goes to every bank at once, and each bank
// refreshes that row in every way whose line its dead-line predictor does not
// declare dead. All banks share one main-memory channel through a round-robin
// arbiter (mem_arbiter).
//
// Followed from the design: size, associativity, line size and bank count;
// the refresh manager chain and the per-line predictor / per-set indicator;
// the single memory channel. This implementation's own choices: each bank
// has its own processor-side port (the on-chip network that feeds the banks
// is not part of this design); lines are interleaved across banks on the
// lowest line-address bits, so a bank port carries the line address without
// those bits; the temperature comes in as a port in degrees C, because the
// temperature sensor is analog.
//
// Interface:
//   temp_c_i                 temperature sensor reading, degrees C
//   req_* / resp_* [b]       processor-side port of bank b (see l3_bank);
//                            address = line address >> log2(NUM_BANKS)
//   mem_req_* / mem_resp_*   main-memory channel: line address, write flag,
//                            data and bank id; read data returns with the id
//   ev_o [b]                 per-cycle activity of bank b
//
// Timing: hit latency ACCESS_CYCLES (9 cycles, 4.29 ns at 2 GHz); a refresh
// request every PERIOD_AT_REF cycles at 75 C; predictors step every
// TIME_PERIODS refresh sweeps.
module l3c_top
  import l3c_pkg::*;
#(
  parameter int unsigned NUM_BANKS        = 16,
  parameter int unsigned SETS             = 2048,
  parameter int unsigned WAYS             = 16,
  parameter int unsigned ACCESS_CYCLES    = 9,
  parameter int unsigned RETENTION_CYCLES = 40000,
  parameter int unsigned PERIOD_AT_REF    = 19,
  parameter int unsigned TIME_PERIODS     = 256,
  parameter int unsigned REFQ_DEPTH       = 32,
  localparam int unsigned BANK_W          = $clog2(NUM_BANKS),
  localparam int unsigned BADDR_W         = LADDR_W - BANK_W
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic [7:0]                             temp_c_i,
  // processor side, one port per bank
  input  logic    [NUM_BANKS-1:0]                req_valid_i,
  output logic    [NUM_BANKS-1:0]                req_ready_o,
  input  req_op_e [NUM_BANKS-1:0]                req_op_i,
  input  logic    [NUM_BANKS-1:0][BADDR_W-1:0]   req_addr_i,
  input  logic    [NUM_BANKS-1:0][LINE_W-1:0]    req_wdata_i,
  output logic    [NUM_BANKS-1:0]                resp_valid_o,
  output logic    [NUM_BANKS-1:0]                resp_hit_o,
  output logic    [NUM_BANKS-1:0][LINE_W-1:0]    resp_rdata_o,
  // main memory channel
  output logic                                   mem_req_valid_o,
  input  logic                                   mem_req_ready_i,
  output logic                                   mem_req_we_o,
  output logic    [LADDR_W-1:0]                  mem_req_addr_o,
  output logic    [LINE_W-1:0]                   mem_req_wdata_o,
  output logic    [BANK_W-1:0]                   mem_req_id_o,
  input  logic                                   mem_resp_valid_i,
  input  logic    [BANK_W-1:0]                   mem_resp_id_i,
  input  logic    [LINE_W-1:0]                   mem_resp_rdata_i,
  // activity
  output bank_ev_t [NUM_BANKS-1:0]               ev_o
);

  localparam int unsigned SET_W = $clog2(SETS);

  logic             ref_valid, ref_epoch;
  logic [SET_W-1:0] ref_row;

  edram_refresh_manager #(
    .ROWS         (SETS),
    .PERIOD_AT_REF(PERIOD_AT_REF),
    .REF_TEMP_C   (75),
    .OSC_DIV      (1),
    .TIME_PERIODS (TIME_PERIODS)
  ) u_refresh (
    .clk        (clk),
    .rst_n      (rst_n),
    .temp_c_i   (temp_c_i),
    .ref_valid_o(ref_valid),
    .ref_row_o  (ref_row),
    .ref_epoch_o(ref_epoch)
  );

  logic [NUM_BANKS-1:0]               b_mvalid, b_mready, b_mwe, b_rvalid;
  logic [NUM_BANKS-1:0][BADDR_W-1:0]  b_maddr;
  logic [NUM_BANKS-1:0][LINE_W-1:0]   b_mwdata;
  logic [LINE_W-1:0]                  b_rdata;

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    l3_bank #(
      .SETS            (SETS),
      .WAYS            (WAYS),
      .BADDR_W         (BADDR_W),
      .ACCESS_CYCLES   (ACCESS_CYCLES),
      .RETENTION_CYCLES(RETENTION_CYCLES),
      .REFQ_DEPTH      (REFQ_DEPTH)
    ) u_bank (
      .clk             (clk),
      .rst_n           (rst_n),
      .req_valid_i     (req_valid_i[b]),
      .req_ready_o     (req_ready_o[b]),
      .req_op_i        (req_op_i[b]),
      .req_addr_i      (req_addr_i[b]),
      .req_wdata_i     (req_wdata_i[b]),
      .resp_valid_o    (resp_valid_o[b]),
      .resp_hit_o      (resp_hit_o[b]),
      .resp_rdata_o    (resp_rdata_o[b]),
      .ref_valid_i     (ref_valid),
      .ref_row_i       (ref_row),
      .ref_epoch_i     (ref_epoch),
      .mem_req_valid_o (b_mvalid[b]),
      .mem_req_ready_i (b_mready[b]),
      .mem_req_we_o    (b_mwe[b]),
      .mem_req_addr_o  (b_maddr[b]),
      .mem_req_wdata_o (b_mwdata[b]),
      .mem_resp_valid_i(b_rvalid[b]),
      .mem_resp_rdata_i(b_rdata),
      .ev_o            (ev_o[b])
    );
  end

  mem_arbiter #(
    .N     (NUM_BANKS),
    .ADDR_W(BADDR_W),
    .DATA_W(LINE_W)
  ) u_arb (
    .clk           (clk),
    .rst_n         (rst_n),
    .b_req_valid_i (b_mvalid),
    .b_req_ready_o (b_mready),
    .b_req_we_i    (b_mwe),
    .b_req_addr_i  (b_maddr),
    .b_req_wdata_i (b_mwdata),
    .b_resp_valid_o(b_rvalid),
    .b_resp_rdata_o(b_rdata),
    .m_req_valid_o (mem_req_valid_o),
    .m_req_ready_i (mem_req_ready_i),
    .m_req_we_o    (mem_req_we_o),
    .m_req_addr_o  (mem_req_addr_o),
    .m_req_wdata_o (mem_req_wdata_o),
    .m_req_id_o    (mem_req_id_o),
    .m_resp_valid_i(mem_resp_valid_i),
    .m_resp_id_i   (mem_resp_id_i),
    .m_resp_rdata_i(mem_resp_rdata_i)
  );

endmodule
