// mem_arbiter: shares the single main-memory channel among the cache banks.
//
// Each bank may post one request at a time (a line fill read or a line
// write-back) with valid/ready and must hold it steady until it is taken.
// The arbiter grants one bank round-robin, starting after the bank served
// last, and keeps the grant until the channel accepts the request. The
// outgoing line address is the bank's line address with the bank number
// appended as the lowest bits, undoing the bank interleaving; the bank number
// also travels as the request id. Read data returns with that id and is
// routed to that bank, which always accepts it. The single channel follows
// the design's system configuration; arbitration and the id are this
// implementation's choices.
module mem_arbiter #(
  parameter int unsigned N      = 16,
  parameter int unsigned ADDR_W = 30,
  parameter int unsigned DATA_W = 512
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // bank side
  input  logic [N-1:0]                  b_req_valid_i,
  output logic [N-1:0]                  b_req_ready_o,
  input  logic [N-1:0]                  b_req_we_i,
  input  logic [N-1:0][ADDR_W-1:0]      b_req_addr_i,
  input  logic [N-1:0][DATA_W-1:0]      b_req_wdata_i,
  output logic [N-1:0]                  b_resp_valid_o,
  output logic [DATA_W-1:0]             b_resp_rdata_o,
  // memory side
  output logic                          m_req_valid_o,
  input  logic                          m_req_ready_i,
  output logic                          m_req_we_o,
  output logic [ADDR_W+$clog2(N)-1:0]   m_req_addr_o,
  output logic [DATA_W-1:0]             m_req_wdata_o,
  output logic [$clog2(N)-1:0]          m_req_id_o,
  input  logic                          m_resp_valid_i,
  input  logic [$clog2(N)-1:0]          m_resp_id_i,
  input  logic [DATA_W-1:0]             m_resp_rdata_i
);

  localparam int unsigned ID_W = $clog2(N);

  logic [ID_W-1:0] last_q;      // bank granted last
  logic [ID_W-1:0] lock_id_q;   // bank holding an unaccepted grant
  logic            lock_q;
  logic [ID_W-1:0] pick;
  logic            any;

  // Round-robin choice: first requester after last_q.
  always_comb begin
    pick = '0;
    any  = 1'b0;
    for (int unsigned k = 1; k <= N; k++) begin
      logic [ID_W-1:0] idx;
      idx = ID_W'((int'(last_q) + k) % N);
      if (!any && b_req_valid_i[idx]) begin
        any  = 1'b1;
        pick = ID_W'(idx);
      end
    end
  end

  logic [ID_W-1:0] gid;
  assign gid           = lock_q ? lock_id_q : pick;
  assign m_req_valid_o = lock_q ? 1'b1 : any;
  assign m_req_we_o    = b_req_we_i[gid];
  assign m_req_addr_o  = {b_req_addr_i[gid], gid};
  assign m_req_wdata_o = b_req_wdata_i[gid];
  assign m_req_id_o    = gid;

  always_comb begin
    b_req_ready_o = '0;
    b_req_ready_o[gid] = m_req_valid_o && m_req_ready_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q    <= ID_W'(N - 1);
      lock_q    <= 1'b0;
      lock_id_q <= '0;
    end else if (m_req_valid_o) begin
      if (m_req_ready_i) begin
        last_q <= gid;
        lock_q <= 1'b0;
      end else begin
        lock_q    <= 1'b1;
        lock_id_q <= gid;
      end
    end
  end

  always_comb begin
    b_resp_valid_o = '0;
    b_resp_valid_o[m_resp_id_i] = m_resp_valid_i;
  end
  assign b_resp_rdata_o = m_resp_rdata_i;

  // A granted bank must keep its request up until it is accepted.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    lock_q |-> b_req_valid_i[lock_id_q])
    else $error("mem_arbiter: bank %0d dropped a pending request", lock_id_q);

endmodule
