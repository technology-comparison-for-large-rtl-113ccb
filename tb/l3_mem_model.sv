// l3_mem_model: behavioural main memory for the cache testbenches.
//
// Accepts line requests with valid/ready (ready is random, to exercise
// back-pressure), stores written lines, and returns read lines with their id
// after a random latency of MIN_LAT..MAX_LAT cycles, in request order. A line
// never written reads as init_line(address). peek() returns what the memory
// holds for an address; writes counts the lines written back.
module l3_mem_model #(
  parameter int unsigned ADDR_W  = 34,
  parameter int unsigned ID_W    = 4,
  parameter int unsigned MIN_LAT = 5,
  parameter int unsigned MAX_LAT = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_we,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [511:0]      req_wdata,
  input  logic [ID_W-1:0]   req_id,
  output logic              resp_valid,
  output logic [ID_W-1:0]   resp_id,
  output logic [511:0]      resp_rdata
);

  logic [511:0] store [logic [ADDR_W-1:0]];
  int writes = 0, reads = 0;

  typedef struct { logic [ADDR_W-1:0] addr; logic [ID_W-1:0] id; longint due; } rd_t;
  rd_t    q[$];
  longint now = 0;

  function automatic logic [511:0] init_line(logic [ADDR_W-1:0] a);
    logic [511:0] v;
    for (int i = 0; i < 16; i++) v[32*i +: 32] = 32'(a) * 32'h9E37_79B1 + 32'(i);
    return v;
  endfunction

  function automatic logic [511:0] peek(logic [ADDR_W-1:0] a);
    return store.exists(a) ? store[a] : init_line(a);
  endfunction

  always @(posedge clk) begin
    now++;
    resp_valid <= 1'b0;
    if (!rst_n) begin
      req_ready <= 1'b0;
      q.delete();
    end else begin
      if (req_valid && req_ready) begin
        if (req_we) begin
          store[req_addr] = req_wdata;
          writes++;
        end else begin
          rd_t r;
          r.addr = req_addr; r.id = req_id;
          r.due  = now + longint'($urandom_range(MIN_LAT, MAX_LAT));
          if (q.size() > 0 && q[$].due > r.due) r.due = q[$].due + 1;
          q.push_back(r);
          reads++;
        end
      end
      if (q.size() > 0 && q[0].due <= now) begin
        rd_t r;
        r = q.pop_front();
        resp_valid <= 1'b1;
        resp_id    <= r.id;
        resp_rdata <= peek(r.addr);
      end
      req_ready <= ($urandom_range(0, 2) != 0);
    end
  end

endmodule
