// tb_l3_bank: one bank at reduced size (16 sets, 4 ways, refresh request
// every 8 cycles, retention 200 cycles, TIME = 4 sweeps) against a main
// memory model. Every read must return the last data written to that line
// (or the memory's initial content), every line written back to memory must
// carry the latest data, and hits must answer in exactly ACCESS_CYCLES.
// Directed phases make each mechanism happen: write-allocate, read fill,
// dead prediction with refresh skipping and write-back of a dirty dead line,
// false prediction (access to a disabled line), true prediction (eviction of
// a disabled line), dirty victim write-back, and requests stalled by refresh;
// a random phase follows, then bursts of back-to-back requests that do not
// wait for their responses: those must come back in order, hits still after
// exactly ACCESS_CYCLES, and a new request must be taken while an older hit
// is still in flight (one every two cycles at best). The data arrays' retention model must never report
// expired data and no refresh request may be lost.
module tb_l3_bank;
  import l3c_pkg::*;

  localparam int SETS = 16, WAYS = 4, BADDR_W = 12, ACC = 9, PER = 8, TP = 4;
  localparam int SWEEP = SETS * PER, TIME_C = SWEEP * TP;

  logic clk = 0, rst_n = 0;
  logic req_valid, req_ready, resp_valid, resp_hit;
  req_op_e req_op;
  logic [BADDR_W-1:0] req_addr;
  logic [511:0] req_wdata, resp_rdata;
  logic ref_valid, ref_epoch;
  logic [3:0] ref_row;
  logic mreq_valid, mreq_ready, mreq_we, mresp_valid;
  logic [BADDR_W-1:0] mreq_addr;
  logic [511:0] mreq_wdata, mresp_rdata;
  logic [0:0] mresp_id;
  bank_ev_t ev;
  int checks = 0, failures = 0;

  l3_bank #(.SETS(SETS), .WAYS(WAYS), .BADDR_W(BADDR_W), .ACCESS_CYCLES(ACC),
            .RETENTION_CYCLES(200), .REFQ_DEPTH(32)) dut (
    .clk(clk), .rst_n(rst_n),
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_op_i(req_op),
    .req_addr_i(req_addr), .req_wdata_i(req_wdata),
    .resp_valid_o(resp_valid), .resp_hit_o(resp_hit), .resp_rdata_o(resp_rdata),
    .ref_valid_i(ref_valid), .ref_row_i(ref_row), .ref_epoch_i(ref_epoch),
    .mem_req_valid_o(mreq_valid), .mem_req_ready_i(mreq_ready), .mem_req_we_o(mreq_we),
    .mem_req_addr_o(mreq_addr), .mem_req_wdata_o(mreq_wdata),
    .mem_resp_valid_i(mresp_valid), .mem_resp_rdata_i(mresp_rdata), .ev_o(ev));

  l3_mem_model #(.ADDR_W(BADDR_W), .ID_W(1)) u_mem (
    .clk(clk), .rst_n(rst_n), .req_valid(mreq_valid), .req_ready(mreq_ready),
    .req_we(mreq_we), .req_addr(mreq_addr), .req_wdata(mreq_wdata), .req_id(1'b0),
    .resp_valid(mresp_valid), .resp_id(mresp_id), .resp_rdata(mresp_rdata));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // ---------------------------------------------------------- refresh driver
  int rcyc = 0, rrow = 0, rsweep = 0, pulses = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      ref_valid <= 0; rcyc <= 0; rrow <= 0; rsweep <= 0;
    end else begin
      ref_valid <= 0;
      if (rcyc == PER - 1) begin
        rcyc      <= 0;
        ref_valid <= 1;
        ref_row   <= 4'(rrow);
        ref_epoch <= (rsweep % TP) == TP - 1;
        pulses    <= pulses + 1;
        if (rrow == SETS - 1) begin rrow <= 0; rsweep <= rsweep + 1; end
        else rrow <= rrow + 1;
      end else rcyc <= rcyc + 1;
    end
  end

  // ---------------------------------------------------------- event counters
  int n_hit, n_miss, n_false, n_true, n_slots, n_refreshed, n_skipped, n_disabled;
  int n_dead_wb, n_victim_wb, n_stall, n_ovf, n_decay;
  always @(posedge clk) if (rst_n) begin
    n_hit += int'(ev.hit); n_miss += int'(ev.miss);
    n_false += int'(ev.false_pred); n_true += int'(ev.true_pred);
    n_slots += int'(ev.refresh_slot);
    n_refreshed += int'(ev.rows_refreshed); n_skipped += int'(ev.rows_skipped);
    n_disabled += int'(ev.lines_disabled);
    n_dead_wb += int'(ev.dead_writeback); n_victim_wb += int'(ev.victim_writeback);
    n_stall += int'(ev.ref_stall); n_ovf += int'(ev.refq_overflow); n_decay += int'(ev.decay_read);
    if (ev.refresh_slot)
      check(int'(ev.rows_refreshed) + int'(ev.rows_skipped) == WAYS, "every way refreshed or skipped");
  end

  // memory write-backs must carry the latest data
  logic [511:0] gold [logic [BADDR_W-1:0]];
  function automatic logic [511:0] gold_of(logic [BADDR_W-1:0] a);
    return gold.exists(a) ? gold[a] : u_mem.init_line(a);
  endfunction
  always @(posedge clk)
    if (rst_n && mreq_valid && mreq_ready && mreq_we)
      check(mreq_wdata == gold_of(mreq_addr), $sformatf("write-back of %h carries stale data", mreq_addr));

  // ---------------------------------------------------------- requests
  task automatic access(req_op_e op, int tag, int set, output bit hit);
    logic [BADDR_W-1:0] a;
    logic [511:0] d;
    int lat;
    a = BADDR_W'((tag << 4) | set);
    d = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
         $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    @(negedge clk);
    req_valid = 1; req_op = op; req_addr = a; req_wdata = d;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    #1 req_valid = 0;
    if (op == REQ_WRITE) gold[a] = d;
    lat = 0;
    do begin @(posedge clk); #1; lat++; end while (!resp_valid && lat < 2000);
    check(resp_valid, "response arrives");
    hit = resp_hit;
    if (op == REQ_READ)
      check(resp_rdata == gold_of(a), $sformatf("read data of %h", a));
    if (resp_hit) check(lat == ACC, $sformatf("hit latency %0d, expected %0d", lat, ACC));
  endtask

  // ------------------------------------------- back-to-back requests
  typedef struct { bit rd; logic [511:0] exp; int acc; } pend_t;
  pend_t pend [$];
  int cyc = 0, n_overlap = 0, n_b2b = 0, n_burst_resp = 0;
  bit burst_on = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (burst_on && resp_valid) begin
    pend_t p;
    check(pend.size() > 0, "burst: response without a request");
    if (pend.size() > 0) begin
      p = pend.pop_front();
      n_burst_resp++;
      if (p.rd) check(resp_rdata == p.exp, "burst: read data in request order");
      if (resp_hit) check(cyc - p.acc == ACC, $sformatf("burst: hit latency %0d", cyc - p.acc));
    end
  end

  task automatic burst(int n);
    logic [BADDR_W-1:0] a;
    logic [511:0] d;
    req_op_e op;
    pend_t p;
    int last;
    last = -100;
    for (int k = 0; k < n; k++) begin
      a = BADDR_W'(($urandom_range(1, 3) << 4) | $urandom_range(8, 11));
      op = ($urandom_range(0, 3) == 0) ? REQ_WRITE : REQ_READ;
      d = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
           $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      @(negedge clk);
      req_valid = 1; req_op = op; req_addr = a; req_wdata = d;
      while (!req_ready) @(negedge clk);
      @(posedge clk); #1 req_valid = 0;
      if (op == REQ_WRITE) gold[a] = d;
      if (pend.size() > 0) n_overlap++;
      if (cyc - last == 2) n_b2b++;
      last = cyc;
      p.rd = (op == REQ_READ); p.exp = gold_of(a); p.acc = cyc;
      pend.push_back(p);
    end
  endtask

  task automatic idle(int n); repeat (n) @(posedge clk); endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit h;
    int f0, t0, w0, d0;
    req_valid = 0; req_op = REQ_READ; req_addr = 0; req_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // write-allocate and read hit
    access(REQ_WRITE, 1, 3, h); check(!h, "first write misses");
    access(REQ_READ, 1, 3, h);  check(h, "read after write hits");
    access(REQ_READ, 2, 3, h);  check(!h, "cold read misses");
    access(REQ_READ, 2, 3, h);  check(h, "second read hits");
    // dead prediction: leave the set alone for two TIME periods
    d0 = n_dead_wb;
    idle(2 * TIME_C + 2 * SWEEP);
    check(n_disabled >= 2, $sformatf("idle lines disabled (%0d)", n_disabled));
    check(n_skipped > 0, "refreshes skipped");
    check(n_dead_wb > d0, "dirty dead line written back");
    check(u_mem.peek(BADDR_W'((1 << 4) | 3)) == gold_of(BADDR_W'((1 << 4) | 3)),
          "memory holds the dead line's data");
    // false prediction: touch the disabled line
    f0 = n_false;
    access(REQ_READ, 1, 3, h); check(!h, "disabled line misses");
    check(n_false == f0 + 1, "false prediction counted");
    // true prediction: fill set 5, let it die, bring in a new line
    for (int t = 1; t <= WAYS; t++) access(REQ_READ, t, 5, h);
    idle(2 * TIME_C + 2 * SWEEP);
    t0 = n_true;
    access(REQ_READ, 9, 5, h); check(!h, "new line misses");
    check(n_true == t0 + 1, "true prediction counted");
    // dirty victim: five dirty lines in set 7
    w0 = n_victim_wb;
    for (int t = 1; t <= WAYS + 1; t++) access(REQ_WRITE, t, 7, h);
    check(n_victim_wb == w0 + 1, "dirty victim written back");
    access(REQ_READ, 1, 7, h); check(!h, "evicted line misses");
    // random traffic
    for (int k = 0; k < 1500; k++) begin
      access(($urandom_range(0, 2) == 0) ? REQ_WRITE : REQ_READ,
             $urandom_range(0, 7), $urandom_range(0, SETS - 1), h);
      if ($urandom_range(0, 9) == 0) idle($urandom_range(1, 40));
    end
    // back-to-back bursts
    idle(2);
    burst_on = 1;
    for (int k = 0; k < 40; k++) burst($urandom_range(2, 12));
    idle(200);
    check(pend.size() == 0, "burst: every request answered");
    check(n_overlap > 0, $sformatf("burst: %0d requests taken while a hit was in flight", n_overlap));
    check(n_b2b > 0, $sformatf("burst: %0d requests taken two cycles apart", n_b2b));
    burst_on = 0;
    idle(50);
    check(n_stall > 0, "requests were stalled by refresh");
    check(n_ovf == 0, "no refresh request lost");
    check(n_decay == 0, "no expired data read");
    check(n_slots >= pulses - 2 && n_slots <= pulses, $sformatf("%0d slots for %0d pulses", n_slots, pulses));
    $display("bank: hits %0d misses %0d false %0d true %0d refreshed %0d skipped %0d disabled %0d dead_wb %0d victim_wb %0d stalls %0d",
             n_hit, n_miss, n_false, n_true, n_refreshed, n_skipped, n_disabled, n_dead_wb, n_victim_wb, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
