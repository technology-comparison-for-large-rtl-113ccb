// tb_l3c_top: the whole cache end to end, with all 16 banks and the shared
// refresh manager and memory channel, at reduced bank size (16 sets x 4 ways
// per bank, a refresh request every 8 cycles, retention 300 cycles, TIME = 4
// sweeps). Sixteen processes drive the sixteen bank ports at once with
// directed and random traffic; a memory model answers on the single channel.
// Every read must return the latest data of its line, every write-back must
// carry the latest data, and hits must take ACCESS_CYCLES. The bench counts
// each mechanism of the design and fails if one never happened: hits,
// misses, refresh skipping, lines disabled, dead-line write-back, false and
// true predictions, dirty victim write-back, requests stalled by refresh,
// banks contending for the memory channel, and a faster refresh rate after
// the temperature rises from 75 C to 95 C.
module tb_l3c_top;
  import l3c_pkg::*;

  localparam int NB = 16, SETS = 16, WAYS = 4, ACC = 9, PER = 8, TP = 4;
  localparam int BW = LADDR_W - 4;
  localparam int SWEEP = SETS * PER, TIME_C = SWEEP * TP;

  logic clk = 0, rst_n = 0;
  logic [7:0] temp;
  logic    [NB-1:0]          req_valid, req_ready, resp_valid, resp_hit;
  req_op_e [NB-1:0]          req_op;
  logic    [NB-1:0][BW-1:0]  req_addr;
  logic    [NB-1:0][511:0]   req_wdata, resp_rdata;
  logic mv, mr, mwe, mrv;
  logic [LADDR_W-1:0] ma;
  logic [511:0] md, mrd;
  logic [3:0] mid, mrid;
  bank_ev_t [NB-1:0] ev;
  int checks = 0, failures = 0;

  l3c_top #(.NUM_BANKS(NB), .SETS(SETS), .WAYS(WAYS), .ACCESS_CYCLES(ACC),
            .RETENTION_CYCLES(300), .PERIOD_AT_REF(PER), .TIME_PERIODS(TP),
            .REFQ_DEPTH(32)) dut (
    .clk(clk), .rst_n(rst_n), .temp_c_i(temp),
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_op_i(req_op),
    .req_addr_i(req_addr), .req_wdata_i(req_wdata),
    .resp_valid_o(resp_valid), .resp_hit_o(resp_hit), .resp_rdata_o(resp_rdata),
    .mem_req_valid_o(mv), .mem_req_ready_i(mr), .mem_req_we_o(mwe),
    .mem_req_addr_o(ma), .mem_req_wdata_o(md), .mem_req_id_o(mid),
    .mem_resp_valid_i(mrv), .mem_resp_id_i(mrid), .mem_resp_rdata_i(mrd),
    .ev_o(ev));

  l3_mem_model #(.ADDR_W(LADDR_W), .ID_W(4)) u_mem (
    .clk(clk), .rst_n(rst_n), .req_valid(mv), .req_ready(mr), .req_we(mwe),
    .req_addr(ma), .req_wdata(md), .req_id(mid),
    .resp_valid(mrv), .resp_id(mrid), .resp_rdata(mrd));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // ---------------------------------------------------------- counters
  int n_hit, n_miss, n_false, n_true, n_slots, n_skipped, n_disabled;
  int n_dead_wb, n_victim_wb, n_stall, n_ovf, n_decay, n_contend, n_pulses;
  always @(posedge clk) if (rst_n) begin
    for (int b = 0; b < NB; b++) begin
      n_hit += int'(ev[b].hit); n_miss += int'(ev[b].miss);
      n_false += int'(ev[b].false_pred); n_true += int'(ev[b].true_pred);
      n_slots += int'(ev[b].refresh_slot); n_skipped += int'(ev[b].rows_skipped);
      n_disabled += int'(ev[b].lines_disabled);
      n_dead_wb += int'(ev[b].dead_writeback); n_victim_wb += int'(ev[b].victim_writeback);
      n_stall += int'(ev[b].ref_stall); n_ovf += int'(ev[b].refq_overflow);
      n_decay += int'(ev[b].decay_read);
    end
    n_contend += int'($countones(dut.b_mvalid) > 1);
    n_pulses  += int'(dut.ref_valid);
  end

  // ---------------------------------------------------------- golden data
  logic [511:0] gold [logic [LADDR_W-1:0]];
  function automatic logic [511:0] gold_of(logic [LADDR_W-1:0] a);
    return gold.exists(a) ? gold[a] : u_mem.init_line(a);
  endfunction
  always @(posedge clk)
    if (rst_n && mv && mr && mwe)
      check(md == gold_of(ma), $sformatf("write-back of %h carries stale data", ma));

  task automatic access(int b, req_op_e op, int tag, int set, output bit hit);
    logic [BW-1:0] a;
    logic [LADDR_W-1:0] la;
    logic [511:0] d;
    int lat;
    a  = BW'((tag << 4) | set);
    la = {a, 4'(b)};
    for (int i = 0; i < 16; i++) d[32*i +: 32] = $urandom;
    @(negedge clk);
    req_valid[b] = 1; req_op[b] = op; req_addr[b] = a; req_wdata[b] = d;
    @(posedge clk);
    while (!req_ready[b]) @(posedge clk);
    #1 req_valid[b] = 0;
    if (op == REQ_WRITE) gold[la] = d;
    lat = 0;
    do begin @(posedge clk); #1; lat++; end while (!resp_valid[b] && lat < 5000);
    check(resp_valid[b], "response arrives");
    hit = resp_hit[b];
    if (op == REQ_READ) check(resp_rdata[b] == gold_of(la), $sformatf("bank %0d read data of %h", b, a));
    if (hit) check(lat == ACC, $sformatf("hit latency %0d", lat));
  endtask

  task automatic bank_traffic(int b, int n);
    bit h;
    for (int k = 0; k < n; k++) begin
      access(b, ($urandom_range(0, 2) == 0) ? REQ_WRITE : REQ_READ,
             $urandom_range(0, 7), $urandom_range(0, SETS - 1), h);
      if ($urandom_range(0, 19) == 0) repeat ($urandom_range(1, 60)) @(posedge clk);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit h;
    int p0, p1, c0;
    temp = 75;
    req_valid = '0; req_op = '{default: REQ_READ}; req_addr = '0; req_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // one complete operation on bank 0 first
    access(0, REQ_WRITE, 1, 2, h); check(!h, "write-allocate miss");
    access(0, REQ_READ, 1, 2, h);  check(h, "read hit");
    access(0, REQ_READ, 3, 2, h);  check(!h, "read miss");
    // all banks at once
    for (int b = 0; b < NB; b++) begin
      fork
        automatic int bb = b;
        bank_traffic(bb, 150);
      join_none
    end
    wait fork;
    // let lines die, then touch some of them
    repeat (2 * TIME_C + 2 * SWEEP) @(posedge clk);
    for (int b = 0; b < NB; b++) begin
      fork
        automatic int bb = b;
        bank_traffic(bb, 150);
      join_none
    end
    wait fork;
    // temperature step: refresh requests must come faster
    c0 = n_pulses; repeat (4000) @(posedge clk); p0 = n_pulses - c0;
    temp = 95;
    c0 = n_pulses; repeat (4000) @(posedge clk); p1 = n_pulses - c0;
    check(p1 > p0, $sformatf("refresh pulses per 4000 cycles: %0d at 75 C, %0d at 95 C", p0, p1));
    check(p0 >= 4000 / PER - 1 && p0 <= 4000 / PER + 1, "refresh rate at 75 C");
    temp = 75;
    repeat (100) @(posedge clk);

    $display("top: hits %0d misses %0d false %0d true %0d slots %0d skipped %0d disabled %0d dead_wb %0d victim_wb %0d stalls %0d contention %0d",
             n_hit, n_miss, n_false, n_true, n_slots, n_skipped, n_disabled, n_dead_wb, n_victim_wb, n_stall, n_contend);
    check(n_hit > 0, "hits happened");
    check(n_miss > 0, "misses happened");
    check(n_skipped > 0, "refreshes skipped");
    check(n_disabled > 0, "lines disabled");
    check(n_dead_wb > 0, "dirty dead lines written back");
    check(n_false > 0, "false predictions happened");
    check(n_true > 0, "true predictions happened");
    check(n_victim_wb > 0, "dirty victims written back");
    check(n_stall > 0, "requests stalled by refresh");
    check(n_contend > 0, "banks contended for the memory channel");
    check(n_slots >= NB * (n_pulses - 2), "every bank served every refresh request");
    check(n_ovf == 0, "no refresh request lost");
    check(n_decay == 0, "no expired data read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
