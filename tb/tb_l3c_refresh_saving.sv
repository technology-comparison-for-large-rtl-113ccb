// tb_l3c_refresh_saving: refresh-energy workload for the cache at full bank
// size (16 banks x 2048 sets x 16 ways, 19-cycle refresh requests, 40000-
// cycle retention) with the TIME period shortened from 256 to 2 refresh
// sweeps so that lines can die within a short simulation.
//
// A working set of lines is loaded into every bank; one quarter of them (the
// "hot" lines) is re-read continuously while the rest go unused. The bench
// runs eight sweeps and reports the fraction of row refreshes that were
// skipped, which is the quantity the dead-line scheme exists to raise. It
// checks that the cold lines were disabled, that their dirty data reached
// memory, that the hot lines never missed once loaded, that every read
// returned the latest data, and that no row was read after expiring.
module tb_l3c_refresh_saving;
  import l3c_pkg::*;

  localparam int NB = 16, BW = LADDR_W - 4, SWEEP = 2048 * 19, TP = 2;
  localparam int LINES = 64;   // lines per bank in the working set

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

  l3c_top #(.TIME_PERIODS(TP)) dut (
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

  longint n_refreshed = 0, n_skipped = 0;
  int n_disabled = 0, n_dead_wb = 0, n_decay = 0, n_ovf = 0;
  always @(posedge clk) if (rst_n)
    for (int b = 0; b < NB; b++) begin
      n_refreshed += longint'(ev[b].rows_refreshed);
      n_skipped   += longint'(ev[b].rows_skipped);
      n_disabled  += int'(ev[b].lines_disabled);
      n_dead_wb   += int'(ev[b].dead_writeback);
      n_decay     += int'(ev[b].decay_read);
      n_ovf       += int'(ev[b].refq_overflow);
    end

  logic [511:0] gold [logic [LADDR_W-1:0]];
  function automatic logic [511:0] gold_of(logic [LADDR_W-1:0] a);
    return gold.exists(a) ? gold[a] : u_mem.init_line(a);
  endfunction

  // line i of bank b: distinct sets spread over the bank, tag from i
  function automatic logic [BW-1:0] line_addr(int b, int i);
    return BW'({19'(i + 1), 11'(i * 31 + b)});
  endfunction

  task automatic access(int b, req_op_e op, logic [BW-1:0] a, output bit hit);
    logic [LADDR_W-1:0] la;
    logic [511:0] d;
    int lat;
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
    if (op == REQ_READ) check(resp_rdata[b] == gold_of(la), "read data");
  endtask

  int hot_misses = 0;
  bit stop_hot = 0;

  task automatic bank_run(int b);
    bit h;
    for (int i = 0; i < LINES; i++)
      access(b, (i % 2 == 0) ? REQ_WRITE : REQ_READ, line_addr(b, i), h);
    // keep the first quarter hot until told to stop
    while (!stop_hot) begin
      for (int i = 0; i < LINES / 4; i++) begin
        access(b, REQ_READ, line_addr(b, i), h);
        if (!h) hot_misses++;
      end
      repeat (2000) @(posedge clk);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    temp = 75;
    req_valid = '0; req_op = '{default: REQ_READ}; req_addr = '0; req_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2100) @(posedge clk);
    for (int b = 0; b < NB; b++) begin
      fork
        automatic int bb = b;
        bank_run(bb);
      join_none
    end
    repeat (8 * SWEEP) @(posedge clk);
    stop_hot = 1;
    wait fork;
    $display("refresh: %0d rows refreshed, %0d skipped (%0d%% saved); %0d lines disabled, %0d dirty dead lines written back",
             n_refreshed, n_skipped, (100 * n_skipped) / (n_refreshed + n_skipped), n_disabled, n_dead_wb);
    check(n_skipped > 0, "refreshes were skipped");
    check(n_disabled >= NB * (LINES * 3 / 4), "cold lines were disabled");
    check(n_dead_wb >= NB * (LINES * 3 / 8), "dirty cold lines were written back");
    for (int b = 0; b < NB; b++)
      for (int i = LINES / 4; i < LINES; i += 2)
        check(u_mem.peek({line_addr(b, i), 4'(b)}) == gold_of({line_addr(b, i), 4'(b)}),
              "memory holds the cold line's data");
    check(hot_misses == 0, $sformatf("hot lines never missed (%0d misses)", hot_misses));
    check(n_decay == 0 && n_ovf == 0, "no expired row read, no refresh request lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
