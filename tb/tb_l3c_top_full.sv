// tb_l3c_top_full: the cache at its full default size (32 MB: 16 banks x
// 2048 sets x 16 ways x 64 B, 9-cycle hits, a refresh request every 19
// cycles at 75 C, 40000-cycle retention). It waits for the banks to clear
// their tag arrays, then in every bank writes a line, reads it back (a hit
// in 9 cycles), reads a cold line (a miss filled from memory) and reads it
// again (a hit), checking the data each time. It also checks that refresh
// requests come every 19 cycles, walk the rows in order and that every bank
// serves each of them, and that after a full refresh sweep, more than the
// 40000-cycle retention time later, the lines written first still hit with
// intact data.
module tb_l3c_top_full;
  import l3c_pkg::*;

  localparam int NB = 16, BW = LADDR_W - 4;

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

  l3c_top dut (
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

  int n_slots = 0, n_pulses = 0, last_pulse = -1, cyc = 0, exp_row = 0, n_hit = 0, n_miss = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int b = 0; b < NB; b++) begin
      n_slots += int'(ev[b].refresh_slot);
      n_hit   += int'(ev[b].hit);
      n_miss  += int'(ev[b].miss);
      if (ev[b].decay_read || ev[b].refq_overflow) check(0, "refresh fault");
    end
    if (dut.ref_valid) begin
      if (last_pulse >= 0) check(cyc - last_pulse == 19, "refresh request every 19 cycles");
      check(int'(dut.ref_row) == exp_row, "refresh rows in order");
      exp_row = (exp_row + 1) % 2048;
      last_pulse = cyc;
      if (cyc > 2048 + 8) n_pulses++;   // banks drop requests while clearing tags
    end
  end

  logic [511:0] gold [logic [LADDR_W-1:0]];
  function automatic logic [511:0] gold_of(logic [LADDR_W-1:0] a);
    return gold.exists(a) ? gold[a] : u_mem.init_line(a);
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
    if (hit) check(lat == 9, $sformatf("hit latency %0d", lat));
  endtask

  task automatic bank_op(int b);
    bit h;
    logic [BW-1:0] a1, a2;
    a1 = BW'({19'(b + 5), 11'(b * 100 + 7)});
    a2 = BW'({19'(b + 77), 11'(b * 100 + 9)});
    access(b, REQ_WRITE, a1, h); check(!h, "write miss");
    access(b, REQ_READ,  a1, h); check(h,  "read hit after write");
    access(b, REQ_READ,  a2, h); check(!h, "cold read miss");
    access(b, REQ_READ,  a2, h); check(h,  "read hit after fill");
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    temp = 75;
    req_valid = '0; req_op = '{default: REQ_READ}; req_addr = '0; req_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++) begin
      fork
        automatic int bb = b;
        bank_op(bb);
      join_none
    end
    wait fork;
    // more than one retention time later the refreshed lines must still hit
    repeat (45000) @(posedge clk);
    for (int b = 0; b < NB; b++) begin
      fork
        automatic int bb = b;
        begin
          bit h;
          access(bb, REQ_READ, BW'({19'(bb + 5), 11'(bb * 100 + 7)}), h);
          check(h, "refreshed line still hits after the retention time");
        end
      join_none
    end
    wait fork;
    repeat (100) @(posedge clk);
    check(n_hit == 3 * NB && n_miss == 2 * NB, $sformatf("%0d hits, %0d misses", n_hit, n_miss));
    check(n_pulses >= 2048, "a full refresh sweep ran");
    check(n_pulses > 100, "refresh running");
    check(n_slots >= NB * (n_pulses - 2), "every bank served the refresh requests");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
