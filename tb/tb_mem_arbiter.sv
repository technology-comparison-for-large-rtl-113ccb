// tb_mem_arbiter: four banks post random requests and hold each until it is
// taken; the channel accepts at random. Checks every request arrives once,
// with the bank number appended to its address and as its id, that no bank
// waits more than four grants, and that read data is routed by id.
module tb_mem_arbiter;
  localparam int N = 4, AW = 8, DW = 16;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] bv, br, bwe, rv;
  logic [N-1:0][AW-1:0] ba;
  logic [N-1:0][DW-1:0] bd;
  logic [DW-1:0] rd;
  logic mv, mr, mwe, mrv;
  logic [AW+1:0] ma;
  logic [DW-1:0] md, mrd;
  logic [1:0] mid, mrid;
  int checks = 0, failures = 0;

  mem_arbiter #(.N(N), .ADDR_W(AW), .DATA_W(DW)) dut (
    .clk(clk), .rst_n(rst_n),
    .b_req_valid_i(bv), .b_req_ready_o(br), .b_req_we_i(bwe), .b_req_addr_i(ba),
    .b_req_wdata_i(bd), .b_resp_valid_o(rv), .b_resp_rdata_o(rd),
    .m_req_valid_o(mv), .m_req_ready_i(mr), .m_req_we_o(mwe), .m_req_addr_o(ma),
    .m_req_wdata_o(md), .m_req_id_o(mid),
    .m_resp_valid_i(mrv), .m_resp_id_i(mrid), .m_resp_rdata_i(mrd));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sent [N], got [N], wait_grants [N];
  initial begin
    bv = '0; bwe = '0; ba = '0; bd = '0; mr = 0; mrv = 0; mrid = 0; mrd = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      // new requests where none is pending
      for (int b = 0; b < N; b++)
        if (!bv[b] && $urandom_range(0, 2) == 0) begin
          bv[b] = 1; bwe[b] = $urandom_range(0, 1);
          ba[b] = AW'(sent[b]); bd[b] = DW'({b[3:0], 12'(sent[b])});
        end
      mr = $urandom_range(0, 1);
      #1;
      if (mv && mr) begin
        int b;
        b = int'(mid);
        check(bv[b], "granted bank has a request");
        check(ma == {ba[b], 2'(b)}, "address carries the bank number");
        check(md == bd[b] && mwe == bwe[b], "data and write flag of the granted bank");
        check(br == (N'(1) << b), "ready goes to the granted bank only");
        for (int o = 0; o < N; o++)
          if (o != b && bv[o]) begin
            wait_grants[o]++;
            check(wait_grants[o] <= N, $sformatf("bank %0d starved", o));
          end
        wait_grants[b] = 0;
        got[b]++;
        @(posedge clk); #1;
        bv[b] = 0; sent[b]++;
      end
      // a read return to a random bank
      mrv = $urandom_range(0, 1); mrid = 2'($urandom); mrd = DW'($urandom);
      #1;
      check(rv == (mrv ? (N'(1) << mrid) : '0) && rd == mrd, "read data routed by id");
    end
    for (int b = 0; b < N; b++) check(got[b] > 100, $sformatf("bank %0d served %0d", b, got[b]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
