// tb_edram_data_array: 8 rows of 64 bits, retention 100 cycles. A row read
// within the retention time returns its data; a row left alone longer reads
// back corrupted with decayed set; refreshing it every 50 cycles keeps it;
// refreshing it too late does not bring it back; a write restores it.
module tb_edram_data_array;
  logic clk = 0, rst_n = 0, rd, wr, rf, dec;
  logic [2:0] row, rrow;
  logic [63:0] wd, rdat;
  int checks = 0, failures = 0;

  edram_data_array #(.ROWS(8), .WIDTH(64), .RETENTION_CYCLES(100)) dut (
    .clk(clk), .rst_n(rst_n), .rd_en_i(rd), .wr_en_i(wr), .row_i(row), .wdata_i(wd),
    .rdata_o(rdat), .decayed_o(dec), .ref_en_i(rf), .ref_row_i(rrow));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic write(int r, logic [63:0] d);
    @(negedge clk); wr = 1; row = 3'(r); wd = d; @(negedge clk); wr = 0;
  endtask
  task automatic read(int r, logic [63:0] exp, bit exp_dec, string what);
    @(negedge clk); rd = 1; row = 3'(r); @(negedge clk); rd = 0;
    check(dec == exp_dec, {what, ": decayed flag"});
    if (!exp_dec) check(rdat == exp, {what, ": data"});
    else          check(rdat != exp, {what, ": expired data must not read back intact"});
  endtask
  task automatic idle(int n); repeat (n) @(negedge clk); endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd = 0; wr = 0; rf = 0; row = 0; rrow = 0; wd = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int r = 0; r < 8; r++) write(r, {32'(r), 32'hC0FFEE00 + 32'(r)});
    read(0, {32'd0, 32'hC0FFEE00}, 0, "fresh row");
    idle(120);
    read(1, {32'd1, 32'hC0FFEE01}, 1, "row past retention");
    write(2, 64'h1234_5678_9ABC_DEF0);
    for (int k = 0; k < 6; k++) begin
      idle(48); @(negedge clk); rf = 1; rrow = 2; @(negedge clk); rf = 0;
    end
    read(2, 64'h1234_5678_9ABC_DEF0, 0, "row kept by refresh");
    idle(120); @(negedge clk); rf = 1; rrow = 2; @(negedge clk); rf = 0;
    read(2, 64'h1234_5678_9ABC_DEF0, 1, "row refreshed too late");
    write(2, 64'hAAAA_5555_AAAA_5555);
    read(2, 64'hAAAA_5555_AAAA_5555, 0, "row rewritten");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
