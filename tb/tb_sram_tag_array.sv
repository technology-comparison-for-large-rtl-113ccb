// tb_sram_tag_array: random reads and writes against a reference array;
// read data must appear one cycle after the read.
module tb_sram_tag_array;
  localparam int DEPTH = 32, WIDTH = 40;
  logic clk = 0, en, we;
  logic [4:0] addr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  sram_tag_array #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (
    .clk(clk), .en_i(en), .we_i(we), .addr_i(addr), .wdata_i(wdata), .rdata_o(rdata));

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

  initial begin
    en = 0; we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); en = 1; we = 1; addr = 5'(i);
      wdata = {8'(i), $urandom}; model[i] = wdata;
    end
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      en = $urandom_range(0, 3) != 0; we = $urandom_range(0, 1); addr = 5'($urandom);
      wdata = {8'($urandom), $urandom};
      if (en && we) model[addr] = wdata;
      if (en && !we) begin
        logic [WIDTH-1:0] exp;
        exp = model[addr];
        @(negedge clk); en = 0;
        check(rdata == exp, $sformatf("read %0d: %h expected %h", addr, rdata, exp));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
