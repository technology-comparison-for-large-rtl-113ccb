// edram_data_array: behavioural model of the gain-cell eDRAM data array of
// one way, with its row decoder and driver.
//
// The real array stores each bit as charge on a storage transistor's gate and
// loses it unless the row is restored (written or refreshed) within the
// retention time, 20 us at 75 C in the design, that is 40000 cycles at 2 GHz.
// This model keeps the data in an array plus, per row, the cycle of its last
// restore and a "lost" flag. A refresh of a row restores it if it is still
// within the retention time, and otherwise only marks it lost; a write
// restores it with new data. A read does not restore the row (a gain-cell
// read is non-destructive and not a refresh). A read of an expired or lost
// row returns the complement of the stored word and raises decayed_o, so that
// a missed refresh shows up in simulation. How expired data reads back is
// this model's choice.
//
// Interface (single access port plus a refresh port):
//   rd_en_i / wr_en_i / row_i / wdata_i   access; rdata_o and decayed_o are
//                                         valid the cycle after rd_en_i and
//                                         hold until the next read
//   ref_en_i / ref_row_i                  refresh of one row
module edram_data_array #(
  parameter int unsigned ROWS             = 2048,
  parameter int unsigned WIDTH            = 512,
  parameter int unsigned RETENTION_CYCLES = 40000
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    rd_en_i,
  input  logic                    wr_en_i,
  input  logic [$clog2(ROWS)-1:0] row_i,
  input  logic [WIDTH-1:0]        wdata_i,
  output logic [WIDTH-1:0]        rdata_o,
  output logic                    decayed_o,
  input  logic                    ref_en_i,
  input  logic [$clog2(ROWS)-1:0] ref_row_i
);

  logic [WIDTH-1:0] mem   [ROWS];
  logic [31:0]      stamp [ROWS];
  logic             lost  [ROWS];
  logic [31:0]      now_q;

  function automatic logic expired(logic [31:0] now, logic [31:0] t);
    return (now - t) > 32'(RETENTION_CYCLES);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) now_q <= '0;
    else        now_q <= now_q + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (ref_en_i) begin
      if (expired(now_q, stamp[ref_row_i]))
        lost[ref_row_i] <= 1'b1;
      stamp[ref_row_i] <= now_q;
    end
    if (wr_en_i) begin
      mem[row_i]   <= wdata_i;
      stamp[row_i] <= now_q;
      lost[row_i]  <= 1'b0;
    end
    if (rd_en_i) begin
      if (lost[row_i] || expired(now_q, stamp[row_i])) begin
        rdata_o   <= ~mem[row_i];
        decayed_o <= 1'b1;
      end else begin
        rdata_o   <= mem[row_i];
        decayed_o <= 1'b0;
      end
    end
  end

endmodule
