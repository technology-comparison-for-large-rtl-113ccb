// sram_tag_array: the SRAM tag array of one bank.
//
// One word per set holds, for every way, the valid, dirty and disable bits,
// the three-bit dead-line predictor state and the tag, followed by the set's
// three-bit prediction indicator and its pseudo-LRU bits; the bank packs and
// unpacks the word. The array is a single-port synchronous SRAM: a read
// returns the word one cycle after en_i, and a write (en_i and we_i) stores
// wdata_i at the clock edge. The bank clears it row by row after reset.
// Keeping the predictor, disable and indicator bits in the tag array follows
// the design; the single-port word-per-set organisation is this
// implementation's choice.
module sram_tag_array #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned WIDTH = 418
) (
  input  logic                     clk,
  input  logic                     en_i,
  input  logic                     we_i,
  input  logic [$clog2(DEPTH)-1:0] addr_i,
  input  logic [WIDTH-1:0]         wdata_i,
  output logic [WIDTH-1:0]         rdata_o
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en_i) begin
      if (we_i)
        mem[addr_i] <= wdata_i;
      else
        rdata_o <= mem[addr_i];
    end
  end

endmodule
