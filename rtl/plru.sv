// plru: tree pseudo-LRU replacement state of one set.
//
// The set's WAYS ways are the leaves of a binary tree with WAYS-1 node bits.
// Node n has children 2n+1 and 2n+2; a node bit of 0 points the victim search
// to the left subtree, 1 to the right. An access to a way sets every node bit
// on its path to point away from it. The cache uses a pseudo-LRU policy; the
// tree form is the usual one and the choice of this implementation.
//
// Interface (purely combinational):
//   bits_i     current node bits (WAYS-1)
//   touch_i    a way is accessed (hit or fill)
//   way_i      the accessed way
//   bits_o     node bits after the access
//   victim_o   the way the current bits point to
module plru #(
  parameter int unsigned WAYS = 16
) (
  input  logic [WAYS-2:0]         bits_i,
  input  logic                    touch_i,
  input  logic [$clog2(WAYS)-1:0] way_i,
  output logic [WAYS-2:0]         bits_o,
  output logic [$clog2(WAYS)-1:0] victim_o
);

  localparam int unsigned LEVELS = $clog2(WAYS);

  initial assert (WAYS >= 2 && (1 << LEVELS) == WAYS)
    else $error("plru: WAYS must be a power of two");

  always_comb begin
    int unsigned node;
    bits_o = bits_i;
    node   = 0;
    if (touch_i) begin
      for (int unsigned l = 0; l < LEVELS; l++) begin
        // way bit (LEVELS-1-l) tells whether the way lies right of this node
        bits_o[node] = ~way_i[LEVELS-1-l];
        node = 2 * node + 1 + int'(way_i[LEVELS-1-l]);
      end
    end
  end

  always_comb begin
    int unsigned node;
    node     = 0;
    victim_o = '0;
    for (int unsigned l = 0; l < LEVELS; l++) begin
      victim_o[LEVELS-1-l] = bits_i[node];
      node = 2 * node + 1 + int'(bits_i[node]);
    end
  end

endmodule
