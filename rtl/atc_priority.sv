// atc_priority - priority selection of the routing cache.
//
// The pattern array is ordered with the longest prefixes at the top (index
// 0), so the lowest-numbered matching row carries the longest matching
// prefix and its port is the one to use. This block returns that row's
// index and a hit flag; it is combinational.
//
// It is built as a balanced binary tree of log2(ENTRIES) levels: each node
// passes on its left child when that child has a match and its right child
// otherwise. The tree is padded to a power of two with non-matching leaves.
// Further selection rules (filtering, priority routing, alternative ports)
// would go here; only the basic longest-prefix rule is built.
module atc_priority
  import atc_pkg::*;
#(
  parameter int unsigned ENTRIES = CACHE_ENTRIES,
  localparam int unsigned IDX_W  = $clog2(ENTRIES),
  localparam int unsigned LEAVES = 1 << IDX_W
) (
  input  logic [ENTRIES-1:0] req,
  output logic               hit,
  output logic [IDX_W-1:0]   idx
);

  logic             node_v  [LEAVES];
  logic [IDX_W-1:0] node_id [LEAVES];

  // Reduced in place: node i of a level is built from nodes 2i and 2i+1 of
  // the level below, which no lower-numbered node of the new level reads.
  always_comb begin
    for (int i = 0; i < int'(LEAVES); i++) begin
      node_v[i]  = (i < int'(ENTRIES)) ? req[i] : 1'b0;
      node_id[i] = IDX_W'(i);
    end
    for (int w = int'(LEAVES) / 2; w >= 1; w = w / 2) begin
      for (int i = 0; i < w; i++) begin
        node_id[i] = node_v[2*i] ? node_id[2*i] : node_id[2*i+1];
        node_v[i]  = node_v[2*i] | node_v[2*i+1];
      end
    end
    hit = node_v[0];
    idx = node_id[0];
  end

endmodule
