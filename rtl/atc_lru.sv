// atc_lru - least-recently-used replacement inside the variable-size sets.
//
// Every cache row keeps a time stamp. A free-running use counter advances
// on every use; a use is a cache hit on a row (touch_en) or a write of a new
// entry into a row (fill_en), and it copies the counter into that row's
// stamp. For the set named by set_sel the block picks the victim row where a
// new entry goes: the first invalid row of the set if there is one, else the
// row of the set with the oldest stamp, which is the least recently used.
// evict tells whether the victim still holds a valid entry.
//
// The victim search is combinational: a balanced min-tree over all rows on
// the key {not in set, valid, stamp} (stamp taken as 0 for an invalid row),
// ties going to the lower index. Rows
// outside the set carry the largest keys, so one tree serves every set. The
// set ranges are the constant ones of atc_pkg.
//
// Exact LRU through time stamps is this design's way of doing it; the
// replacement policy itself (LRU) is the cache's. Stamps are STAMP_W bits
// wide and LRU order is exact for the first 2**STAMP_W uses after reset;
// beyond that the counter wraps. Reset clears the counter and all stamps.
module atc_lru
  import atc_pkg::*;
#(
  parameter int unsigned ENTRIES = CACHE_ENTRIES,
  parameter int unsigned SW      = STAMP_W,
  localparam int unsigned IDX_W  = $clog2(ENTRIES),
  localparam int unsigned LEAVES = 1 << IDX_W,
  localparam int unsigned KEY_W  = SW + 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [ENTRIES-1:0] valid,      // row valid bits of the pattern array
  input  logic               touch_en,   // cache hit on touch_idx
  input  logic [IDX_W-1:0]   touch_idx,
  input  logic               fill_en,    // new entry written at fill_idx
  input  logic [IDX_W-1:0]   fill_idx,
  input  logic [4:0]         set_sel,    // set that needs a row
  output logic [IDX_W-1:0]   victim_idx,
  output logic               evict
);

  logic [SW-1:0] now;
  logic [SW-1:0] stamp [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now <= '0;
      for (int i = 0; i < int'(ENTRIES); i++) stamp[i] <= '0;
    end else begin
      if (touch_en) stamp[touch_idx] <= now;
      if (fill_en)  stamp[fill_idx]  <= now;
      if (touch_en || fill_en) now <= now + 1'b1;
    end
  end

  // Index range of the selected set.
  int unsigned lo, hi;
  always_comb begin
    lo = 0;
    hi = 0;
    for (int unsigned s = 0; s < NUM_SETS; s++) begin
      if (set_sel == 5'(s)) begin
        lo = set_base(ENTRIES, s);
        hi = set_base(ENTRIES, s + 1);
      end
    end
  end

  logic [KEY_W-1:0] key [LEAVES];
  logic [IDX_W-1:0] kid [LEAVES];

  always_comb begin
    for (int i = 0; i < int'(LEAVES); i++) begin
      if (i < int'(ENTRIES) && i >= int'(lo) && i < int'(hi))
        key[i] = {1'b0, valid[i], valid[i] ? stamp[i] : '0};
      else
        key[i] = '1;
      kid[i] = IDX_W'(i);
    end
    for (int w = int'(LEAVES) / 2; w >= 1; w = w / 2) begin
      for (int i = 0; i < w; i++) begin
        if (key[2*i+1] < key[2*i]) begin
          key[i] = key[2*i+1];
          kid[i] = kid[2*i+1];
        end else begin
          key[i] = key[2*i];
          kid[i] = kid[2*i];
        end
      end
    end
    victim_idx = kid[0];
    evict      = key[0][SW];
  end

endmodule
